// cache_engine: the cache of one site and its protocol engine.
//
// The cache holds, for every address of the memory unit, a 4-bit cache
// state (one of 14, Invalid meaning "not cached") and a value. Each cycle
// the engine fires at most one protocol rule, chosen in this order:
//   1. a second high-priority message left over from the previous cycle
//      (CacheAck releasing a held Down message also sends ErFRTag),
//   2. the mandatory rule for the message at the head of IN,
//   3. the processor rule for the instruction at the head of PMB,
//   4. a voluntary rule requested on the vc_* port by an adaptivity policy.
// A rule that sends on the high-priority path (Down*, ErFRTag) fires only
// when HOUT is empty; if the IN head is blocked that way, the PMB head may
// be served instead. Requests (CacheReq, Wb) go to LOUT; the request counter
// rqcnt limits outstanding requests to RQMAX and the request tags (one
// address per outstanding request) are exported for the fairness logic.
// When a CacheReq is outstanding and Cache_w/Cache_m arrives, the line
// enters a locked state; downgrades are then held in the state until the
// CacheAck arrives, which releases the held message (message holding).
//
// Interface: PMB head (pmb_*) with pmb_pop, MPB push (mpb_*, the value is
// the loaded data for Loadl and 0 for an Ack), IN head with in_pop, HOUT and
// LOUT push ports, request tags, voluntary request port (vc_valid held
// until vc_done; vc_fired tells whether the rule applied), a debug read port
// and event pulses. All actions take effect at the next clock edge.
// mpb_tag is a wire from pmb_tag: a result always belongs to the PMB head.
//
// The rules are those of the protocol's processor, voluntary and mandatory
// cache-engine tables. This design's own choices: one rule per cycle in the
// order above, PMB served in order (fences retire at once), a cache with one
// line per memory address (no capacity replacement), messages that match no
// rule are consumed without effect, and P9A does not add a tag.
//
// Reset (rst_n) is asynchronous and active low. The assertions at the end also
// use rst_n in 'disable iff'; that is why lint reports rst_n as both an
// asynchronous reset and a synchronously sampled signal. It is intended.
module cache_engine
  import bcachet_pkg::*;
#(
  parameter int P      = 256,
  parameter int N      = 16,
  parameter int V_W    = 32,
  parameter int RQMAX  = 2,
  parameter int TAG_W  = 4,
  localparam int ID_W  = (P > 1) ? $clog2(P) : 1,
  localparam int A_W   = (N > 1) ? $clog2(N) : 1,
  localparam int MSG_W = 5 + ID_W + A_W + 1 + V_W,
  localparam int RQ_W  = $clog2(RQMAX + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [ID_W-1:0]           site_id,
  // processor-to-memory buffer head
  input  logic                      pmb_valid,
  input  logic [2:0]                pmb_op,
  input  logic [TAG_W-1:0]          pmb_tag,
  input  logic [A_W-1:0]            pmb_a,
  input  logic [V_W-1:0]            pmb_v,
  output logic                      pmb_pop,
  // memory-to-processor buffer
  input  logic                      mpb_full,
  output logic                      mpb_push,
  output logic [TAG_W-1:0]          mpb_tag,
  output logic [V_W-1:0]            mpb_v,
  // incoming queue head
  input  logic                      in_valid,
  input  logic [MSG_W-1:0]          in_msg,
  output logic                      in_pop,
  // outgoing queues
  input  logic                      hout_empty,
  output logic                      hout_push,
  output logic [MSG_W-1:0]          hout_msg,
  input  logic                      lout_full,
  output logic                      lout_push,
  output logic [MSG_W-1:0]          lout_msg,
  // request counter and tags
  output logic [RQ_W-1:0]           rqcnt,
  output logic [RQMAX-1:0]          tags_valid,
  output logic [RQMAX-1:0][A_W-1:0] tags_a,
  // voluntary rule request
  input  logic                      vc_valid,
  input  logic [2:0]                vc_op,
  input  logic [A_W-1:0]            vc_a,
  output logic                      vc_done,
  output logic                      vc_fired,
  // debug read port
  input  logic [A_W-1:0]            dbg_a,
  output logic [3:0]                dbg_cs,
  output logic [V_W-1:0]            dbg_v,
  // events: 0 locked state entered, 1 held message released,
  //         2 request re-sent after Nack, 3 request blocked by rqcnt
  output logic [3:0]                ev
);
  typedef struct packed {
    cmd_e            cmd;
    logic [ID_W-1:0] site;
    logic [A_W-1:0]  a;
    logic            hasv;
    logic [V_W-1:0]  v;
  } msg_t;

  cstate_e        cs_q  [N];
  logic [V_W-1:0] val_q [N];
  logic [RQ_W-1:0] rq_q;
  logic [RQMAX-1:0]          tv_q;
  logic [RQMAX-1:0][A_W-1:0] ta_q;
  logic            pend_q;
  msg_t            pend_msg_q;

  function automatic msg_t mk(cmd_e c, logic [ID_W-1:0] s, logic [A_W-1:0] a,
                              logic hv, logic [V_W-1:0] v);
    msg_t m;
    m.cmd = c; m.site = s; m.a = a; m.hasv = hv; m.v = v;
    return m;
  endfunction

  function automatic logic is_locked(cstate_e c);
    return c inside {CS_L_CB_DWB, CS_L_CB_DMB, CS_L_CW, CS_L_CW_DMW, CS_L_CM};
  endfunction

  // rule outcome of this cycle
  logic            w_en;
  logic [A_W-1:0]  w_a;
  cstate_e         w_cs;
  logic [V_W-1:0]  w_v;
  logic            h0_v, h1_v, l_v;
  msg_t            h0_m, h1_m, l_m;
  logic            rq_inc, rq_dec;
  logic            tag_add, tag_rm;
  logic [A_W-1:0]  tag_addr;

  msg_t    im;
  cstate_e ics, pcs, vcs;
  logic [V_W-1:0] iv, pv, vv;
  logic    rq_ok;

  assign im    = msg_t'(in_msg);
  assign ics   = cs_q[im.a];
  assign iv    = val_q[im.a];
  assign pcs   = cs_q[pmb_a];
  assign pv    = val_q[pmb_a];
  assign vcs   = cs_q[vc_a];
  assign vv    = val_q[vc_a];
  assign rq_ok = (rq_q < RQ_W'(RQMAX)) && !lout_full;

  logic in_done, retire, miss;
  always_comb begin
    retire = 1'b0;
    miss   = 1'b0;
    w_en = 1'b0; w_a = '0; w_cs = CS_INV; w_v = '0;
    h0_v = 1'b0; h1_v = 1'b0; l_v = 1'b0;
    h0_m = '0;   h1_m = '0;   l_m = '0;
    rq_inc = 1'b0; rq_dec = 1'b0; tag_add = 1'b0; tag_rm = 1'b0; tag_addr = '0;
    in_pop = 1'b0; pmb_pop = 1'b0;
    mpb_push = 1'b0; mpb_tag = pmb_tag; mpb_v = '0;
    vc_done = 1'b0; vc_fired = 1'b0;
    ev = '0;
    in_done = 1'b0;

    if (pend_q) begin
      // second message of a two-message rule; HOUT had room for both
      h0_v = 1'b1;
      h0_m = pend_msg_q;
    end else begin
      // ---------------- mandatory cache-engine rules ----------------
      if (in_valid) begin
        w_a = im.a; w_cs = ics; w_v = iv;
        unique case (im.cmd)
          CMD_CACHE_W: begin
            unique case (ics)
              CS_CB:  begin w_cs = CS_CW;   w_v = im.v; end                 // MC1
              CS_DB:  w_cs = CS_DW;                                          // MC2
              CS_CP:  begin w_cs = CS_L_CW; w_v = im.v; ev[0] = 1'b1; end   // MC4
              CS_INV: begin w_cs = CS_CW;   w_v = im.v; end                 // MC5
              default: ;                                                    // MC3
            endcase
            in_done = 1'b1;
          end
          CMD_CACHE_M: begin
            unique case (ics)
              CS_CB:  begin w_cs = CS_CM;   w_v = im.v; end                 // MC6
              CS_DB:  w_cs = CS_DM;                                          // MC7
              CS_CP:  begin w_cs = CS_L_CM; w_v = im.v; ev[0] = 1'b1; end   // MC9
              CS_INV: begin w_cs = CS_CM;   w_v = im.v; end                 // MC10
              default: ;                                                    // MC8
            endcase
            in_done = 1'b1;
          end
          CMD_UP_WM: begin
            unique case (ics)
              CS_CW:   w_cs = CS_CM;                                         // MC13
              CS_DW:   w_cs = CS_DM;                                         // MC14
              CS_L_CW: w_cs = CS_L_CM;                                       // MC18
              default: ;
            endcase
            in_done = 1'b1;
          end
          CMD_WBACK_B: begin
            if (ics == CS_WBP) begin                                         // MC20

              if (hout_empty) begin
                w_cs = CS_CB; rq_dec = 1'b1; tag_rm = 1'b1; tag_addr = im.a;
                h0_v = 1'b1; h0_m = mk(CMD_ERFRTAG, site_id, im.a, 1'b0, '0);
                in_done = 1'b1;
              end
            end else in_done = 1'b1;
          end
          CMD_DOWNREQ_WB: begin
            unique case (ics)
              CS_CW, CS_DW: begin                                            // MC23, MC24

                if (hout_empty) begin
                  w_cs = (ics == CS_CW) ? CS_CB : CS_DB;
                  h0_v = 1'b1; h0_m = mk(CMD_DOWN_WB, site_id, im.a, 1'b0, '0);
                  in_done = 1'b1;
                end
              end
              CS_L_CW:     begin w_cs = CS_L_CB_DWB; in_done = 1'b1; end     // MC30
              CS_L_CW_DMW: begin w_cs = CS_L_CB_DMB; in_done = 1'b1; end     // MC31
              default: in_done = 1'b1;
            endcase
          end
          CMD_DOWNREQ_MW: begin
            unique case (ics)
              CS_CM, CS_DM: begin                                            // MC36, MC37

                if (hout_empty) begin
                  w_cs = CS_CW;
                  h0_v = 1'b1;
                  h0_m = (ics == CS_CM) ? mk(CMD_DOWN_MW,  site_id, im.a, 1'b0, '0)
                                        : mk(CMD_DOWNV_MW, site_id, im.a, 1'b1, iv);
                  in_done = 1'b1;
                end
              end
              CS_L_CM: begin w_cs = CS_L_CW_DMW; in_done = 1'b1; end         // MC45
              default: in_done = 1'b1;
            endcase
          end
          CMD_DOWNREQ_MB: begin
            unique case (ics)
              CS_CW, CS_DW, CS_CM, CS_DM: begin                              // MC48-MC51

                if (hout_empty) begin
                  h0_v = 1'b1;
                  unique case (ics)
                    CS_CW: begin w_cs = CS_CB; h0_m = mk(CMD_DOWN_WB,  site_id, im.a, 1'b0, '0); end
                    CS_DW: begin w_cs = CS_DB; h0_m = mk(CMD_DOWN_WB,  site_id, im.a, 1'b0, '0); end
                    CS_CM: begin w_cs = CS_CB; h0_m = mk(CMD_DOWN_MB,  site_id, im.a, 1'b0, '0); end
                    default: begin w_cs = CS_CB; h0_m = mk(CMD_DOWNV_MB, site_id, im.a, 1'b1, iv); end
                  endcase
                  in_done = 1'b1;
                end
              end
              CS_L_CW:     begin w_cs = CS_L_CB_DWB; in_done = 1'b1; end     // MC57
              CS_L_CW_DMW: begin w_cs = CS_L_CB_DMB; in_done = 1'b1; end     // MC58
              CS_L_CM:     begin w_cs = CS_L_CB_DMB; in_done = 1'b1; end     // MC59
              default: in_done = 1'b1;
            endcase
          end
          CMD_CACHEACK: begin
            if (ics == CS_CP || is_locked(ics)) begin                        // MC60-MC65

              if (hout_empty) begin
                rq_dec = 1'b1; tag_rm = 1'b1; tag_addr = im.a;
                h0_v = 1'b1;
                unique case (ics)
                  CS_CP: begin
                    w_cs = CS_CB; w_v = im.v;
                    h0_m = mk(CMD_ERFRTAG, site_id, im.a, 1'b0, '0);
                  end
                  CS_L_CB_DWB: begin
                    w_cs = CS_CB; ev[1] = 1'b1;
                    h0_m = mk(CMD_DOWN_WB, site_id, im.a, 1'b0, '0);
                    h1_v = 1'b1; h1_m = mk(CMD_ERFRTAG, site_id, im.a, 1'b0, '0);
                  end
                  CS_L_CB_DMB: begin
                    w_cs = CS_CB; ev[1] = 1'b1;
                    h0_m = mk(CMD_DOWN_MB, site_id, im.a, 1'b0, '0);
                    h1_v = 1'b1; h1_m = mk(CMD_ERFRTAG, site_id, im.a, 1'b0, '0);
                  end
                  CS_L_CW: begin
                    w_cs = CS_CW;
                    h0_m = mk(CMD_ERFRTAG, site_id, im.a, 1'b0, '0);
                  end
                  CS_L_CW_DMW: begin
                    w_cs = CS_CW; ev[1] = 1'b1;
                    h0_m = mk(CMD_DOWN_MW, site_id, im.a, 1'b0, '0);
                    h1_v = 1'b1; h1_m = mk(CMD_ERFRTAG, site_id, im.a, 1'b0, '0);
                  end
                  default: begin                                             // CS_L_CM
                    w_cs = CS_CM;
                    h0_m = mk(CMD_ERFRTAG, site_id, im.a, 1'b0, '0);
                  end
                endcase
                in_done = 1'b1;
              end
            end else in_done = 1'b1;
          end
          CMD_CACHENACK: begin                                               // MC66
            if (ics == CS_CP) begin
              l_v = 1'b1; l_m = mk(CMD_CACHEREQ, site_id, im.a, 1'b0, '0); ev[2] = 1'b1;
            end
            in_done = 1'b1;
          end
          CMD_WBNACK: begin                                                  // MC67
            if (ics == CS_WBP) begin
              l_v = 1'b1; l_m = mk(CMD_WB, site_id, im.a, 1'b1, iv); ev[2] = 1'b1;
            end
            in_done = 1'b1;
          end
          default: in_done = 1'b1;
        endcase
        if (in_done) begin
          in_pop = 1'b1;
          w_en   = 1'b1;
        end else begin
          // blocked on HOUT: discard the partial outcome
          w_cs = ics; w_v = iv;
        end
      end

      // ---------------- processor rules ----------------
      if (!in_done && pmb_valid) begin
        w_a = pmb_a; w_cs = pcs; w_v = pv;
        unique case (op_e'(pmb_op))
          OP_LOADL: begin
            if (pcs inside {CS_CB, CS_DB, CS_CW, CS_DW, CS_CM, CS_DM} || is_locked(pcs))
              retire = 1'b1;                                                 // P1-P6, P10-P14
            else if (pcs == CS_INV) miss = 1'b1;                             // P9, P9A
          end
          OP_STOREL: begin
            unique case (pcs)
              CS_CB, CS_DB: begin retire = 1'b1; w_cs = CS_DB; w_v = pmb_v; end  // P15, P16
              CS_CW, CS_DW: begin retire = 1'b1; w_cs = CS_DW; w_v = pmb_v; end  // P17, P18
              CS_CM, CS_DM: begin retire = 1'b1; w_cs = CS_DM; w_v = pmb_v; end  // P19, P20
              CS_INV: miss = 1'b1;                                                // P23, P23A
              default: ;                                                          // stall
            endcase
          end
          OP_COMMIT: begin
            unique case (pcs)
              CS_DB, CS_DW: begin                                            // P30, P32 (A)
                if (rq_ok) begin
                  w_cs = CS_WBP; l_v = 1'b1; l_m = mk(CMD_WB, site_id, pmb_a, 1'b1, pv);
                  rq_inc = 1'b1; tag_add = 1'b1; tag_addr = pmb_a; w_en = 1'b1;
                end else if (!rq_ok) ev[3] = 1'b1;
              end
              CS_WBP, CS_CP: ;                                               // P35, P36
              default: retire = 1'b1;                                        // P29, P31, P33, P34, P37-P42
            endcase
          end
          OP_RECONCILE: begin
            unique case (pcs)
              CS_CB: begin retire = 1'b1; w_cs = CS_INV; end                 // P43
              CS_WBP, CS_CP, CS_L_CB_DWB, CS_L_CB_DMB: ;                     // P49, P50, P52, P53
              default: retire = 1'b1;                                        // P44-P48, P51, P54-P56
            endcase
          end
          default: retire = 1'b1;                                            // fences
        endcase
        if (miss) begin
          if (rq_ok) begin
            w_cs = CS_CP; l_v = 1'b1; l_m = mk(CMD_CACHEREQ, site_id, pmb_a, 1'b0, '0);
            rq_inc = 1'b1; tag_add = 1'b1; tag_addr = pmb_a; w_en = 1'b1;
          end else ev[3] = 1'b1;
        end
        if (retire && !mpb_full) begin
          pmb_pop  = 1'b1;
          mpb_push = 1'b1;
          mpb_v    = (op_e'(pmb_op) == OP_LOADL) ? pv : '0;
          w_en     = 1'b1;
        end
        if (pmb_pop || w_en) in_done = 1'b1;  // the processor rule used this cycle
        else begin w_cs = pcs; w_v = pv; end
      end

      // ---------------- voluntary rules ----------------
      if (!in_done && vc_valid) begin
        vc_done = 1'b1;
        w_a = vc_a; w_cs = vcs; w_v = vv;
        unique case (vc_op_e'(vc_op))
          VC_PURGE: if (vcs == CS_CB) begin w_cs = CS_INV; vc_fired = 1'b1; end   // VC1
          VC_WB: if ((vcs == CS_DB || vcs == CS_DW) && rq_ok) begin             // VC2, VC5
            w_cs = CS_WBP; l_v = 1'b1; l_m = mk(CMD_WB, site_id, vc_a, 1'b1, vv);
            rq_inc = 1'b1; tag_add = 1'b1; tag_addr = vc_a; vc_fired = 1'b1;
          end
          VC_DOWN_WB: begin
            if ((vcs == CS_CW || vcs == CS_DW) && hout_empty) begin            // VC3, VC4
              w_cs = (vcs == CS_CW) ? CS_CB : CS_DB;
              h0_v = 1'b1; h0_m = mk(CMD_DOWN_WB, site_id, vc_a, 1'b0, '0); vc_fired = 1'b1;
            end else if (vcs == CS_L_CW) begin w_cs = CS_L_CB_DWB; vc_fired = 1'b1; end      // VC11
            else if (vcs == CS_L_CW_DMW) begin w_cs = CS_L_CB_DMB; vc_fired = 1'b1; end      // VC12
          end
          VC_DOWN_MW: begin
            if ((vcs == CS_CM || vcs == CS_DM) && hout_empty) begin            // VC6, VC8
              w_cs = CS_CW; h0_v = 1'b1; vc_fired = 1'b1;
              h0_m = (vcs == CS_CM) ? mk(CMD_DOWN_MW,  site_id, vc_a, 1'b0, '0)
                                    : mk(CMD_DOWNV_MW, site_id, vc_a, 1'b1, vv);
            end else if (vcs == CS_L_CM) begin w_cs = CS_L_CW_DMW; vc_fired = 1'b1; end      // VC13
          end
          VC_DOWN_MB: begin
            if ((vcs == CS_CM || vcs == CS_DM) && hout_empty) begin            // VC7, VC9
              w_cs = CS_CB; h0_v = 1'b1; vc_fired = 1'b1;
              h0_m = (vcs == CS_CM) ? mk(CMD_DOWN_MB,  site_id, vc_a, 1'b0, '0)
                                    : mk(CMD_DOWNV_MB, site_id, vc_a, 1'b1, vv);
            end else if (vcs == CS_L_CM) begin w_cs = CS_L_CB_DMB; vc_fired = 1'b1; end      // VC14
          end
          VC_CACHEREQ: if (vcs == CS_INV && rq_ok) begin                       // VC10
            w_cs = CS_CP; l_v = 1'b1; l_m = mk(CMD_CACHEREQ, site_id, vc_a, 1'b0, '0);
            rq_inc = 1'b1; tag_add = 1'b1; tag_addr = vc_a; vc_fired = 1'b1;
          end
          default: ;
        endcase
        w_en = vc_fired;
      end
    end
  end

  assign hout_push = h0_v;
  assign hout_msg  = h0_m;
  assign lout_push = l_v;
  assign lout_msg  = l_m;
  assign rqcnt      = rq_q;
  assign tags_valid = tv_q;
  assign tags_a     = ta_q;
  assign dbg_cs     = cs_q[dbg_a];
  assign dbg_v      = val_q[dbg_a];

  // first free tag slot and the slot holding tag_addr
  localparam int TX_W = (RQMAX > 1) ? $clog2(RQMAX) : 1;
  logic [TX_W-1:0] tfree, thit;
  always_comb begin
    tfree = '0;
    thit  = '0;
    for (int i = RQMAX - 1; i >= 0; i--) begin
      if (!tv_q[i]) tfree = TX_W'(i);
      if (tv_q[i] && ta_q[i] == tag_addr) thit = TX_W'(i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        cs_q[i]  <= CS_INV;
        val_q[i] <= '0;
      end
      rq_q       <= '0;
      tv_q       <= '0;
      ta_q       <= '0;
      pend_q     <= 1'b0;
      pend_msg_q <= '0;
    end else begin
      if (w_en) begin
        cs_q[w_a]  <= w_cs;
        val_q[w_a] <= w_v;
      end
      if (rq_inc && !rq_dec) rq_q <= rq_q + 1'b1;
      else if (rq_dec && !rq_inc && rq_q != 0) rq_q <= rq_q - 1'b1;
      if (tag_add) begin
        tv_q[tfree] <= 1'b1;
        ta_q[tfree] <= tag_addr;
      end else if (tag_rm) begin
        tv_q[thit] <= 1'b0;
      end
      pend_q     <= h1_v;
      pend_msg_q <= h1_m;
    end
  end

  // The request counter never exceeds its maximum.
  a_rqcnt_max: assert property (@(posedge clk) disable iff (!rst_n) rq_q <= RQ_W'(RQMAX))
    else $error("cache_engine: rqcnt above RQMAX");
  // High-priority messages are only sent into an empty HOUT (or as the
  // second half of a two-message rule).
  a_hout_empty: assert property (@(posedge clk) disable iff (!rst_n)
                                 (hout_push && !pend_q) |-> hout_empty)
    else $error("cache_engine: high-priority send with HOUT not empty");
endmodule

// memory_engine: memory array, memory states and the memory-side protocol
// rules of one memory unit (the "memory access unit" with its memory).
//
// Each memory line holds a state kind (Cw, Tw, Cm, Tm, T'm), a value and one
// site-id slot. For Cm, Tm and T'm the slot names the owner. For Cw and Tw it
// is one directory entry kept in line; further sharers live in the shared
// directory table (dir_table), each with a "DownReq sent" bit that splits a
// Tw directory into its first (sent) and second (not yet sent) part. Names of
// suspended writers live in the shared GM table (gm_buffer); the written
// value goes into the memory line at once. FR and FRTAG are in fr_unit.
//
// Each cycle one rule source is served:
//   1. HIN head: responses (Down*, DownV*, ErFRTag) are always sunk (HM1-HM18).
//   2. A line marked in the service vector (any line that entered Tw): send
//      the next DownReq_wb from the second directory (DM1), release one
//      suspended writer with WbAck_b (GM1) or return to Cw (GM2).
//   3. FR or LIN head, alternating when both wait (FRC/FRW and CHA/CHB/WBA/
//      WBB/WBC rules). A request the table has no rule for stays where it is.
//   4. A voluntary rule requested on vm_* (VM1-VM7), only with LIN empty.
// Sources 2-4 need at least two free slots in OUT. A rule that emits two
// messages puts the second in a one-entry holding register that is sent in
// the next cycle, before any other message. A request that must wait goes to
// STQ (stall) or, with STQ full, gets CacheNack/WbNack (Stall-or-Nack).
//
// Rules and their conditions follow the protocol's memory engine tables. Own
// choices: the in-line directory slot, the service vector that finds Tw
// lines, one rule per cycle in the order above, FR/LIN alternation, lowest
// id first for DM1 and for GM1, and a Wb that finds Tw with empty
// directories and space in GM waits in LIN (the tables give no rule).
//
// Reset (rst_n) is asynchronous and active low. The assertions at the end also
// use rst_n in 'disable iff'; that is why lint reports rst_n as both an
// asynchronous reset and a synchronously sampled signal. It is intended.
module memory_engine
  import bcachet_pkg::*;
#(
  parameter int P        = 256,
  parameter int N        = 16,
  parameter int V_W      = 32,
  parameter int DIR_SIZE = 8,
  parameter int GM_SIZE  = 1,
  parameter int OUT_SIZE = 2,
  localparam int ID_W    = (P > 1) ? $clog2(P) : 1,
  localparam int A_W     = (N > 1) ? $clog2(N) : 1,
  localparam int MSG_W   = 5 + ID_W + A_W + 1 + V_W,
  localparam int OF_W    = $clog2(OUT_SIZE + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  // high-priority incoming queue head
  input  logic                hin_valid,
  input  logic [MSG_W-1:0]    hin_msg,
  output logic                hin_pop,
  // low-priority incoming queue head
  input  logic                lin_valid,
  input  logic [MSG_W-1:0]    lin_msg,
  output logic                lin_pop,
  // stalled message queue (push side)
  input  logic                stq_full,
  output logic                stq_push,
  output logic [MSG_W-1:0]    stq_msg,
  // outgoing queue
  input  logic [OF_W-1:0]     out_free,
  output logic                out_push,
  output logic [MSG_W-1:0]    out_msg,
  // FRTAG candidate from the caches' request tags
  input  logic                cand_valid,
  input  logic [ID_W-1:0]     cand_id,
  input  logic [A_W-1:0]      cand_a,
  output logic                cand_take,
  // voluntary rule request
  input  logic                vm_valid,
  input  logic [2:0]          vm_op,
  input  logic [A_W-1:0]      vm_a,
  input  logic [ID_W-1:0]     vm_id,
  output logic                vm_done,
  output logic                vm_fired,
  // observation
  input  logic [A_W-1:0]      dbg_a,
  output logic [2:0]          dbg_kind,
  output logic [V_W-1:0]      dbg_v,
  output logic                dbg_own_v,
  output logic [ID_W-1:0]     dbg_own,
  output logic                frtag_valid,
  output logic                fr_busy,
  output logic [NUM_MEV-1:0]  ev
);
  typedef struct packed {
    cmd_e            cmd;
    logic [ID_W-1:0] site;
    logic [A_W-1:0]  a;
    logic            hasv;
    logic [V_W-1:0]  v;
  } msg_t;

  typedef struct packed {
    mkind_e          k;
    logic            own_v;
    logic            own_sent;
    logic [ID_W-1:0] own;
    logic [V_W-1:0]  v;
  } mline_t;

  typedef enum logic [2:0] {SRC_NONE, SRC_HIN, SRC_SCAN, SRC_FR, SRC_LIN, SRC_VOL} src_e;

  mline_t      mem_q [N];
  logic [N-1:0] svc_q;
  logic        pend_q;
  msg_t        pend_msg_q;
  logic        fr_turn_q;

  // ---------------- FR / FRTAG ----------------
  logic            tag_v;
  logic [ID_W-1:0] tag_id;
  logic [A_W-1:0]  tag_a;
  logic            fr_v;
  logic [MSG_W-1:0] fr_raw;
  logic            er_v, tag_clr, fr_ld, fr_clr;
  logic [ID_W-1:0] er_id;
  logic [A_W-1:0]  er_a;

  fr_unit #(.P(P), .N(N), .MSG_W(MSG_W)) u_fr (
    .clk, .rst_n,
    .cand_valid, .cand_id, .cand_a, .cand_take,
    .tag_valid(tag_v), .tag_id, .tag_a,
    .erase_valid(er_v), .erase_id(er_id), .erase_a(er_a), .tag_clear(tag_clr),
    .fr_valid(fr_v), .fr_msg(fr_raw),
    .fr_load(fr_ld), .fr_load_msg(lin_msg), .fr_clear(fr_clr)
  );

  // ---------------- source selection ----------------
  logic sp_ok;
  src_e src;
  logic [A_W-1:0] scan_a;
  assign sp_ok = (out_free >= OF_W'(2)) && !pend_q;

  always_comb begin
    scan_a = '0;
    for (int i = N - 1; i >= 0; i--) if (svc_q[i]) scan_a = A_W'(i);
  end

  always_comb begin
    src = SRC_NONE;
    if (hin_valid) src = SRC_HIN;
    else if (sp_ok) begin
      if (|svc_q) src = SRC_SCAN;
      else if (fr_v && lin_valid) src = fr_turn_q ? SRC_FR : SRC_LIN;
      else if (fr_v) src = SRC_FR;
      else if (lin_valid) src = SRC_LIN;
      else if (vm_valid) src = SRC_VOL;
    end
  end

  msg_t hm, lm, fm, m;
  assign hm = msg_t'(hin_msg);
  assign lm = msg_t'(lin_msg);
  assign fm = msg_t'(fr_raw);

  logic [A_W-1:0] ea;
  always_comb begin
    unique case (src)
      SRC_HIN:  begin ea = hm.a;   m = hm; end
      SRC_SCAN: begin ea = scan_a; m = '0; end
      SRC_FR:   begin ea = fm.a;   m = fm; end
      SRC_LIN:  begin ea = lm.a;   m = lm; end
      SRC_VOL:  begin ea = vm_a;   m = '0; end
      default:  begin ea = '0;     m = '0; end
    endcase
  end

  // ---------------- line, directory and GM view of address ea ----------------
  mline_t ln;
  logic [P-1:0] tdir1, tdir2, dir1, dir2, dirall, own_mask;
  logic dir_full, gm_any, gm_full, isw;
  logic [ID_W-1:0] gm_id;
  assign ln  = mem_q[ea];
  assign isw = (ln.k == MS_CW) || (ln.k == MS_TW);

  always_comb begin
    own_mask = '0;
    own_mask[ln.own] = 1'b1;
    dir1   = tdir1 | ((isw && ln.own_v &&  ln.own_sent) ? own_mask : '0);
    dir2   = tdir2 | ((isw && ln.own_v && !ln.own_sent) ? own_mask : '0);
    dirall = dir1 | dir2;
  end

  // rule outcome
  mline_t n;
  logic   wr;
  logic   d_add, d_rm, d_mark, d_sent;
  logic [ID_W-1:0] d_id;
  logic   g_add, g_rm;
  logic [ID_W-1:0] g_id;
  logic   o0_v, o1_v;
  msg_t   o0, o1;
  logic   son;
  logic   svc_clr;
  logic   tbl_v;
  logic [1:0] tbl_kind;
  logic   set_turn;
  logic   served, consumed, accept;
  msg_t   nk;

  function automatic msg_t mk(cmd_e c, logic [ID_W-1:0] s, logic [A_W-1:0] a,
                              logic hv, logic [V_W-1:0] v);
    msg_t r;
    r.cmd = c; r.site = s; r.a = a; r.hasv = hv; r.v = v;
    return r;
  endfunction

  function automatic logic [ID_W-1:0] lowest(logic [P-1:0] mask);
    logic [ID_W-1:0] r;
    r = '0;
    for (int i = P - 1; i >= 0; i--) if (mask[i]) r = ID_W'(i);
    return r;
  endfunction

  logic [ID_W-1:0] id;
  logic in_dir, own_is_id;
  assign id        = m.site;
  assign in_dir    = dirall[id];
  assign own_is_id = ln.own_v && (ln.own == id);

  always_comb begin
    n = ln; wr = 1'b0;
    d_add = 1'b0; d_rm = 1'b0; d_mark = 1'b0; d_sent = 1'b0; d_id = '0;
    g_add = 1'b0; g_rm = 1'b0; g_id = '0;
    o0_v = 1'b0; o1_v = 1'b0; o0 = '0; o1 = '0;
    son = 1'b0; svc_clr = 1'b0;
    hin_pop = 1'b0; lin_pop = 1'b0;
    fr_ld = 1'b0; fr_clr = 1'b0; tag_clr = 1'b0;
    er_v = 1'b0; er_id = id; er_a = ea;
    stq_push = 1'b0; stq_msg = m;
    vm_done = 1'b0; vm_fired = 1'b0;
    set_turn = 1'b0;
    ev = '0;
    served = 1'b0; consumed = 1'b0; accept = 1'b0; nk = '0;
    tbl_v = 1'b0; tbl_kind = 2'd0;

    unique case (src)
      // ======================= HIN: HM1-HM18 =======================
      SRC_HIN: begin
        hin_pop = 1'b1;
        unique case (m.cmd)
          CMD_DOWN_WB: begin
            if (isw && in_dir) begin d_rm = 1'b1; d_id = id; wr = 1'b1; end   // HM1, HM2A/B
            else if (own_is_id && ln.k == MS_CM)  begin n.k = MS_CW; n.own_v = 1'b0; wr = 1'b1; end // HM3
            else if (own_is_id && ln.k == MS_TPM) begin n.k = MS_CW; n.own_v = 1'b0; wr = 1'b1; end // HM4
            else if (own_is_id && ln.k == MS_TM)  begin n.k = MS_TW; n.own_v = 1'b0; wr = 1'b1; end // HM5
          end
          CMD_DOWN_MW, CMD_DOWNV_MW: begin
            if (own_is_id && (ln.k == MS_CM || ln.k == MS_TPM)) begin         // HM6, HM7, HM9, HM10
              n.k = MS_CW; n.own_sent = 1'b0; wr = 1'b1;
              if (m.cmd == CMD_DOWNV_MW) n.v = m.v;
            end else if (own_is_id && ln.k == MS_TM) begin                     // HM8, HM11A/B
              n.k = MS_TW; n.own_sent = 1'b1; wr = 1'b1;
              if (m.cmd == CMD_DOWNV_MW && !gm_any) n.v = m.v;
            end
          end
          CMD_DOWN_MB, CMD_DOWNV_MB: begin
            if (own_is_id && (ln.k == MS_CM || ln.k == MS_TPM)) begin         // HM12, HM13, HM15, HM16
              n.k = MS_CW; n.own_v = 1'b0; wr = 1'b1;
              if (m.cmd == CMD_DOWNV_MB) n.v = m.v;
            end else if (own_is_id && ln.k == MS_TM) begin                     // HM14, HM17A/B
              n.k = MS_TW; n.own_v = 1'b0; wr = 1'b1;
              if (m.cmd == CMD_DOWNV_MB && !gm_any) n.v = m.v;
            end
          end
          CMD_ERFRTAG: er_v = 1'b1;                                            // HM18
          default: ;
        endcase
      end

      // ======================= Tw service: DM1, GM1, GM2 =======================
      SRC_SCAN: begin
        if (ln.k != MS_TW) svc_clr = 1'b1;
        else if (dirall == '0) begin
          if (gm_any) begin                                                    // GM1
            o0_v = 1'b1; o0 = mk(CMD_WBACK_B, gm_id, ea, 1'b0, '0);
            g_rm = 1'b1; g_id = gm_id;
            er_v = 1'b1; er_id = gm_id;
            ev[MEV_WBACK] = 1'b1;
          end else begin                                                       // GM2
            n.k = MS_CW; n.own_v = 1'b0; wr = 1'b1; svc_clr = 1'b1;
          end
        end else if (dir2 != '0) begin                                         // DM1
          o0_v = 1'b1; o0 = mk(CMD_DOWNREQ_WB, lowest(dir2), ea, 1'b0, '0);
          d_mark = 1'b1; d_id = lowest(dir2); wr = 1'b1;
          ev[MEV_DOWNREQ] = 1'b1;
        end else svc_clr = 1'b1;
      end

      // ======================= FR and LIN =======================
      SRC_FR, SRC_LIN: begin
        if (fr_v && lin_valid) set_turn = 1'b1;
        if (src == SRC_LIN && tag_v && tag_id == id && tag_a == ea && !fr_v &&
            (m.cmd == CMD_CACHEREQ || m.cmd == CMD_WB)) begin                 // CHB1, WBC1
          fr_ld = 1'b1; tag_clr = 1'b1; lin_pop = 1'b1;
          ev[MEV_FR_LOAD] = 1'b1;
        end else if (m.cmd == CMD_CACHEREQ) begin
          if (ln.k == MS_CW && !in_dir) begin                                  // CHA1, FRC1
            o0_v = 1'b1; o0 = mk(CMD_CACHEACK, id, ea, 1'b1, ln.v); served = 1'b1;
            ev[MEV_CACHEACK_V] = 1'b1;
          end else if (isw && in_dir) begin                                    // CHA3, CHA4, FRC2, FRC3
            o0_v = 1'b1; o0 = mk(CMD_CACHEACK, id, ea, 1'b0, '0); served = 1'b1;
            ev[MEV_CACHEACK_D] = 1'b1;
          end else if (own_is_id && !isw) begin                                // CHA8-10, FRC4-6
            o0_v = 1'b1; o0 = mk(CMD_CACHEACK, id, ea, 1'b0, '0); served = 1'b1;
            ev[MEV_CACHEACK_D] = 1'b1;
          end else if (ln.k == MS_CM) begin                                    // CHA5, FRC7
            o0_v = 1'b1; o0 = mk(CMD_DOWNREQ_MW, ln.own, ea, 1'b0, '0);
            n.k = MS_TPM; wr = 1'b1; ev[MEV_DOWNREQ] = 1'b1;
            if (src == SRC_LIN) begin son = 1'b1; consumed = 1'b1; end
          end else if (src == SRC_LIN) begin                                   // CHA2, CHA6, CHA7
            son = 1'b1; consumed = 1'b1;
          end
          if (served) begin
            er_v = 1'b1; ev[MEV_ERFRTAG] = tag_v && tag_id == id && tag_a == ea;
            if (src == SRC_FR) begin fr_clr = 1'b1; ev[MEV_FR_SERVE] = 1'b1; end
            else lin_pop = 1'b1;
          end
          if (consumed) lin_pop = 1'b1;
        end else if (m.cmd == CMD_WB) begin
          if (!gm_full) begin
            // WBA1-WBA10, FRW1-FRW10: value stored now, writer suspended in GM
            if (ln.k == MS_CW) begin
              accept = 1'b1; n.k = MS_TW;
              if (in_dir) begin d_rm = 1'b1; d_id = id; end                    // WBA3 / WBA1
            end else if (ln.k == MS_TW && in_dir) begin                        // WBA4A/B
              accept = 1'b1; d_rm = 1'b1; d_id = id;
            end else if (ln.k == MS_TW && dirall != '0) begin                  // WBA2
              accept = 1'b1;
            end else if (!isw && own_is_id) begin                              // WBA8-10
              accept = 1'b1; n.k = MS_TW; n.own_v = 1'b0;
            end else if (ln.k == MS_CM) begin                                  // WBA5
              accept = 1'b1; n.k = MS_TM;
              o0_v = 1'b1; o0 = mk(CMD_DOWNREQ_MB, ln.own, ea, 1'b0, '0); ev[MEV_DOWNREQ] = 1'b1;
            end else if (ln.k == MS_TPM) begin                                 // WBA6
              accept = 1'b1; n.k = MS_TM;
              o0_v = 1'b1; o0 = mk(CMD_DOWNREQ_WB, ln.own, ea, 1'b0, '0); ev[MEV_DOWNREQ] = 1'b1;
            end else if (ln.k == MS_TM) begin                                  // WBA7
              accept = 1'b1;
            end
            if (accept) begin
              n.v = m.v; wr = 1'b1;
              g_add = 1'b1; g_id = id;
              ev[MEV_GM_SUSPEND] = 1'b1;
              if (src == SRC_FR) begin
                fr_clr = 1'b1; er_v = 1'b1; ev[MEV_FR_SERVE] = 1'b1;
              end else lin_pop = 1'b1;
            end
          end else if (src == SRC_FR) begin
            // FRW11: Erase-id action (WEr1-WEr6), the Wb stays in FR
            if (ln.k == MS_CW && in_dir) begin n.k = MS_TW; d_rm = 1'b1; d_id = id; wr = 1'b1; end
            else if (ln.k == MS_TW && in_dir) begin d_rm = 1'b1; d_id = id; wr = 1'b1; end
            else if (!isw && own_is_id) begin n.k = MS_TW; n.own_v = 1'b0; wr = 1'b1; end
          end else begin
            // WBB1-WBB10: GM full
            if (ln.k == MS_CW && in_dir) begin                                 // WBB3
              n.k = MS_TW; d_rm = 1'b1; d_id = id; wr = 1'b1; consumed = 1'b1;
            end else if (ln.k == MS_CW && dirall != '0) begin                  // WBB1
              n.k = MS_TW; d_mark = 1'b1; d_id = lowest(dirall); wr = 1'b1; consumed = 1'b1;
              o0_v = 1'b1; o0 = mk(CMD_DOWNREQ_WB, lowest(dirall), ea, 1'b0, '0);
              ev[MEV_DOWNREQ] = 1'b1;
            end else if (ln.k == MS_TW) begin                                  // WBB2, WBB4A/B
              if (in_dir) begin d_rm = 1'b1; d_id = id; wr = 1'b1; end
              consumed = 1'b1;
            end else if (!isw && own_is_id) begin                              // WBB8-10
              n.k = MS_TW; n.own_v = 1'b0; wr = 1'b1; consumed = 1'b1;
            end else if (ln.k == MS_CM) begin                                  // WBB5
              n.k = MS_TM; wr = 1'b1; consumed = 1'b1;
              o0_v = 1'b1; o0 = mk(CMD_DOWNREQ_MB, ln.own, ea, 1'b0, '0); ev[MEV_DOWNREQ] = 1'b1;
            end else if (ln.k == MS_TPM) begin                                 // WBB6
              n.k = MS_TM; wr = 1'b1; consumed = 1'b1;
              o0_v = 1'b1; o0 = mk(CMD_DOWNREQ_WB, ln.own, ea, 1'b0, '0); ev[MEV_DOWNREQ] = 1'b1;
            end else if (ln.k == MS_TM) begin                                  // WBB7
              consumed = 1'b1;
            end
            if (consumed) begin son = 1'b1; lin_pop = 1'b1; end
          end
        end else if (src == SRC_LIN) begin
          lin_pop = 1'b1;  // not a request: discard
        end
      end

      // ======================= voluntary: VM1-VM7 =======================
      SRC_VOL: begin
        vm_done = 1'b1;
        unique case (vm_op_e'(vm_op))
          VM_CACHE_W: if (ln.k == MS_CW && !dirall[vm_id] && (!ln.own_v || !dir_full)) begin  // VM1
            o0_v = 1'b1; o0 = mk(CMD_CACHE_W, vm_id, ea, 1'b1, ln.v);
            d_add = 1'b1; d_id = vm_id; d_sent = 1'b0; wr = 1'b1; vm_fired = 1'b1;
          end
          VM_UP_WM: if (ln.k == MS_CW && dirall == (P'(1) << vm_id)) begin                   // VM2
            o0_v = 1'b1; o0 = mk(CMD_UP_WM, vm_id, ea, 1'b0, '0);
            d_rm = 1'b1; d_id = vm_id;
            n.k = MS_CM; n.own = vm_id; n.own_v = 1'b1; n.own_sent = 1'b0; wr = 1'b1; vm_fired = 1'b1;
          end
          VM_CACHE_M: if (ln.k == MS_CW && dirall == '0) begin                                // VM3
            o0_v = 1'b1; o0 = mk(CMD_CACHE_M, vm_id, ea, 1'b1, ln.v);
            n.k = MS_CM; n.own = vm_id; n.own_v = 1'b1; n.own_sent = 1'b0; wr = 1'b1; vm_fired = 1'b1;
          end
          VM_DOWNREQ_WB: if (ln.k == MS_CW && dirall[vm_id]) begin                           // VM4
            o0_v = 1'b1; o0 = mk(CMD_DOWNREQ_WB, vm_id, ea, 1'b0, '0);
            n.k = MS_TW; d_mark = 1'b1; d_id = vm_id; wr = 1'b1; vm_fired = 1'b1;
          end
          VM_DOWNREQ_MW: if (ln.k == MS_CM) begin                                             // VM5
            o0_v = 1'b1; o0 = mk(CMD_DOWNREQ_MW, ln.own, ea, 1'b0, '0);
            n.k = MS_TPM; wr = 1'b1; vm_fired = 1'b1;
          end
          VM_DOWNREQ_MB: if (ln.k == MS_CM) begin                                             // VM6
            o0_v = 1'b1; o0 = mk(CMD_DOWNREQ_MB, ln.own, ea, 1'b0, '0);
            n.k = MS_TM; wr = 1'b1; vm_fired = 1'b1;
          end
          VM_TPM_WB: if (ln.k == MS_TPM) begin                                                // VM7
            o0_v = 1'b1; o0 = mk(CMD_DOWNREQ_WB, ln.own, ea, 1'b0, '0);
            n.k = MS_TM; wr = 1'b1; vm_fired = 1'b1;
          end
          default: ;
        endcase
        ev[MEV_VOLUNTARY] = vm_fired;
        if (vm_fired && vm_op_e'(vm_op) inside {VM_DOWNREQ_WB, VM_DOWNREQ_MW, VM_DOWNREQ_MB, VM_TPM_WB})
          ev[MEV_DOWNREQ] = 1'b1;
      end
      default: ;
    endcase

    // Stall-or-Nack (SNM1-SNM4)
    if (son) begin
      if (!stq_full) begin
        stq_push = 1'b1;
        ev[MEV_STQ_PUSH] = 1'b1;
      end else begin
        nk = mk((m.cmd == CMD_WB) ? CMD_WBNACK : CMD_CACHENACK, id, ea, 1'b0, '0);
        if (m.cmd == CMD_WB) ev[MEV_WBNACK] = 1'b1; else ev[MEV_CACHENACK] = 1'b1;
        if (o0_v) begin o1_v = 1'b1; o1 = nk; end
        else      begin o0_v = 1'b1; o0 = nk; end
      end
    end

    // directory update: in-line slot first, shared table otherwise
    if (d_add) begin
      if (!ln.own_v) begin n.own = d_id; n.own_v = 1'b1; n.own_sent = d_sent; end
      else begin tbl_v = 1'b1; tbl_kind = 2'd0; end
    end else if (d_rm) begin
      if (ln.own_v && ln.own == d_id && isw) begin
        if (n.k == MS_CW || n.k == MS_TW) n.own_v = 1'b0;
      end else begin tbl_v = 1'b1; tbl_kind = 2'd1; end
    end else if (d_mark) begin
      if (ln.own_v && ln.own == d_id && isw) n.own_sent = 1'b1;
      else begin tbl_v = 1'b1; tbl_kind = 2'd2; end
    end
  end

  dir_table #(.P(P), .N(N), .DIR_SIZE(DIR_SIZE)) u_dir (
    .clk, .rst_n,
    .lk_a(ea), .lk_dir1(tdir1), .lk_dir2(tdir2), .full(dir_full),
    .op_valid(tbl_v), .op_kind(tbl_kind), .op_a(ea), .op_id(d_id), .op_sent(d_sent)
  );

  gm_buffer #(.P(P), .N(N), .GM_SIZE(GM_SIZE)) u_gm (
    .clk, .rst_n,
    .lk_a(ea), .lk_any(gm_any), .lk_id(gm_id), .full(gm_full),
    .op_valid(g_add || g_rm), .op_add(g_add), .op_a(ea), .op_id(g_id)
  );

  assign out_push = pend_q || o0_v;
  assign out_msg  = pend_q ? pend_msg_q : o0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) mem_q[i] <= '{k: MS_CW, own_v: 1'b0, own_sent: 1'b0, own: '0, v: '0};
      svc_q      <= '0;
      pend_q     <= 1'b0;
      pend_msg_q <= '0;
      fr_turn_q  <= 1'b0;
    end else begin
      if (wr) mem_q[ea] <= n;
      if (wr && n.k == MS_TW) svc_q[ea] <= 1'b1;
      else if (svc_clr)       svc_q[ea] <= 1'b0;
      // o0 cannot be valid while pend_q is set (sp_ok is low), so o1 only
      // ever follows an o0 sent this cycle
      pend_q     <= o1_v;
      pend_msg_q <= o1;
      if (set_turn) fr_turn_q <= ~fr_turn_q;
    end
  end

  assign dbg_kind    = mem_q[dbg_a].k;
  assign dbg_v       = mem_q[dbg_a].v;
  assign dbg_own_v   = mem_q[dbg_a].own_v;
  assign dbg_own     = mem_q[dbg_a].own;
  assign frtag_valid = tag_v;
  assign fr_busy     = fr_v;

  a_one_out: assert property (@(posedge clk) disable iff (!rst_n) !(pend_q && o0_v))
    else $error("memory_engine: two messages for one OUT write port");
  a_out_room: assert property (@(posedge clk) disable iff (!rst_n) o1_v |-> out_free >= OF_W'(2))
    else $error("memory_engine: two messages without room in OUT");
endmodule

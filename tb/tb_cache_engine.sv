// tb_cache_engine: directed test of the cache engine of site 2 in a system
// of 4 sites and 4 addresses with rqmax 2. The test plays the memory: it
// offers processor instructions on the PMB port and protocol messages on
// the IN port, and checks the requests, responses, processor results,
// states, request counter and event pulses the engine produces.
// Covered: Loadl miss and CacheAck with value; Storel, Commit, Wb and
// WbAck_b with its ErFRTag; Cache_w overtaking the CacheAck (locked state),
// a DownReq_wb held in the locked state and released with the CacheAck as
// Down_wb followed by ErFRTag; CacheNack and the re-sent CacheReq; the
// rqcnt limit; DownReq_mw on Cm; voluntary purge.
// Inputs change on the falling edge; outputs are sampled just before the
// rising edge at which they take effect.
module tb_cache_engine;
  import bcachet_pkg::*;
  localparam int P = 4, N = 4, V_W = 32, RQMAX = 2, TAG_W = 4;
  localparam int ID_W = 2, A_W = 2, MSG_W = 5 + ID_W + A_W + 1 + V_W;

  typedef struct packed {
    cmd_e            cmd;
    logic [ID_W-1:0] site;
    logic [A_W-1:0]  a;
    logic            hasv;
    logic [V_W-1:0]  v;
  } msg_t;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [ID_W-1:0] site_id = 2'd2;
  logic pmb_valid = 1'b0, pmb_pop, mpb_full = 1'b0, mpb_push;
  logic [2:0] pmb_op = '0;
  logic [TAG_W-1:0] pmb_tag = '0, mpb_tag;
  logic [A_W-1:0] pmb_a = '0, vc_a = '0, dbg_a = '0;
  logic [V_W-1:0] pmb_v = '0, mpb_v, dbg_v;
  logic in_valid = 1'b0, in_pop, hout_empty = 1'b1, hout_push, lout_full = 1'b0, lout_push;
  logic [MSG_W-1:0] in_msg = '0, hout_msg, lout_msg;
  logic [1:0] rqcnt;
  logic [RQMAX-1:0] tags_valid;
  logic [RQMAX-1:0][A_W-1:0] tags_a;
  logic vc_valid = 1'b0, vc_done, vc_fired;
  logic [2:0] vc_op = '0;
  logic [3:0] dbg_cs, ev;

  cache_engine #(.P(P), .N(N), .V_W(V_W), .RQMAX(RQMAX), .TAG_W(TAG_W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // outputs seen in the last step
  bit s_h, s_l, s_m, s_pop, s_inpop;
  msg_t s_hm, s_lm;
  logic [V_W-1:0] s_mv;
  logic [3:0] s_ev;
  int ev_seen [4];

  task automatic step();
    #1;
    s_h = hout_push; s_hm = msg_t'(hout_msg);
    s_l = lout_push; s_lm = msg_t'(lout_msg);
    s_m = mpb_push;  s_mv = mpb_v; s_pop = pmb_pop; s_inpop = in_pop; s_ev = ev;
    for (int i = 0; i < 4; i++) if (ev[i]) ev_seen[i]++;
    @(posedge clk);
    @(negedge clk);
  endtask

  task automatic deliver(cmd_e c, logic [A_W-1:0] a, logic hv, logic [V_W-1:0] v);
    msg_t m;
    m.cmd = c; m.site = site_id; m.a = a; m.hasv = hv; m.v = v;
    in_valid = 1'b1; in_msg = m;
    step();
    check(s_inpop, $sformatf("%s consumed", c.name()));
    in_valid = 1'b0;
  endtask

  task automatic instr(op_e op, logic [A_W-1:0] a, logic [V_W-1:0] v);
    pmb_valid = 1'b1; pmb_op = op; pmb_a = a; pmb_v = v; pmb_tag = 4'(op);
    step();
    pmb_valid = 1'b0;
  endtask

  function automatic logic [3:0] state(logic [A_W-1:0] a);
    return dut.cs_q[a];
  endfunction

  initial begin : watchdog
    #100_000;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) ev_seen[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // Loadl miss: CacheReq, rqcnt 1, tag set, state CP, not retired
    instr(OP_LOADL, 2'd1, '0);
    check(s_l && s_lm.cmd == CMD_CACHEREQ && s_lm.a == 2'd1 && s_lm.site == 2'd2, "Loadl miss sends CacheReq");
    check(!s_pop, "Loadl miss does not retire");
    check(rqcnt == 2'd1 && tags_valid != '0, "request counted and tagged");
    check(state(2'd1) == 4'(CS_CP), "line in CP");
    // CacheAck with value: Cb, ErFRTag, counter back to 0
    pmb_valid = 1'b0;
    deliver(CMD_CACHEACK, 2'd1, 1'b1, 32'h55);
    check(s_h && s_hm.cmd == CMD_ERFRTAG, "CacheAck answered with ErFRTag");
    check(state(2'd1) == 4'(CS_CB) && rqcnt == 2'd0 && tags_valid == '0, "line Cb, request closed");
    instr(OP_LOADL, 2'd1, '0);
    check(s_pop && s_m && s_mv == 32'h55, "Loadl hit returns 0x55");

    // Storel, Commit: Wb then WbAck_b
    instr(OP_STOREL, 2'd1, 32'h77);
    check(s_pop && state(2'd1) == 4'(CS_DB), "Storel makes the line dirty");
    instr(OP_COMMIT, 2'd1, '0);
    check(s_l && s_lm.cmd == CMD_WB && s_lm.v == 32'h77 && !s_pop, "Commit sends Wb with the value");
    check(state(2'd1) == 4'(CS_WBP), "line in WbPending");
    deliver(CMD_WBACK_B, 2'd1, 1'b0, '0);
    check(s_h && s_hm.cmd == CMD_ERFRTAG && state(2'd1) == 4'(CS_CB), "WbAck_b: Cb and ErFRTag");
    instr(OP_COMMIT, 2'd1, '0);
    check(s_pop, "Commit on clean line retires");

    // locked state: Cache_w overtakes the CacheAck, DownReq_wb held
    instr(OP_LOADL, 2'd2, '0);
    check(s_l && s_lm.cmd == CMD_CACHEREQ, "second miss sends CacheReq");
    deliver(CMD_CACHE_W, 2'd2, 1'b1, 32'h11);
    check(state(2'd2) == 4'(CS_L_CW) && s_ev[0], "Cache_w on CP locks the line");
    deliver(CMD_DOWNREQ_WB, 2'd2, 1'b0, '0);
    check(!s_h && state(2'd2) == 4'(CS_L_CB_DWB), "DownReq_wb held in locked state");
    deliver(CMD_CACHEACK, 2'd2, 1'b0, '0);
    check(s_h && s_hm.cmd == CMD_DOWN_WB && s_ev[1], "CacheAck releases Down_wb");
    step();
    check(s_h && s_hm.cmd == CMD_ERFRTAG, "then ErFRTag");
    check(state(2'd2) == 4'(CS_CB), "line Cb after release");
    instr(OP_LOADL, 2'd2, '0);
    check(s_m && s_mv == 32'h11, "Loadl returns the pushed value");

    // CacheNack: request re-sent
    instr(OP_LOADL, 2'd3, '0);
    deliver(CMD_CACHENACK, 2'd3, 1'b0, '0);
    check(s_l && s_lm.cmd == CMD_CACHEREQ && s_ev[2], "CacheNack re-sends CacheReq");
    check(rqcnt == 2'd1, "re-send keeps one request");

    // rqcnt limit: second request by voluntary CacheReq, third blocked
    vc_valid = 1'b1; vc_op = VC_CACHEREQ; vc_a = 2'd0;
    step();
    vc_valid = 1'b0;
    check(s_l && rqcnt == 2'd2, "voluntary CacheReq fills rqmax");
    instr(OP_STOREL, 2'd2, 32'h99);   // dirty line 2
    instr(OP_COMMIT, 2'd2, '0);
    check(!s_l && !s_pop && s_ev[3], "Commit blocked at rqmax");
    deliver(CMD_CACHEACK, 2'd3, 1'b1, 32'h33);
    deliver(CMD_CACHEACK, 2'd0, 1'b1, 32'h44);
    check(rqcnt == 2'd0, "both requests closed");
    pmb_valid = 1'b1;
    step();
    pmb_valid = 1'b0;
    check(s_l && s_lm.cmd == CMD_WB && s_lm.v == 32'h99, "Commit proceeds once below rqmax");

    // Cm line: DownReq_mw answered with Down_mw
    deliver(CMD_CACHE_M, 2'd0, 1'b1, 32'h44);
    check(state(2'd0) == 4'(CS_CM), "Cache_m on Cb gives Cm");
    deliver(CMD_DOWNREQ_MW, 2'd0, 1'b0, '0);
    check(s_h && s_hm.cmd == CMD_DOWN_MW && state(2'd0) == 4'(CS_CW), "DownReq_mw on Cm: Down_mw, Cw");
    dbg_a = 2'd0;
    #1;
    check(dbg_cs == 4'(CS_CW) && dbg_v == 32'h44, "debug port shows Cw and value");

    // voluntary purge of a clean line
    vc_valid = 1'b1; vc_op = VC_PURGE; vc_a = 2'd3;
    #1;
    check(vc_done && vc_fired, "purge of Cb applies");
    step();
    vc_valid = 1'b0;
    check(state(2'd3) == 4'(CS_INV), "purged line invalid");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

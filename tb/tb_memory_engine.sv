// tb_memory_engine: directed test of the memory engine with 4 sites,
// 4 addresses, a 2-entry directory table and one GM entry. The test plays
// the network: it offers messages as the heads of HIN and LIN, drains OUT
// at once (OUT always has two free slots), accepts STQ pushes unless told
// STQ is full, and checks messages, memory states and values.
// Covered: CacheReq in Cw (CacheAck with value / without value), voluntary
// Cache_w and Cache_m, Wb at Cw with a sharer (value stored, writer
// suspended in GM, DownReq_wb to the sharer, Down_wb, WbAck_b, back to Cw),
// a second Wb with GM full (stalled into STQ, or WbNack with STQ full),
// CacheReq at Cm (DownReq_mw, request stalled, Down_mw, Cw), and the FR
// path (candidate into FRTAG, request moved into FR and served from it).
// Inputs change on the falling edge; outputs are sampled before the rising
// edge.
module tb_memory_engine;
  import bcachet_pkg::*;
  localparam int P = 4, N = 4, V_W = 32, DIR_SIZE = 2, GM_SIZE = 1, OUT_SIZE = 2;
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
  logic hin_valid = 1'b0, hin_pop, lin_valid = 1'b0, lin_pop, stq_full = 1'b0, stq_push;
  logic [MSG_W-1:0] hin_msg = '0, lin_msg = '0, stq_msg, out_msg;
  logic [1:0] out_free = 2'd2;
  logic out_push, cand_valid = 1'b0, cand_take, vm_valid = 1'b0, vm_done, vm_fired;
  logic [ID_W-1:0] cand_id = '0, vm_id = '0, dbg_own;
  logic [A_W-1:0] cand_a = '0, vm_a = '0, dbg_a = '0;
  logic [2:0] vm_op = '0, dbg_kind;
  logic [V_W-1:0] dbg_v;
  logic dbg_own_v, frtag_valid, fr_busy;
  logic [NUM_MEV-1:0] ev;

  memory_engine #(.P(P), .N(N), .V_W(V_W), .DIR_SIZE(DIR_SIZE), .GM_SIZE(GM_SIZE),
                  .OUT_SIZE(OUT_SIZE)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  msg_t outq [$];
  int stq_pushes = 0;
  always @(posedge clk) if (rst_n) begin
    if (out_push) outq.push_back(msg_t'(out_msg));
    if (stq_push) stq_pushes++;
  end

  function automatic msg_t mk(cmd_e c, int s, int a, logic [V_W-1:0] v);
    msg_t m;
    m.cmd = c; m.site = ID_W'(s); m.a = A_W'(a); m.hasv = (c == CMD_WB) || (v != 0); m.v = v;
    return m;
  endfunction

  task automatic idle(int n);
    repeat (n) @(negedge clk);
  endtask

  // offer a message on LIN until it is consumed (or max cycles)
  task automatic lin(msg_t m);
    int k;
    lin_valid = 1'b1; lin_msg = m;
    k = 0;
    @(posedge clk);
    while (!lin_pop && k < 20) begin @(posedge clk); k++; end
    @(negedge clk);
    lin_valid = 1'b0;
  endtask

  task automatic hin(msg_t m);
    hin_valid = 1'b1; hin_msg = m;
    @(posedge clk);
    @(negedge clk);
    hin_valid = 1'b0;
  endtask

  logic vm_ok;
  task automatic vm(vm_op_e op, int a, int id);
    vm_valid = 1'b1; vm_op = op; vm_a = A_W'(a); vm_id = ID_W'(id);
    #1;
    while (!vm_done) begin @(negedge clk); #1; end
    vm_ok = vm_fired;
    @(negedge clk);
    vm_valid = 1'b0;
  endtask

  task automatic expect_out(cmd_e c, int s, int a, string what);
    msg_t m;
    if (outq.size() == 0) begin check(1'b0, {what, ": no message"}); return; end
    m = outq.pop_front();
    check(m.cmd == c && m.site == ID_W'(s) && m.a == A_W'(a),
          $sformatf("%s: got %s to %0d a=%0d", what, m.cmd.name(), m.site, m.a));
  endtask

  task automatic expect_line(int a, mkind_e k, string what);
    dbg_a = A_W'(a);
    #1;
    check(dbg_kind == 3'(k), $sformatf("%s: state %0d, expected %0d", what, dbg_kind, k));
  endtask

  initial begin : watchdog
    #100_000;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // CacheReq at Cw[]: CacheAck with value
    lin(mk(CMD_CACHEREQ, 1, 0, '0));
    idle(1);
    expect_out(CMD_CACHEACK, 1, 0, "CacheReq at Cw");

    // voluntary Cache_w to site 1, then its CacheReq gets a dummy CacheAck
    vm(VM_CACHE_W, 0, 1);
    check(vm_ok, "Cache_w applies");
    idle(1);
    expect_out(CMD_CACHE_W, 1, 0, "voluntary Cache_w");
    lin(mk(CMD_CACHEREQ, 1, 0, '0));
    idle(1);
    check(outq.size() == 1 && outq[0].hasv == 1'b0, "CacheAck without value to a sharer");
    expect_out(CMD_CACHEACK, 1, 0, "CacheReq from sharer");

    // Wb from site 2 at Cw[1]: Tw, DownReq_wb to 1, Down_wb, WbAck_b, Cw
    lin(mk(CMD_WB, 2, 0, 32'hAB));
    idle(2);
    expect_line(0, MS_TW, "Wb makes the line transient");
    dbg_a = 2'd0; #1;
    check(dbg_v == 32'hAB, "Wb value stored at once");
    expect_out(CMD_DOWNREQ_WB, 1, 0, "DownReq_wb to the sharer");
    hin(mk(CMD_DOWN_WB, 1, 0, '0));
    idle(3);
    expect_out(CMD_WBACK_B, 2, 0, "suspended writer acknowledged");
    expect_line(0, MS_CW, "back to Cw");

    // GM full: sharer 3 on address 1, Wb from 0 suspends, Wb from 1 stalls
    vm(VM_CACHE_W, 1, 3);
    idle(1);
    expect_out(CMD_CACHE_W, 3, 1, "Cache_w to site 3");
    lin(mk(CMD_WB, 0, 1, 32'h10));
    lin(mk(CMD_WB, 1, 1, 32'h11));
    check(stq_pushes == 1, "second Wb stalled into STQ");
    stq_full = 1'b1;
    lin(mk(CMD_WB, 2, 1, 32'h12));
    idle(1);
    stq_full = 1'b0;
    expect_out(CMD_DOWNREQ_WB, 3, 1, "DownReq_wb to site 3");
    expect_out(CMD_WBNACK, 2, 1, "third Wb refused with WbNack");
    hin(mk(CMD_DOWN_WB, 3, 1, '0));
    idle(3);
    expect_out(CMD_WBACK_B, 0, 1, "writer 0 acknowledged");
    expect_line(1, MS_CW, "address 1 back to Cw");
    dbg_a = 2'd1; #1;
    check(dbg_v == 32'h10, "address 1 holds the accepted value");

    // Cm: Cache_m to 0, CacheReq from 1 -> DownReq_mw and stall
    vm(VM_CACHE_M, 2, 0);
    check(vm_ok, "Cache_m applies");
    idle(1);
    expect_out(CMD_CACHE_M, 0, 2, "Cache_m to site 0");
    expect_line(2, MS_CM, "line exclusive");
    lin(mk(CMD_CACHEREQ, 1, 2, '0));
    idle(1);
    expect_out(CMD_DOWNREQ_MW, 0, 2, "DownReq_mw to owner");
    check(stq_pushes == 2, "CacheReq stalled");
    expect_line(2, MS_TPM, "line in T'm");
    hin(mk(CMD_DOWNV_MW, 0, 2, 32'h66));
    expect_line(2, MS_CW, "Down_mw returns Cw");
    dbg_a = 2'd2; #1;
    check(dbg_v == 32'h66 && dbg_own_v && dbg_own == 2'd0, "value written back, owner kept as sharer");

    // FR path
    cand_valid = 1'b1; cand_id = 2'd3; cand_a = 2'd3;
    #1;
    check(cand_take, "candidate taken into empty FRTAG");
    @(posedge clk); @(negedge clk);
    cand_valid = 1'b0;
    check(frtag_valid, "FRTAG holds the candidate");
    lin(mk(CMD_CACHEREQ, 3, 3, '0));
    check(fr_busy && !frtag_valid, "request moved into FR");
    idle(3);
    check(!fr_busy, "FR served");
    expect_out(CMD_CACHEACK, 3, 3, "CacheAck from FR");

    idle(2);
    check(outq.size() == 0, "no stray messages");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

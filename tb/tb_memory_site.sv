// tb_memory_site: test of the memory site (engine plus HIN, LIN, OUT and
// STQ) with 4 sites, 4 addresses and STQ of 2. The test plays the network:
// it offers requests on the LIN port (lin_req until lin_ready), responses
// on HIN, and pops OUT.
// Covered: CacheReq served from LIN; voluntary Cache_m; a CacheReq at Cm
// that triggers DownReq_mw and is stalled into STQ, retried from STQ into
// LIN and stalled again while the owner has not answered; the owner's
// Down_mw; the retried CacheReq then served; STQ empty at the end; the
// network's LIN offers share LIN with STQ retries. Inputs change on the
// falling edge.
module tb_memory_site;
  import bcachet_pkg::*;
  localparam int P = 4, N = 4, V_W = 32;
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
  logic hin_push = 1'b0, hin_full, lin_req = 1'b0, lin_ready, out_valid, out_pop;
  logic [MSG_W-1:0] hin_msg = '0, lin_req_msg = '0, out_msg;
  logic cand_valid = 1'b0, cand_take, vm_valid = 1'b0, vm_done, vm_fired;
  logic [ID_W-1:0] cand_id = '0, vm_id = '0, dbg_own;
  logic [A_W-1:0] cand_a = '0, vm_a = '0, dbg_a = '0;
  logic [2:0] vm_op = '0, dbg_kind;
  logic [V_W-1:0] dbg_v;
  logic dbg_own_v, frtag_valid, fr_busy, stq_nonempty;
  logic [NUM_MEV-1:0] ev;

  memory_site #(.P(P), .N(N), .V_W(V_W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  msg_t outq [$];
  int stq_cycles = 0, stalls = 0;
  assign out_pop = out_valid;
  always @(posedge clk) if (rst_n) begin
    if (out_valid) outq.push_back(msg_t'(out_msg));
    if (stq_nonempty) stq_cycles++;
    if (ev[MEV_STQ_PUSH]) stalls++;
  end

  function automatic msg_t mk(cmd_e c, int s, int a, logic [V_W-1:0] v);
    msg_t m;
    m.cmd = c; m.site = ID_W'(s); m.a = A_W'(a); m.hasv = v != 0; m.v = v;
    return m;
  endfunction

  task automatic send_lin(msg_t m);
    lin_req = 1'b1; lin_req_msg = m;
    #1;
    while (!lin_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    lin_req = 1'b0;
  endtask

  task automatic send_hin(msg_t m);
    while (hin_full) @(negedge clk);
    hin_push = 1'b1; hin_msg = m;
    @(negedge clk);
    hin_push = 1'b0;
  endtask

  task automatic expect_out(cmd_e c, int s, int a, string what);
    msg_t m;
    int k;
    k = 0;
    while (outq.size() == 0 && k < 40) begin @(negedge clk); k++; end
    if (outq.size() == 0) begin check(1'b0, {what, ": no message"}); return; end
    m = outq.pop_front();
    check(m.cmd == c && m.site == ID_W'(s) && m.a == A_W'(a),
          $sformatf("%s: got %s to %0d a=%0d", what, m.cmd.name(), m.site, m.a));
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

    send_lin(mk(CMD_CACHEREQ, 2, 1, '0));
    expect_out(CMD_CACHEACK, 2, 1, "CacheReq served");

    vm_valid = 1'b1; vm_op = VM_CACHE_M; vm_a = 2'd3; vm_id = 2'd0;
    #1;
    while (!vm_done) begin @(negedge clk); #1; end
    check(vm_fired, "Cache_m applies");
    @(negedge clk);
    vm_valid = 1'b0;
    expect_out(CMD_CACHE_M, 0, 3, "Cache_m sent");

    send_lin(mk(CMD_CACHEREQ, 1, 3, '0));
    expect_out(CMD_DOWNREQ_MW, 0, 3, "DownReq_mw to owner");
    // another site's request competes with the STQ retries for LIN
    send_lin(mk(CMD_CACHEREQ, 3, 1, '0));
    expect_out(CMD_CACHEACK, 3, 1, "competing request served");
    repeat (10) @(negedge clk);
    check(stq_cycles > 0, "stalled request waited in STQ");
    check(stalls >= 2, $sformatf("request stalled again after retry (%0d)", stalls));
    send_hin(mk(CMD_DOWN_MW, 0, 3, '0));
    expect_out(CMD_CACHEACK, 1, 3, "stalled request served after Down_mw");
    repeat (5) @(negedge clk);
    check(!stq_nonempty && outq.size() == 0, "STQ empty, no stray messages");
    dbg_a = 2'd3; #1;
    check(dbg_kind == 3'(MS_CW) && dbg_own_v && dbg_own == 2'd0, "line Cw with old owner as sharer");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cache_site: test of a cache site (engine plus PMB, MPB, HOUT, LOUT and
// IN queues) of site 1 in a 4-site, 4-address system. The test plays the
// processor and the network: it pushes instructions with their tags,
// takes requests from LOUT and responses from HOUT, answers through IN, and
// checks the tagged results on the processor side.
// Covered: PMB back-pressure (ready low when both entries are taken while
// the head waits for memory), in-order retirement with tags, Loadl miss and CacheAck, Storel
// and Commit with Wb and WbAck_b, ErFRTag on HOUT, Reconcile purging a
// clean line. Inputs change on the falling edge.
module tb_cache_site;
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
  logic [ID_W-1:0] site_id = 2'd1;
  logic proc_req_valid = 1'b0, proc_req_ready, proc_rsp_valid, proc_rsp_pop = 1'b0;
  logic [2:0] proc_req_op = '0, vc_op = '0;
  logic [TAG_W-1:0] proc_req_tag = '0, proc_rsp_tag;
  logic [A_W-1:0] proc_req_a = '0, vc_a = '0, dbg_a = '0;
  logic [V_W-1:0] proc_req_v = '0, proc_rsp_v, dbg_v;
  logic hout_valid, hout_pop = 1'b0, lout_valid, lout_pop = 1'b0, in_full, in_push = 1'b0;
  logic [MSG_W-1:0] hout_msg, lout_msg, in_msg = '0;
  logic [1:0] rqcnt;
  logic [RQMAX-1:0] tags_valid;
  logic [RQMAX-1:0][A_W-1:0] tags_a;
  logic vc_valid = 1'b0, vc_done, vc_fired;
  logic [3:0] dbg_cs, ev;

  cache_site #(.P(P), .N(N), .V_W(V_W), .RQMAX(RQMAX), .TAG_W(TAG_W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic push_instr(op_e op, int a, logic [V_W-1:0] v, int tag);
    proc_req_valid = 1'b1; proc_req_op = op; proc_req_a = A_W'(a); proc_req_v = v; proc_req_tag = TAG_W'(tag);
    @(posedge clk);
    @(negedge clk);
    proc_req_valid = 1'b0;
  endtask

  task automatic take_lout(output msg_t m);
    int k;
    k = 0;
    while (!lout_valid && k < 20) begin @(negedge clk); k++; end
    check(lout_valid, "request in LOUT");
    m = msg_t'(lout_msg);
    lout_pop = 1'b1;
    @(posedge clk); @(negedge clk);
    lout_pop = 1'b0;
  endtask

  task automatic take_hout(output msg_t m);
    int k;
    k = 0;
    while (!hout_valid && k < 20) begin @(negedge clk); k++; end
    check(hout_valid, "response in HOUT");
    m = msg_t'(hout_msg);
    hout_pop = 1'b1;
    @(posedge clk); @(negedge clk);
    hout_pop = 1'b0;
  endtask

  task automatic give_in(cmd_e c, int a, logic hv, logic [V_W-1:0] v);
    msg_t m;
    m.cmd = c; m.site = site_id; m.a = A_W'(a); m.hasv = hv; m.v = v;
    while (in_full) @(negedge clk);
    in_push = 1'b1; in_msg = m;
    @(posedge clk); @(negedge clk);
    in_push = 1'b0;
  endtask

  task automatic take_rsp(int tag, logic [V_W-1:0] v, string what);
    int k;
    k = 0;
    while (!proc_rsp_valid && k < 20) begin @(negedge clk); k++; end
    check(proc_rsp_valid && proc_rsp_tag == TAG_W'(tag) && proc_rsp_v == v,
          $sformatf("%s: tag %0d value %h", what, proc_rsp_tag, proc_rsp_v));
    proc_rsp_pop = 1'b1;
    @(posedge clk); @(negedge clk);
    proc_rsp_pop = 1'b0;
  endtask

  initial begin : watchdog
    #100_000;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    msg_t m;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // Loadl miss, then two more instructions fill the PMB
    push_instr(OP_LOADL, 2, '0, 1);
    push_instr(OP_STOREL, 2, 32'h5A, 2);
    #1;
    check(!proc_req_ready, "PMB full while the head waits");
    @(negedge clk);
    take_lout(m);
    check(m.cmd == CMD_CACHEREQ && m.site == site_id && m.a == 2'd2, "CacheReq from site 1");
    check(rqcnt == 2'd1, "one request outstanding");
    give_in(CMD_CACHEACK, 2, 1'b1, 32'h21);
    take_hout(m);
    check(m.cmd == CMD_ERFRTAG, "ErFRTag after CacheAck");
    take_rsp(1, 32'h21, "Loadl result");
    take_rsp(2, '0, "Storel acknowledged");
    push_instr(OP_COMMIT, 2, '0, 3);
    take_lout(m);
    check(m.cmd == CMD_WB && m.v == 32'h5A, "Commit sends Wb with the stored value");
    give_in(CMD_WBACK_B, 2, 1'b0, '0);
    take_hout(m);
    check(m.cmd == CMD_ERFRTAG, "ErFRTag after WbAck_b");
    take_rsp(3, '0, "Commit retires after WbAck_b");
    dbg_a = 2'd2; #1;
    check(dbg_cs == 4'(CS_CB) && dbg_v == 32'h5A, "line clean with the value");
    push_instr(OP_RECONCILE, 2, '0, 4);
    take_rsp(4, '0, "Reconcile retires");
    #1;
    check(dbg_cs == 4'(CS_INV), "Reconcile purged the clean line");
    check(rqcnt == 2'd0 && !lout_valid && !hout_valid, "site idle");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bcachet_full: the BCachet system at its default size (256 sites,
// 16 addresses, 32-bit values) with no parameter changed.
//
// Site 0 stores a value and commits it; the memory must hold it. Sites 255
// and 128 then reconcile and load the address and must read that value.
// Memory then sends Cache_w to site 77 on its own; site 77 loads from its
// cache. Finally sites 1..8 store and commit to one address at the same
// time; every instruction must retire and the memory must end in Cw holding
// one of the stored values. Inputs are driven on the falling clock edge.
module tb_bcachet_full;
  import bcachet_pkg::*;
  localparam int P = 256, N = 16, V_W = 32, TAG_W = 4, ID_W = 8, A_W = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [P-1:0]            req_valid, req_ready, rsp_valid, rsp_pop;
  logic [P-1:0][2:0]       req_op;
  logic [P-1:0][TAG_W-1:0] req_tag, rsp_tag;
  logic [P-1:0][A_W-1:0]   req_a;
  logic [P-1:0][V_W-1:0]   req_v, rsp_v;
  logic [P-1:0]            vc_valid, vc_done, vc_fired;
  logic [P-1:0][2:0]       vc_op;
  logic [P-1:0][A_W-1:0]   vc_a;
  logic                    vm_valid, vm_done, vm_fired;
  logic [2:0]              vm_op;
  logic [A_W-1:0]          vm_a, dbg_a;
  logic [ID_W-1:0]         vm_id, dbg_site, dbg_mown, frcrt_id;
  logic [3:0]              dbg_cs;
  logic [V_W-1:0]          dbg_cv, dbg_mv;
  logic [2:0]              dbg_mkind;
  logic                    dbg_mown_v, frtag_valid, fr_busy, stq_nonempty, frcrt_valid;
  logic [NUM_MEV-1:0]      ev_mem;
  logic [P-1:0][3:0]       ev_cache;
  logic [P-1:0][1:0]       rqcnt;

  bcachet_top dut (
    .clk, .rst_n,
    .proc_req_valid(req_valid), .proc_req_op(req_op), .proc_req_tag(req_tag),
    .proc_req_a(req_a), .proc_req_v(req_v), .proc_req_ready(req_ready),
    .proc_rsp_valid(rsp_valid), .proc_rsp_tag(rsp_tag), .proc_rsp_v(rsp_v),
    .proc_rsp_pop(rsp_pop),
    .vc_valid, .vc_op, .vc_a, .vc_done, .vc_fired,
    .vm_valid, .vm_op, .vm_a, .vm_id, .vm_done, .vm_fired,
    .dbg_site, .dbg_a, .dbg_cs, .dbg_cv, .dbg_mkind, .dbg_mv, .dbg_mown_v, .dbg_mown,
    .frtag_valid, .fr_busy, .stq_nonempty, .frcrt_valid, .frcrt_id, .rqcnt,
    .ev_mem, .ev_cache
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int pending [P];
  logic [V_W-1:0] last_v [P];
  assign rsp_pop = rsp_valid;
  always @(posedge clk) if (rst_n)
    for (int s = 0; s < P; s++) if (rsp_valid[s]) begin pending[s]--; last_v[s] = rsp_v[s]; end

  task automatic issue(int s, logic [2:0] op, logic [A_W-1:0] a, logic [V_W-1:0] v);
    req_valid[s] = 1'b1; req_op[s] = op; req_a[s] = a; req_v[s] = v; req_tag[s] = '0;
    pending[s]++;
    @(posedge clk);
    while (!req_ready[s]) @(posedge clk);
    @(negedge clk);
    req_valid[s] = 1'b0;
  endtask

  task automatic drain(int s);
    int n;
    n = 0;
    while (pending[s] != 0 && n < 5000) begin @(negedge clk); n++; end
    check(pending[s] == 0, $sformatf("site %0d: instructions did not retire", s));
  endtask

  task automatic store_commit(int s);
    issue(s, OP_STOREL, 4'd9, 32'hBEEF_0000 + 32'(s));
    issue(s, OP_COMMIT, 4'd9, '0);
  endtask

  initial begin : watchdog
    #2_000_000;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    req_valid = '0; req_op = '0; req_tag = '0; req_a = '0; req_v = '0;
    vc_valid = '0; vc_op = '0; vc_a = '0;
    vm_valid = 1'b0; vm_op = '0; vm_a = '0; vm_id = '0;
    dbg_site = '0; dbg_a = '0;
    for (int s = 0; s < P; s++) begin pending[s] = 0; last_v[s] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    issue(0, OP_STOREL, 4'd5, 32'hCAFE_0005);
    issue(0, OP_COMMIT, 4'd5, '0);
    drain(0);
    dbg_a = 4'd5; #1;
    check(dbg_mv == 32'hCAFE_0005, "memory holds the committed value");
    check(dbg_mkind == 3'(MS_CW), "memory line back in Cw");

    issue(255, OP_RECONCILE, 4'd5, '0);
    issue(255, OP_LOADL, 4'd5, '0);
    issue(128, OP_LOADL, 4'd5, '0);
    drain(255);
    drain(128);
    check(last_v[255] == 32'hCAFE_0005, "site 255 reads the committed value");
    check(last_v[128] == 32'hCAFE_0005, "site 128 reads the committed value");

    vm_valid = 1'b1; vm_op = VM_CACHE_W; vm_a = 4'd5; vm_id = 8'd77;
    @(posedge clk);
    while (!vm_done) @(posedge clk);
    check(vm_fired, "Cache_w applies");
    @(negedge clk);
    vm_valid = 1'b0;
    repeat (10) @(negedge clk);
    dbg_site = 8'd77; #1;
    check(dbg_cs == 4'(CS_CW), "site 77 holds the line in Cw");
    issue(77, OP_LOADL, 4'd5, '0);
    drain(77);
    check(last_v[77] == 32'hCAFE_0005, "site 77 loads the pushed value");

    fork
      store_commit(1); store_commit(2); store_commit(3); store_commit(4);
      store_commit(5); store_commit(6); store_commit(7); store_commit(8);
    join
    for (int s = 1; s <= 8; s++) drain(s);
    repeat (20) @(negedge clk);
    dbg_a = 4'd9; #1;
    check(dbg_mkind == 3'(MS_CW), "contended line back in Cw");
    check(dbg_mv[31:16] == 16'hBEEF && dbg_mv[15:0] >= 1 && dbg_mv[15:0] <= 8,
          $sformatf("contended line holds a stored value (%h)", dbg_mv));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

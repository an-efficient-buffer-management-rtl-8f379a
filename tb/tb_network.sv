// tb_network: random test of the network movers with 4 sites, 4 addresses
// and rqmax 2. All HOUT and LOUT queues always hold a message (each site's
// message names the site), HIN is randomly full, LIN randomly not ready,
// IN queues randomly full, and the OUT head names a random site.
// Checks each cycle: a HIN push pops exactly the HOUT it came from; a LIN
// transfer comes from the site held in FRCRT and pops only that LOUT; OUT is
// popped exactly when the destination IN has room, and only that IN is
// written. At the end every site must have had the same share of HIN and
// LIN transfers (within one), which is the fairness the round-robin and
// FRCRT give. The tag scanner must offer every valid tag within one sweep
// and offer only valid tags. Inputs change on the falling edge.
module tb_network;
  localparam int P = 4, N = 4, V_W = 8, RQMAX = 2;
  localparam int ID_W = 2, A_W = 2, MSG_W = 5 + ID_W + A_W + 1 + V_W;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [P-1:0] hout_valid = '1, hout_pop, lout_valid = '1, lout_pop, in_full = '0, in_push;
  logic [P-1:0][MSG_W-1:0] hout_msg, lout_msg;
  logic [MSG_W-1:0] in_msg, hin_msg, lin_msg, out_msg = '0;
  logic [P-1:0][RQMAX-1:0] tags_valid = '0;
  logic [P-1:0][RQMAX-1:0][A_W-1:0] tags_a = '0;
  logic hin_push, hin_full = 1'b0, lin_req, lin_ready = 1'b1, out_valid = 1'b0, out_pop;
  logic cand_valid, cand_take = 1'b0, frcrt_valid;
  logic [ID_W-1:0] cand_id, frcrt_id;
  logic [A_W-1:0] cand_a;

  network #(.P(P), .N(N), .V_W(V_W), .RQMAX(RQMAX)) dut (.*);

  for (genvar s = 0; s < P; s++) begin : g_msg
    assign hout_msg[s] = {5'd2, ID_W'(s), {(MSG_W - 5 - ID_W){1'b0}}};
    assign lout_msg[s] = {5'd0, ID_W'(s), {(MSG_W - 5 - ID_W){1'b0}}};
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int hcnt [P], lcnt [P];
  initial begin : watchdog
    #200_000;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int s = 0; s < P; s++) begin hcnt[s] = 0; lcnt[s] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 800; c++) begin
      logic [ID_W-1:0] d;
      @(negedge clk);
      hin_full  = $urandom_range(0, 3) == 0;
      lin_ready = $urandom_range(0, 2) != 0;
      in_full   = P'($urandom);
      out_valid = 1'($urandom_range(0, 1));
      d = ID_W'($urandom_range(0, P - 1));
      out_msg = {5'd3, d, {(MSG_W - 5 - ID_W){1'b0}}};
      #1;
      // HPS
      check(hin_push == !hin_full, "HIN written whenever it has room");
      if (hin_push) begin
        int src;
        src = int'(hin_msg[MSG_W-6 -: ID_W]);
        check(hout_pop == (P'(1) << src), "HIN push pops its source HOUT");
        hcnt[src]++;
      end else check(hout_pop == '0, "no HOUT pop without HIN push");
      // FRC / LPS
      check(lin_req == frcrt_valid, "LIN offered only by the site in FRCRT");
      if (lin_req) begin
        check(int'(lin_msg[MSG_W-6 -: ID_W]) == int'(frcrt_id), "LIN offer comes from FRCRT site");
        if (lin_ready) begin
          check(lout_pop == (P'(1) << frcrt_id), "LIN transfer pops that LOUT");
          lcnt[frcrt_id]++;
        end
      end
      if (!(lin_req && lin_ready)) check(lout_pop == '0, "no LOUT pop without transfer");
      // MPS
      check(out_pop == (out_valid && !in_full[d]), "OUT popped iff the destination IN has room");
      check(in_push == (out_pop ? (P'(1) << d) : '0), "only the destination IN written");
      check(in_msg == out_msg, "IN gets the OUT head");
    end
    for (int s = 0; s < P; s++) begin
      check(hcnt[s] >= hcnt[0] - 1 && hcnt[s] <= hcnt[0] + 1, $sformatf("HIN share of site %0d: %0d vs %0d", s, hcnt[s], hcnt[0]));
      check(lcnt[s] >= lcnt[0] - 1 && lcnt[s] <= lcnt[0] + 1, $sformatf("LIN share of site %0d: %0d vs %0d", s, lcnt[s], lcnt[0]));
    end

    // FRT: random valid tags, all offered within one sweep, only valid ones
    @(negedge clk);
    hin_full = 1'b1; lin_ready = 1'b0; out_valid = 1'b0;
    for (int r = 0; r < 5; r++) begin
      bit seen [P][RQMAX];
      tags_valid = (P * RQMAX)'($urandom);
      for (int s = 0; s < P; s++) for (int k = 0; k < RQMAX; k++) begin
        tags_a[s][k] = A_W'($urandom);
        seen[s][k] = 0;
      end
      cand_take = 1'b0;
      repeat (3) @(negedge clk);   // a refused candidate keeps the pointer
      for (int c = 0; c < P * RQMAX + 1; c++) begin
        #1;
        if (cand_valid) begin
          bit found;
          found = 0;
          for (int k = 0; k < RQMAX; k++)
            if (tags_valid[cand_id][k] && tags_a[cand_id][k] == cand_a) begin found = 1; seen[cand_id][k] = 1; end
          check(found, "offered candidate is a valid tag");
        end
        cand_take = cand_valid;
        @(negedge clk);
      end
      cand_take = 1'b0;
      for (int s = 0; s < P; s++) for (int k = 0; k < RQMAX; k++)
        if (tags_valid[s][k]) check(seen[s][k], $sformatf("tag %0d/%0d offered", s, k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gm_buffer: random ADD/REMOVE operations on a gm_buffer of 3 entries
// (8 sites, 4 addresses) against a model of the stored (address, site)
// pairs. Every cycle the lookup of a random address must report whether a
// suspended writer exists and the lowest-numbered entry's site (checked as
// membership in the model), and full must match the model's count.
module tb_gm_buffer;
  localparam int P = 8, N = 4, GM_SIZE = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [1:0] lk_a = '0, op_a = '0;
  logic lk_any, full, op_valid = 1'b0, op_add = 1'b0;
  logic [2:0] lk_id, op_id = '0;
  gm_buffer #(.P(P), .N(N), .GM_SIZE(GM_SIZE)) dut (.*);

  int checks = 0, failures = 0;
  bit held [N][P];
  int used = 0;
  initial begin : watchdog
    #200_000;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
  initial begin
    for (int a = 0; a < N; a++) for (int i = 0; i < P; i++) held[a][i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      bit any;
      @(negedge clk);
      lk_a = 2'($urandom_range(0, N - 1));
      #1;
      any = 0;
      for (int i = 0; i < P; i++) if (held[lk_a][i]) any = 1;
      checks++;
      if (lk_any !== any || (any && !held[lk_a][lk_id]) || full !== (used == GM_SIZE)) begin
        failures++;
        $display("FAIL: a=%0d any %b/%b id %0d full %b used %0d", lk_a, lk_any, any, lk_id, full, used);
      end
      op_valid = 1'b1;
      op_add   = 1'($urandom_range(0, 1));
      op_a     = 2'($urandom_range(0, N - 1));
      op_id    = 3'($urandom_range(0, P - 1));
      // the memory engine never adds a pair twice
      if (op_add && held[op_a][op_id]) op_valid = 1'b0;
      @(posedge clk);
      if (op_valid) begin
        if (op_add && used < GM_SIZE) begin held[op_a][op_id] = 1; used++; end
        else if (!op_add && held[op_a][op_id]) begin held[op_a][op_id] = 0; used--; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

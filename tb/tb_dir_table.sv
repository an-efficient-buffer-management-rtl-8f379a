// tb_dir_table: random ALLOC/FREE/MARK operations on a dir_table of 5
// entries (8 sites, 4 addresses) against a model that keeps, for every
// (address, site) pair, whether it is listed and whether it is marked sent.
// Every cycle the lookup of a random address must give the model's first
// (sent) and second (not sent) directory, and full must match the number
// of listed pairs. Operations are driven on the falling edge.
module tb_dir_table;
  localparam int P = 8, N = 4, DIR_SIZE = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [1:0] lk_a = '0, op_a = '0;
  logic [P-1:0] lk_dir1, lk_dir2;
  logic full, op_valid = 1'b0, op_sent = 1'b0;
  logic [1:0] op_kind = '0;
  logic [2:0] op_id = '0;
  dir_table #(.P(P), .N(N), .DIR_SIZE(DIR_SIZE)) dut (.*);

  int checks = 0, failures = 0;
  bit listed [N][P];
  bit sent [N][P];
  int used = 0;
  initial begin : watchdog
    #200_000;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
  initial begin
    for (int a = 0; a < N; a++) for (int i = 0; i < P; i++) begin listed[a][i] = 0; sent[a][i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      logic [P-1:0] e1, e2;
      @(negedge clk);
      lk_a = 2'($urandom_range(0, N - 1));
      #1;
      e1 = '0; e2 = '0;
      for (int i = 0; i < P; i++) if (listed[lk_a][i]) begin
        if (sent[lk_a][i]) e1[i] = 1'b1; else e2[i] = 1'b1;
      end
      checks++;
      if (lk_dir1 !== e1 || lk_dir2 !== e2 || full !== (used == DIR_SIZE)) begin
        failures++;
        $display("FAIL: a=%0d dir1 %b/%b dir2 %b/%b full %b used %0d", lk_a, lk_dir1, e1, lk_dir2, e2, full, used);
      end
      op_valid = 1'b1;
      op_kind  = 2'($urandom_range(0, 2));
      op_a     = 2'($urandom_range(0, N - 1));
      op_id    = 3'($urandom_range(0, P - 1));
      op_sent  = 1'($urandom_range(0, 1));
      @(posedge clk);
      case (op_kind)
        2'd0: if (!listed[op_a][op_id] && used < DIR_SIZE) begin
                listed[op_a][op_id] = 1; sent[op_a][op_id] = op_sent; used++;
              end
        2'd1: if (listed[op_a][op_id]) begin listed[op_a][op_id] = 0; used--; end
        default: if (listed[op_a][op_id]) sent[op_a][op_id] = 1;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

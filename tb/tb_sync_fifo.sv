// tb_sync_fifo: random push/pop test of sync_fifo (DEPTH 3, 8-bit data)
// against a queue model. Checks the head data, empty, full, count and free
// every cycle, including push and pop in the same cycle on a full FIFO.
// Stimulus changes on the falling edge; the FIFO acts on the rising edge.
module tb_sync_fifo;
  localparam int W = 8, DEPTH = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic push = 1'b0, pop = 1'b0, empty, full;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [1:0] count, free;
  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  initial begin : watchdog
    #200_000;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (empty !== (model.size() == 0) || full !== (model.size() == DEPTH) ||
          int'(count) != model.size() || int'(free) != DEPTH - model.size() ||
          (model.size() > 0 && rd_data !== model[0])) begin
        failures++;
        $display("FAIL: cycle %0d size %0d count %0d empty %b full %b head %h", i, model.size(), count, empty, full, rd_data);
      end
      push = $urandom_range(0, 1) == 1;
      pop  = $urandom_range(0, 2) != 0 && model.size() > 0;
      if (push && full && !pop) push = 1'b0;
      wr_data = W'($urandom);
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(wr_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fr_unit: random test of the FR register and FRTAG against a model.
// Each cycle random candidates, erases (half of them aimed at the held
// tag), tag clears, loads (only into an empty FR, as the memory engine
// does) and clears are applied; cand_take, the tag and FR contents are
// compared with the model before every clock edge.
module tb_fr_unit;
  localparam int P = 8, N = 4, MSG_W = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic cand_valid = 1'b0, cand_take, tag_valid, erase_valid = 1'b0, tag_clear = 1'b0;
  logic [2:0] cand_id = '0, tag_id, erase_id = '0;
  logic [1:0] cand_a = '0, tag_a, erase_a = '0;
  logic fr_valid, fr_load = 1'b0, fr_clear = 1'b0;
  logic [MSG_W-1:0] fr_msg, fr_load_msg = '0;
  fr_unit #(.P(P), .N(N), .MSG_W(MSG_W)) dut (.*);

  int checks = 0, failures = 0;
  bit m_tv = 0, m_fv = 0;
  logic [2:0] m_id = '0;
  logic [1:0] m_a = '0;
  logic [MSG_W-1:0] m_msg = '0;
  initial begin : watchdog
    #200_000;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      bit hit;
      @(negedge clk);
      checks++;
      if (tag_valid !== m_tv || fr_valid !== m_fv || (m_tv && (tag_id !== m_id || tag_a !== m_a)) ||
          (m_fv && fr_msg !== m_msg)) begin
        failures++;
        $display("FAIL: cycle %0d tag %b/%b fr %b/%b", c, tag_valid, m_tv, fr_valid, m_fv);
      end
      cand_valid  = 1'($urandom_range(0, 1));
      cand_id     = 3'($urandom);
      cand_a      = 2'($urandom);
      erase_valid = $urandom_range(0, 3) == 0;
      if ($urandom_range(0, 1) == 1) begin erase_id = m_id; erase_a = m_a; end
      else begin erase_id = 3'($urandom); erase_a = 2'($urandom); end
      tag_clear   = $urandom_range(0, 7) == 0;
      fr_load     = !m_fv && $urandom_range(0, 2) == 0;
      fr_load_msg = MSG_W'($urandom);
      fr_clear    = m_fv && $urandom_range(0, 3) == 0;
      #1;
      checks++;
      if (cand_take !== (cand_valid && !m_tv)) begin
        failures++;
        $display("FAIL: cand_take %b", cand_take);
      end
      @(posedge clk);
      hit = erase_valid && m_tv && erase_id == m_id && erase_a == m_a;
      if (hit || (tag_clear && m_tv)) m_tv = 0;
      else if (cand_valid && !m_tv) begin m_tv = 1; m_id = cand_id; m_a = cand_a; end
      if (fr_load && !m_fv) begin m_fv = 1; m_msg = fr_load_msg; end
      else if (fr_clear) m_fv = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

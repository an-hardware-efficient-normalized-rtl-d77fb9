// tb_priority_reg: self-checking test of the best-match register. Streams of
// random signed coefficients with random valid gaps are offered; a queue-free
// software model keeps the first strictly greatest value and its index. After
// every clock the register's flag, value and index are compared with the
// model. Clear is pulsed between streams and must empty the register; ties
// must keep the earlier index.
`timescale 1ns/1ps
module tb_priority_reg;
  import ncc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear, in_valid, has_value;
  fx_t coef, best_coef;
  logic [12:0] index, best_index;

  priority_reg dut (.clk, .rst, .clear, .in_valid, .coef, .index,
                    .has_value, .best_coef, .best_index);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit m_has;
    fx_t m_coef;
    logic [12:0] m_idx;
    clear = 1'b0; in_valid = 1'b0; coef = '0; index = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int s = 0; s < 20; s++) begin
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      m_has = 1'b0; m_coef = '0; m_idx = '0;
      checks++;
      if (has_value) begin failures++; $display("FAIL clear left a value"); end
      for (int i = 0; i < 300; i++) begin
        in_valid = ($urandom % 4) != 0;
        // small value range so that ties are frequent
        coef  = fx_t'(signed'(int'($urandom % 64) - 32)) <<< 26;
        index = 13'(i);
        @(negedge clk);
        if (in_valid && (!m_has || coef > m_coef)) begin
          m_has = 1'b1; m_coef = coef; m_idx = index;
        end
        checks++;
        if (has_value != m_has || best_coef != m_coef || best_index != m_idx) begin
          failures++;
          $display("FAIL stream %0d step %0d: got %0d/%0d expected %0d/%0d",
                   s, i, best_coef, best_index, m_coef, m_idx);
        end
      end
      in_valid = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

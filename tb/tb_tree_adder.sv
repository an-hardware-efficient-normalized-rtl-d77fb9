// tb_tree_adder: sums random operand sets through a pipelined and a
// combinational 256-input tree. Checks every sum against a plain loop, the
// pipelined latency of 8 cycles with one new set accepted per cycle, and
// the combinational tree in the same cycle.
`timescale 1ns/1ps
module tb_tree_adder;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic signed [63:0] in [256];
  logic in_valid;
  logic v_p, v_c;
  logic signed [63:0] s_p, s_c;
  tree_adder #(.N(256), .W(64), .PIPELINED(1'b1)) dut_p (
    .clk, .rst, .in_valid, .in, .out_valid(v_p), .sum(s_p));
  tree_adder #(.N(256), .W(64), .PIPELINED(1'b0)) dut_c (
    .clk, .rst, .in_valid, .in, .out_valid(v_c), .sum(s_c));

  logic signed [63:0] exp_q [$];
  int t_q [$];
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk)
    if (!rst && v_p) begin
      checks++;
      if (exp_q.size() == 0 || s_p != exp_q[0] || cycle - t_q[0] != 8) begin
        failures++;
        $display("FAIL pipelined sum %0d latency %0d", s_p, exp_q.size() ? cycle - t_q[0] : -1);
      end
      if (exp_q.size()) begin void'(exp_q.pop_front()); void'(t_q.pop_front()); end
    end

  initial begin
    in_valid = 0;
    foreach (in[i]) in[i] = '0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 40; n++) begin
      logic signed [63:0] s;
      s = 0;
      foreach (in[i]) begin
        in[i] = 64'(signed'($urandom)) <<< $urandom_range(0, 20);
        s += in[i];
      end
      in_valid = 1;
      exp_q.push_back(s); t_q.push_back(cycle);
      #1; checks++;
      if (s_c != s || !v_c) begin failures++; $display("FAIL comb sum"); end
      @(posedge clk); #1;
    end
    in_valid = 0;
    repeat (12) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL missing sums"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cdc_sync: self-checking test of the two-flop synchronizer. The input is
// changed at random times from an unrelated clock; every change must appear
// at the output after exactly two destination clock edges (the input is held
// stable across the sampling edge) and not after one. Reset must force the
// reset value.
`timescale 1ns/1ps
module tb_cdc_sync;
  logic clk = 1'b0, rst = 1'b1;
  always #20 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] d, q;
  cdc_sync #(.W(4), .RST_VAL(4'hA)) dut (.clk, .rst, .d, .q);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] v, prev;
    d = 4'h0;
    prev = 4'h0;
    repeat (2) @(negedge clk);
    checks++;
    if (q != 4'hA) begin failures++; $display("FAIL reset value %h", q); end
    rst = 1'b0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      #($urandom % 15);          // change at an arbitrary time in the low phase
      v = 4'($urandom);
      d = v;
      @(posedge clk); #1;
      checks++;
      if (q != prev) begin failures++; $display("FAIL output changed after one edge"); end
      @(posedge clk); #1;
      checks++;
      if (q != v) begin failures++; $display("FAIL value %h expected %h after 2 edges", q, v); end
      prev = v;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

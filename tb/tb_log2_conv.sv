// tb_log2_conv: checks the log2 approximation for 9-bit signed pixels
// (exhaustively) and for 64-bit 32.32 values (random), against a model that
// finds the leading one by comparison with powers of two.
`timescale 1ns/1ps
module tb_log2_conv;
  import ncc_pkg::*;
  int checks = 0, failures = 0;

  logic signed [8:0]  x9;   lg_t y9;
  logic signed [63:0] x64;  lg_t y64;
  log2_conv #(.IN_W(9),  .IN_FRAC(0))  dut9  (.x(x9),  .y(y9));
  log2_conv #(.IN_W(64), .IN_FRAC(32)) dut64 (.x(x64), .y(y64));

  // expected log2 value in 10.54 for magnitude m with frac_in fraction bits
  function automatic logic signed [63:0] ref_log(logic [63:0] m, int frac_in);
    int k = 63;
    logic [63:0] rest;
    logic [117:0] f;
    while (k > 0 && m < (64'd1 << k)) k--;
    rest = m - (64'd1 << k);
    f = {54'b0, rest} << 54;
    f = f >> k;                 // rest / 2^k as a 54-bit fraction
    return {10'(k - frac_in), f[53:0]};
  endfunction

  task automatic check(lg_t y, logic signed [63:0] x, int frac_in, int w);
    logic [63:0] m = x < 0 ? 64'(-x) : 64'(x);
    checks++;
    if (m == 0) begin
      if (!y.zero) begin failures++; $display("FAIL zero flag x=%0d", x); end
    end else if (y.zero || y.neg != (x < 0) || y.val != ref_log(m, frac_in)) begin
      failures++;
      $display("FAIL w=%0d x=%0d: got %h neg %b, expected %h", w, x, y.val, y.neg, ref_log(m, frac_in));
    end
  endtask

  initial begin
    for (int i = -256; i < 256; i++) begin
      x9 = 9'(i); #1;
      check(y9, 64'(i), 0, 9);
    end
    // spot values: log2(1) = 0, log2(3) = 1.5, log2(-128) = 7 negative
    x9 = 9'sd3; #1; checks++;
    if (y9.val != 64'h0060_0000_0000_0000) begin failures++; $display("FAIL log2(3) %h", y9.val); end
    for (int n = 0; n < 2000; n++) begin
      x64 = {$urandom, $urandom} >>> $urandom_range(0, 62);
      #1;
      check(y64, x64, 32, 64);
    end
    x64 = 64'sh0000_0000_8000_0000; #1; checks++;   // 0.5 -> -1.0
    if (y64.val != {10'h3FF, 54'b0}) begin failures++; $display("FAIL log2(0.5) %h", y64.val); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

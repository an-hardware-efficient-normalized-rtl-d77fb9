// tb_ilog2_conv: checks the inverse log2 against a floating-point model
// 2^k * (1 + f), including sign, zero, saturation and underflow, and checks
// that it inverts log2_conv exactly for integers (the approximation is
// lossless on the way back).
`timescale 1ns/1ps
module tb_ilog2_conv;
  import ncc_pkg::*;
  int checks = 0, failures = 0;

  lg_t x; fx_t y;
  ilog2_conv dut (.x(x), .y(y));

  logic signed [63:0] xi; lg_t lx;
  log2_conv #(.IN_W(64), .IN_FRAC(32)) u_log (.x(xi), .y(lx));

  initial begin
    // random log values with integer parts -20..20
    for (int n = 0; n < 2000; n++) begin
      int k;
      logic [53:0] f;
      real e, got;
      k = $urandom_range(0, 40) - 20;
      f = 54'({$urandom, $urandom} >> 10);
      x.zero = 1'b0; x.neg = $urandom_range(0, 1); x.val = {10'(k), f};
      #1;
      e = (2.0 ** k) * (1.0 + $itor(f) / (2.0 ** 54));
      if (x.neg) e = -e;
      got = $itor(y) / (2.0 ** 32);
      checks++;
      if (got - e > 2.0 ** -31 || e - got > 2.0 ** -31) begin
        failures++; $display("FAIL k=%0d f=%h: got %f expected %f", k, f, got, e);
      end
    end
    // round trip: ilog2(log2(v)) = v for integers in 32.32
    for (int n = 0; n < 500; n++) begin
      xi = 64'(signed'($urandom)) <<< 16; #1;
      x = lx; #1;
      checks++;
      if (y != xi) begin failures++; $display("FAIL round trip %h -> %h", xi, y); end
    end
    // zero, saturation, underflow
    x = '{zero: 1'b1, neg: 1'b0, val: '0}; #1; checks++;
    if (y != 0) begin failures++; $display("FAIL zero"); end
    x = '{zero: 1'b0, neg: 1'b0, val: {10'sd40, 54'b0}}; #1; checks++;
    if (y != 64'sh7FFF_FFFF_FFFF_FFFF) begin failures++; $display("FAIL saturate %h", y); end
    x = '{zero: 1'b0, neg: 1'b0, val: {-10'sd40, 54'b0}}; #1; checks++;
    if (y != 0) begin failures++; $display("FAIL underflow %h", y); end
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

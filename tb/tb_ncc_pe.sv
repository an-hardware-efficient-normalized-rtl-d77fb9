// tb_ncc_pe: self-checking test of one processing element, combinational and
// pipelined variants side by side. Random signed 9-bit descriptor and window
// pixels are converted to the log domain by log2_conv and loaded into both
// PEs; after the variant's latency (1 clock edge for the combinational PE,
// 3 for the pipelined one) the three outputs d*w, d*d and w*w are compared
// with a floating-point model of the same log2 approximation. Powers of two
// and zero are included, where the approximation is exact.
`timescale 1ns/1ps
module tb_ncc_pe;
  import ncc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic desc_load, win_load;
  logic signed [PIX_W-1:0] d_pix, w_pix;
  lg_t d_lg, w_lg;
  fx_t prod [2], dsq [2], wsq [2];

  log2_conv u_ld (.x(d_pix), .y(d_lg));
  log2_conv u_lw (.x(w_pix), .y(w_lg));
  ncc_pe #(.PIPELINED(1'b0)) dut0 (.clk, .desc_load, .desc_lg(d_lg), .win_load, .win_lg(w_lg),
                                   .prod(prod[0]), .desc_sq(dsq[0]), .win_sq(wsq[0]));
  ncc_pe #(.PIPELINED(1'b1)) dut1 (.clk, .desc_load, .desc_lg(d_lg), .win_load, .win_lg(w_lg),
                                   .prod(prod[1]), .desc_sq(dsq[1]), .win_sq(wsq[1]));

  function automatic real mlog(real x);
    int k = 0;
    while (x >= 2.0 ** (k + 1)) k++;
    while (x < 2.0 ** k) k--;
    return k + x / (2.0 ** k) - 1.0;
  endfunction
  function automatic real milog(real y);
    int k = $rtoi(y);
    if (real'(k) > y) k--;
    return (2.0 ** k) * (1.0 + (y - k));
  endfunction
  function automatic real mmul(int a, int b);
    real p;
    if (a == 0 || b == 0) return 0.0;
    p = milog(mlog($itor(a < 0 ? -a : a)) + mlog($itor(b < 0 ? -b : b)));
    return ((a < 0) != (b < 0)) ? -p : p;
  endfunction

  task automatic check(string what, fx_t got, real exp);
    real g = $itor(got) / (2.0 ** 32);
    real tol = 1e-6 * (exp < 0 ? -exp : exp) + 1e-6;
    checks++;
    if (g - exp > tol || exp - g > tol) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, g, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, w;
    desc_load = 1'b0; win_load = 1'b0; d_pix = '0; w_pix = '0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 400; i++) begin
      case (i % 5)
        0: begin d = 1 << ($urandom % 8); w = -(1 << ($urandom % 8)); end
        1: begin d = 0; w = int'($urandom % 511) - 255; end
        default: begin d = int'($urandom % 511) - 255; w = int'($urandom % 511) - 255; end
      endcase
      d_pix = PIX_W'(d); w_pix = PIX_W'(w);
      desc_load = 1'b1; win_load = 1'b1;
      @(negedge clk);
      desc_load = 1'b0; win_load = 1'b0;
      check("comb prod", prod[0], mmul(d, w));
      check("comb d*d",  dsq[0],  mmul(d, d));
      check("comb w*w",  wsq[0],  mmul(w, w));
      repeat (2) @(negedge clk);
      check("pipe prod", prod[1], mmul(d, w));
      check("pipe d*d",  dsq[1],  mmul(d, d));
      check("pipe w*w",  wsq[1],  mmul(w, w));
      if (i % 5 == 0) begin   // powers of two: exact product
        checks++;
        if (prod[0] != fx_t'(longint'(d) * longint'(w)) <<< 32) begin
          failures++;
          $display("FAIL exact power-of-two product %0d*%0d", d, w);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

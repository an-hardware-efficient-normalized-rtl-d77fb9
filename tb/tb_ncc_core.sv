// tb_ncc_core: self-checking test of the NCC core, in both the combinational
// (default) and the pipelined variant, side by side on the same stimulus.
// A random descriptor is loaded four pixels per strobe; then a series of
// window patches is applied one per cycle: random patches, an exact copy of
// the descriptor (coefficient must be exactly +1.0), its negation (exactly
// -1.0), a zero patch (coefficient 0) and a scaled copy (+1.0 within the
// approximation). Every coefficient is compared with a floating-point model
// of the same log2 approximation (k + f for 2^k*(1+f)); the latency of each
// variant, the best coefficient and its index are checked as well.
`timescale 1ns/1ps
module tb_ncc_core;
  import ncc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic desc_start, desc_load, win_load, result_clear;
  logic [4*PIX_W-1:0] desc_data;
  pix_t win_data [DESC_DIM][DESC_DIM];
  logic [12:0] win_index;

  logic cv [2];  fx_t co [2];  logic [12:0] ci [2];
  logic hv [2];  fx_t bc [2];  logic [12:0] bi [2];  logic bz [2];

  ncc_core #(.PIPELINED(1'b0)) dut0 (
    .clk, .rst, .desc_start, .desc_load, .desc_data, .win_load, .win_data, .win_index,
    .result_clear, .coef_valid(cv[0]), .coef(co[0]), .coef_index(ci[0]),
    .has_value(hv[0]), .best_coef(bc[0]), .best_index(bi[0]), .busy(bz[0]));
  ncc_core #(.PIPELINED(1'b1)) dut1 (
    .clk, .rst, .desc_start, .desc_load, .desc_data, .win_load, .win_data, .win_index,
    .result_clear, .coef_valid(cv[1]), .coef(co[1]), .coef_index(ci[1]),
    .has_value(hv[1]), .best_coef(bc[1]), .best_index(bi[1]), .busy(bz[1]));

  // ---------------- reference model ----------------
  function automatic real mlog(real x);   // approximate log2, x > 0
    int k = 0;
    while (x >= 2.0 ** (k + 1)) k++;
    while (x < 2.0 ** k) k--;
    return k + x / (2.0 ** k) - 1.0;
  endfunction
  function automatic real milog(real y);  // its inverse
    int k = $rtoi(y);
    if (real'(k) > y) k--;
    return (2.0 ** k) * (1.0 + (y - k));
  endfunction

  int desc [16][16];
  int win  [16][16];

  function automatic real ref_coef();
    real num = 0, sd = 0, sw = 0, lg;
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++) begin
        int d = desc[r][c], w = win[r][c];
        if (d != 0 && w != 0) begin
          real p = milog(mlog($itor(d < 0 ? -d : d)) + mlog($itor(w < 0 ? -w : w)));
          num += ((d < 0) != (w < 0)) ? -p : p;
        end
        if (d != 0) sd += milog(2.0 * mlog($itor(d < 0 ? -d : d)));
        if (w != 0) sw += milog(2.0 * mlog($itor(w < 0 ? -w : w)));
      end
    if (num == 0.0 || sd == 0.0 || sw == 0.0) return 0.0;
    lg = mlog(num < 0 ? -num : num) - (mlog(sd) + mlog(sw)) / 2.0;
    return num < 0 ? -milog(lg) : milog(lg);
  endfunction

  function automatic real fx2r(fx_t v);
    return $itor(v) / (2.0 ** 32);
  endfunction

  // expected results, one queue per variant
  real exp_q [2][$];
  int  idx_q [2][$];
  int  lat_q [2][$];
  int  cycle = 0;
  int  lat_expect [2] = '{1, 13};
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    for (int v = 0; v < 2; v++)
      if (!rst && cv[v]) begin
        real e, got;
        int  i, t;
        checks++;
        if (exp_q[v].size() == 0) begin
          failures++;
          $display("FAIL variant %0d: unexpected coefficient", v);
        end else begin
          e = exp_q[v].pop_front(); i = idx_q[v].pop_front(); t = lat_q[v].pop_front();
          got = fx2r(co[v]);
          if ((got - e > 1e-6) || (e - got > 1e-6) || ci[v] != 13'(i)) begin
            failures++;
            $display("FAIL variant %0d idx %0d: coef %f expected %f (index %0d)", v, i, got, e, ci[v]);
          end
          checks++;
          if (cycle - t != lat_expect[v]) begin
            failures++;
            $display("FAIL variant %0d: latency %0d expected %0d", v, cycle - t, lat_expect[v]);
          end
        end
      end
  end

  task automatic apply_patch(int index);
    real e = ref_coef();
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++) win_data[r][c] = pix_t'(win[r][c]);
    win_index = 13'(index);
    win_load  = 1'b1;
    for (int v = 0; v < 2; v++) begin
      exp_q[v].push_back(e); idx_q[v].push_back(index); lat_q[v].push_back(cycle);
    end
    @(posedge clk); #1;
    win_load = 1'b0;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exact_idx = 7;
    desc_start = 0; desc_load = 0; win_load = 0; result_clear = 0;
    desc_data = '0; win_index = '0;
    for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) win_data[r][c] = '0;
    repeat (3) @(posedge clk); #1;
    rst = 0;
    // descriptor: random signed pixels in -255..255 (so that its negation fits), never all zero
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++) desc[r][c] = $urandom_range(0, 510) - 255;
    desc_start = 1; result_clear = 1;
    @(posedge clk); #1;
    desc_start = 0; result_clear = 0;
    for (int r = 0; r < 16; r++)
      for (int g = 0; g < 4; g++) begin
        for (int k = 0; k < 4; k++) desc_data[k*PIX_W +: PIX_W] = PIX_W'(desc[r][g*4+k]);
        desc_load = 1;
        @(posedge clk); #1;
      end
    desc_load = 0;
    // random patches, back to back
    for (int p = 0; p < 24; p++) begin
      if (p == exact_idx) win = desc;
      else if (p == 9)  begin for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) win[r][c] = -desc[r][c]; end
      else if (p == 11) begin for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) win[r][c] = 0; end
      else for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) win[r][c] = $urandom_range(0, 511) - 256;
      apply_patch(p);
    end
    repeat (20) @(posedge clk);
    for (int v = 0; v < 2; v++) begin
      checks++;
      if (exp_q[v].size() != 0 || bz[v]) begin failures++; $display("FAIL variant %0d: results missing", v); end
      checks++;
      if (!hv[v] || bi[v] != 13'(exact_idx) || bc[v] != 64'sh1_0000_0000) begin
        failures++;
        $display("FAIL variant %0d: best %f at %0d", v, fx2r(bc[v]), bi[v]);
      end
    end
    // exact values at the special patches were checked through the model;
    // check the model itself against the exact ones
    win = desc;
    checks++;
    if (ref_coef() != 1.0) begin failures++; $display("FAIL model exact match"); end
    // result_clear empties the priority register
    result_clear = 1; @(posedge clk); #1; result_clear = 0;
    checks++;
    if (hv[0] || hv[1]) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

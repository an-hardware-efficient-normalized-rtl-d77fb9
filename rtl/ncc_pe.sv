// ncc_pe: one processing element of the 16x16 NCC array.
//
// Each PE holds one descriptor pixel and one window pixel, both already in
// the log2 domain (see log2_conv). The descriptor register loads when its
// row/column-group select and load strobe are all high (desc_load); the
// window register loads on win_load. From the two registers the PE forms,
// in the log domain, the product d*w (add the logs, xor the signs) and the
// squares d*d and w*w (shift the log left by one), and converts all three
// back to signed 32.32 fixed point for the adder trees.
// With PIPELINED set, registers follow the log-domain add and the
// conversion (two cycles from the pixel registers to the outputs); otherwise
// the outputs follow the pixel registers combinationally.
// Log-domain multiply and square follow the design description; the
// register placement in the pipelined variant is this design's reading.
module ncc_pe
  import ncc_pkg::*;
#(
  parameter bit PIPELINED = 1'b0
) (
  input  logic clk,
  input  logic desc_load,
  input  lg_t  desc_lg,
  input  logic win_load,
  input  lg_t  win_lg,
  output fx_t  prod,      // d * w
  output fx_t  desc_sq,   // d * d
  output fx_t  win_sq     // w * w
);

  lg_t d_q, w_q;
  lg_t p_lg, dd_lg, ww_lg;
  lg_t p_lg_s, dd_lg_s, ww_lg_s;
  fx_t p_fx, dd_fx, ww_fx;

  always_ff @(posedge clk) begin
    if (desc_load) d_q <= desc_lg;
    if (win_load)  w_q <= win_lg;
  end

  always_comb begin
    p_lg.zero  = d_q.zero | w_q.zero;
    p_lg.neg   = d_q.neg ^ w_q.neg;
    p_lg.val   = d_q.val + w_q.val;
    dd_lg.zero = d_q.zero;
    dd_lg.neg  = 1'b0;
    dd_lg.val  = d_q.val <<< 1;
    ww_lg.zero = w_q.zero;
    ww_lg.neg  = 1'b0;
    ww_lg.val  = w_q.val <<< 1;
  end

  if (PIPELINED) begin : g_pipe_lg
    always_ff @(posedge clk) begin
      p_lg_s  <= p_lg;
      dd_lg_s <= dd_lg;
      ww_lg_s <= ww_lg;
    end
  end else begin : g_comb_lg
    assign p_lg_s  = p_lg;
    assign dd_lg_s = dd_lg;
    assign ww_lg_s = ww_lg;
  end

  ilog2_conv u_ilog_p  (.x(p_lg_s),  .y(p_fx));
  ilog2_conv u_ilog_dd (.x(dd_lg_s), .y(dd_fx));
  ilog2_conv u_ilog_ww (.x(ww_lg_s), .y(ww_fx));

  if (PIPELINED) begin : g_pipe_fx
    always_ff @(posedge clk) begin
      prod    <= p_fx;
      desc_sq <= dd_fx;
      win_sq  <= ww_fx;
    end
  end else begin : g_comb_fx
    assign prod    = p_fx;
    assign desc_sq = dd_fx;
    assign win_sq  = ww_fx;
  end

endmodule

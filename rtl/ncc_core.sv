// ncc_core: normalized cross correlation of a 16x16 descriptor against a
// stream of 16x16 window patches, with a running best match.
//
// Descriptor loading: desc_data carries four signed 9-bit pixels
// ([8:0], [17:9], [26:18], [35:27]). Each desc_load strobe converts the four
// to log2 and writes them into one column group (four PE columns) of one PE
// row. A 2-bit column-group counter and a 4-bit row counter, each followed by
// a one-hot decoder, select the PEs; the column group advances on every
// strobe and the row when the column group wraps, so 64 strobes fill the
// array row by row, left to right. desc_start resets both counters.
// Window loading: win_load writes all 256 window pixels, each through its own
// log2 unit, into the PEs at once, with the patch index win_index.
// Score: the PEs produce d*w, d*d and w*w; three adder trees sum them into
// the numerator sum(d*w) and the two sums of squares. These go back to the
// log domain, where the denominator sqrt(SOSd*SOSw) is (log SOSd + log SOSw)/2
// and the quotient is a subtraction. The difference converted to 32.32 fixed
// point is the coefficient, signed like the numerator; a patch with a zero
// sum of squares scores 0. priority_reg keeps the best coefficient and its
// index until result_clear.
// Timing: with PIPELINED clear (the default) everything after the PE
// registers is combinational and a patch's coefficient enters the priority
// register on the edge after the PEs load it; a patch can be accepted every
// cycle. With PIPELINED set, two PE stages, eight adder-tree stages and two
// log-domain stages are added (1 + DLY = 13 edges from win_load to
// coef_valid instead of 1). busy is high while a patch is still in flight.
// The datapath follows the design description; the counter order, zero
// handling and exact register placement are this design's choices.
module ncc_core
  import ncc_pkg::*;
#(
  parameter bit PIPELINED = 1'b0,
  parameter int IDX_W     = 13
) (
  input  logic                   clk,
  input  logic                   rst,
  // descriptor load
  input  logic                   desc_start,
  input  logic                   desc_load,
  input  logic [4*PIX_W-1:0]     desc_data,
  // window load
  input  logic                   win_load,
  input  pix_t                   win_data [DESC_DIM][DESC_DIM],
  input  logic [IDX_W-1:0]       win_index,
  // results
  input  logic                   result_clear,
  output logic                   coef_valid,
  output fx_t                    coef,
  output logic [IDX_W-1:0]       coef_index,
  output logic                   has_value,
  output fx_t                    best_coef,
  output logic [IDX_W-1:0]       best_index,
  output logic                   busy
);

  localparam int PE_LAT   = PIPELINED ? 2 : 0;
  localparam int TREE_LAT = PIPELINED ? $clog2(NUM_PE) : 0;
  localparam int POST_LAT = PIPELINED ? 2 : 0;
  localparam int DLY      = PE_LAT + TREE_LAT + POST_LAT;

  // ---------------- descriptor load counters and decoders ----------------
  logic [1:0]  col_group_cnt;
  logic [3:0]  row_cnt;
  logic [3:0]  load_col_group;
  logic [15:0] load_row;

  always_ff @(posedge clk) begin
    if (rst || desc_start) begin
      col_group_cnt <= '0;
      row_cnt       <= '0;
    end else if (desc_load) begin
      col_group_cnt <= col_group_cnt + 2'd1;
      if (col_group_cnt == 2'd3) row_cnt <= row_cnt + 4'd1;
    end
  end

  assign load_col_group = 4'b1 << col_group_cnt;
  assign load_row       = 16'b1 << row_cnt;

  lg_t desc_lane_lg [4];
  for (genvar k = 0; k < 4; k++) begin : g_desc_log
    log2_conv #(.IN_W(PIX_W), .IN_FRAC(0)) u_log (
      .x(desc_data[k*PIX_W +: PIX_W]), .y(desc_lane_lg[k]));
  end

  // ---------------- PE array ----------------
  fx_t prod [NUM_PE];
  fx_t dsq  [NUM_PE];
  fx_t wsq  [NUM_PE];

  for (genvar r = 0; r < DESC_DIM; r++) begin : g_row
    for (genvar c = 0; c < DESC_DIM; c++) begin : g_col
      lg_t win_lg;
      log2_conv #(.IN_W(PIX_W), .IN_FRAC(0)) u_win_log (
        .x(win_data[r][c]), .y(win_lg));
      ncc_pe #(.PIPELINED(PIPELINED)) u_pe (
        .clk       (clk),
        .desc_load (desc_load & load_col_group[c/4] & load_row[r]),
        .desc_lg   (desc_lane_lg[c%4]),
        .win_load  (win_load),
        .win_lg    (win_lg),
        .prod      (prod[r*DESC_DIM+c]),
        .desc_sq   (dsq[r*DESC_DIM+c]),
        .win_sq    (wsq[r*DESC_DIM+c]));
    end
  end

  // ---------------- valid / index tracking ----------------
  logic             v_pe;
  logic [IDX_W-1:0] idx_pe;
  logic             v_dly   [DLY+1];
  logic [IDX_W-1:0] idx_dly [DLY+1];

  always_ff @(posedge clk) begin
    if (rst) v_pe <= 1'b0;
    else     v_pe <= win_load;
    if (win_load) idx_pe <= win_index;
  end

  assign v_dly[0]   = v_pe;
  assign idx_dly[0] = idx_pe;
  for (genvar i = 0; i < DLY; i++) begin : g_dly
    always_ff @(posedge clk) begin
      if (rst) v_dly[i+1] <= 1'b0;
      else     v_dly[i+1] <= v_dly[i];
      idx_dly[i+1] <= idx_dly[i];
    end
  end

  // ---------------- adder trees ----------------
  fx_t num_sum, dsos, wsos;
  logic unused_tree_v [3];

  tree_adder #(.N(NUM_PE), .W(FX_W), .PIPELINED(PIPELINED)) u_tree_num (
    .clk(clk), .rst(rst), .in_valid(1'b0), .in(prod),
    .out_valid(unused_tree_v[0]), .sum(num_sum));
  tree_adder #(.N(NUM_PE), .W(FX_W), .PIPELINED(PIPELINED)) u_tree_dsos (
    .clk(clk), .rst(rst), .in_valid(1'b0), .in(dsq),
    .out_valid(unused_tree_v[1]), .sum(dsos));
  tree_adder #(.N(NUM_PE), .W(FX_W), .PIPELINED(PIPELINED)) u_tree_wsos (
    .clk(clk), .rst(rst), .in_valid(1'b0), .in(wsq),
    .out_valid(unused_tree_v[2]), .sum(wsos));

  // ---------------- back to the log domain ----------------
  lg_t num_lg, dsos_lg, wsos_lg;
  lg_t num_lg_s, dsos_lg_s, wsos_lg_s;
  log2_conv #(.IN_W(FX_W), .IN_FRAC(FX_FRAC)) u_log_num  (.x(num_sum), .y(num_lg));
  log2_conv #(.IN_W(FX_W), .IN_FRAC(FX_FRAC)) u_log_dsos (.x(dsos),    .y(dsos_lg));
  log2_conv #(.IN_W(FX_W), .IN_FRAC(FX_FRAC)) u_log_wsos (.x(wsos),    .y(wsos_lg));

  logic unused_pv0;
  pipe_reg #(.W(3*$bits(lg_t)), .EN(PIPELINED)) u_pipe_log (
    .clk(clk), .rst(rst), .in_valid(1'b0),
    .d({num_lg, dsos_lg, wsos_lg}),
    .out_valid(unused_pv0), .q({num_lg_s, dsos_lg_s, wsos_lg_s}));

  // denominator: sqrt(SOSd * SOSw) = (log SOSd + log SOSw) >> 1
  // quotient:    log |num| - log den
  logic signed [LG_W-1:0] den_val;
  lg_t coef_lg, coef_lg_s;

  always_comb begin
    den_val      = (dsos_lg_s.val + wsos_lg_s.val) >>> 1;
    coef_lg.zero = num_lg_s.zero | dsos_lg_s.zero | wsos_lg_s.zero;
    coef_lg.neg  = num_lg_s.neg;
    coef_lg.val  = num_lg_s.val - den_val;
  end

  logic unused_pv1;
  pipe_reg #(.W($bits(lg_t)), .EN(PIPELINED)) u_pipe_coef (
    .clk(clk), .rst(rst), .in_valid(1'b0), .d(coef_lg),
    .out_valid(unused_pv1), .q(coef_lg_s));

  ilog2_conv u_ilog_coef (.x(coef_lg_s), .y(coef));

  assign coef_valid = v_dly[DLY];
  assign coef_index = idx_dly[DLY];

  // ---------------- best match ----------------
  priority_reg #(.IDX_W(IDX_W)) u_best (
    .clk(clk), .rst(rst), .clear(result_clear),
    .in_valid(coef_valid), .coef(coef), .index(coef_index),
    .has_value(has_value), .best_coef(best_coef), .best_index(best_index));

  always_comb begin
    busy = 1'b0;
    for (int i = 0; i <= DLY; i++) busy |= v_dly[i];
  end

endmodule

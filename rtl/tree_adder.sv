// tree_adder: binary adder tree summing N signed operands.
//
// The operands are added pairwise in log2(N) levels (128, 64, ..., 2, 1 adders
// for N = 256), so the critical path is eight adders deep instead of the 255
// of a serial chain. With PIPELINED set, every level is followed by a
// register: a new set of operands can enter every cycle and its sum appears
// LEVELS cycles later (8 for N = 256); in_valid travels along as out_valid.
// With PIPELINED clear the tree is combinational and out_valid = in_valid.
// The tree shape and the eight pipeline stages follow the design description;
// registering the output of the last level is this design's reading of it.
module tree_adder #(
  parameter int N         = 256,  // number of operands, a power of two
  parameter int W         = 64,   // operand and sum width
  parameter bit PIPELINED = 1'b1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  in  [N],
  output logic                 out_valid,
  output logic signed [W-1:0]  sum
);

  localparam int LEVELS = $clog2(N);

  // g_level[l] reduces N>>l partial sums to N>>(l+1)
  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int M = N >> (l + 1);
    logic signed [W-1:0] a   [2*M];
    logic                a_v;
    logic signed [W-1:0] nxt [M];
    logic signed [W-1:0] q   [M];
    logic                q_v;
    if (l == 0) begin : g_first
      assign a   = in;
      assign a_v = in_valid;
    end else begin : g_next
      assign a   = g_level[l-1].q;
      assign a_v = g_level[l-1].q_v;
    end
    always_comb
      for (int i = 0; i < M; i++)
        nxt[i] = a[2*i] + a[2*i+1];
    if (PIPELINED) begin : g_reg
      always_ff @(posedge clk) begin
        q <= nxt;
        if (rst) q_v <= 1'b0;
        else     q_v <= a_v;
      end
    end else begin : g_comb
      assign q   = nxt;
      assign q_v = a_v;
    end
  end

  assign sum       = g_level[LEVELS-1].q[0];
  assign out_valid = g_level[LEVELS-1].q_v;

endmodule

// priority_reg: keeps the greatest correlation coefficient seen since the
// last clear, and the index of the window patch that produced it.
//
// clear (one cycle) empties the register; each cycle with in_valid compares
// the incoming signed 32.32 coefficient with the stored one and replaces it
// when the new one is strictly greater, or when the register is empty, so
// among equal scores the earliest patch wins. Outputs are registered and
// change the cycle after the winning input. The keep-the-maximum function
// follows the design description; tie handling and the empty flag
// (has_value) are this design's choices.
module priority_reg
  import ncc_pkg::*;
#(
  parameter int IDX_W = 13
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic             in_valid,
  input  fx_t              coef,
  input  logic [IDX_W-1:0] index,
  output logic             has_value,
  output fx_t              best_coef,
  output logic [IDX_W-1:0] best_index
);

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      has_value  <= 1'b0;
      best_coef  <= '0;
      best_index <= '0;
    end else if (in_valid && (!has_value || coef > best_coef)) begin
      has_value  <= 1'b1;
      best_coef  <= coef;
      best_index <= index;
    end
  end

endmodule

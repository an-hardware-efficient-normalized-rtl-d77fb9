// pipe_reg: optional pipeline register. With EN set the W-bit value is
// registered (reset clears only the valid bit); with EN clear it is a wire.
// Used to place the optional pipeline stages of the NCC datapath.
module pipe_reg #(
  parameter int W  = 1,
  parameter bit EN = 1'b1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [W-1:0] d,
  output logic         out_valid,
  output logic [W-1:0] q
);
  if (EN) begin : g_reg
    always_ff @(posedge clk) begin
      q <= d;
      if (rst) out_valid <= 1'b0;
      else     out_valid <= in_valid;
    end
  end else begin : g_wire
    assign q         = d;
    assign out_valid = in_valid;
  end
endmodule

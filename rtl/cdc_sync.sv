// cdc_sync: two-flop synchronizer for level signals crossing between the
// 250 MHz PCIe clock domain and the 25 MHz NCC clock domain.
//
// d is sampled by the first register in the destination clock domain and
// passed through a second one before use, giving metastability a full cycle
// to settle; q follows d two or three destination edges later. Both
// registers carry the ASYNC_REG attribute so a placer keeps them in one
// slice. Each bit is synchronized on its own, so a multi-bit W is only safe
// for bits that are quasi-static or change one at a time. The double
// register and the attribute follow the design description; the reset
// value is this design's choice.
module cdc_sync #(
  parameter int          W         = 1,
  parameter logic [W-1:0] RST_VAL  = '0
) (
  input  logic         clk,     // destination clock
  input  logic         rst,     // destination-domain reset
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  (* ASYNC_REG = "TRUE" *) logic [W-1:0] meta;
  (* ASYNC_REG = "TRUE" *) logic [W-1:0] sync;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= RST_VAL;
      sync <= RST_VAL;
    end else begin
      meta <= d;
      sync <= meta;
    end
  end

  assign q = sync;
endmodule

// bram_tdp: true dual-port block RAM, 64K x 32 bits (256 KB) by default.
//
// Two fully independent ports, each with its own clock, enable, write
// enable, address and data. A port reads the old contents of an address it
// writes in the same cycle (read-first). Read data passes through the array
// read register and one output register stage, so it is valid two edges of
// the port clock after the enable (OUT_REG = 0 leaves one). When both ports
// write one address in the same instant the result is undefined, as in the
// FPGA primitive. Size, the 32-bit ports, the dual clocks and the output
// register follow the design description; the read-first mode is this
// design's choice. The array is written from two clocked processes, one per
// port and clock, as true dual-port RAM inference requires; the two
// processes therefore use plain always blocks. Lint tools report the array
// as driven from two blocks with different clocks; that is intended here.
module bram_tdp #(
  parameter int AW      = 16,
  parameter int DW      = 32,
  parameter bit OUT_REG = 1'b1
) (
  input  logic          clk_a,
  input  logic          en_a,
  input  logic          we_a,
  input  logic [AW-1:0] addr_a,
  input  logic [DW-1:0] din_a,
  output logic [DW-1:0] dout_a,
  input  logic          clk_b,
  input  logic          en_b,
  input  logic          we_b,
  input  logic [AW-1:0] addr_b,
  input  logic [DW-1:0] din_b,
  output logic [DW-1:0] dout_b
);

  logic [DW-1:0] mem [2**AW];
  logic [DW-1:0] rd_a, rd_b;

  always @(posedge clk_a) begin
    if (en_a) begin
      rd_a <= mem[addr_a];
      if (we_a) mem[addr_a] <= din_a;
    end
  end

  always @(posedge clk_b) begin
    if (en_b) begin
      rd_b <= mem[addr_b];
      if (we_b) mem[addr_b] <= din_b;
    end
  end

  if (OUT_REG) begin : g_out_reg
    always_ff @(posedge clk_a) dout_a <= rd_a;
    always_ff @(posedge clk_b) dout_b <= rd_b;
  end else begin : g_no_out_reg
    assign dout_a = rd_a;
    assign dout_b = rd_b;
  end

endmodule

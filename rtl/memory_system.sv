// memory_system: the 1 MB shared memory between the PCIe side and the NCC
// side, plus the control/status register.
//
// Four bram_tdp banks of 256 KB each form 2^18 32-bit words. Port A of every
// bank runs on the 250 MHz PCIe clock, port B on the 25 MHz NCC clock, so the
// memory itself is the clock-domain crossing for all bulk data. Address bits
// [17:16] select the bank on both sides; the bank number is delayed along
// with the read so that the returning word is taken from the right bank.
// PCIe side (A): a 19-bit word address covers the 2 MB BAR. Addresses below
// 2^18 reach the banks; CTRL_ADDR (0x7FFFE) is the control register; any other
// address ignores writes and reads as zero. A read returns a_rvalid/a_rdata
// READ_LAT = 2 edges after a_en.
// Control register (PCIe domain): bit 0 go, bits [2:1] operation (op_e),
// bits [31:16] count. Reads return the register with bit 4 replaced by the
// done flag, which arrives from the NCC domain through cdc_sync.
// NCC side (B): an 18-bit word address, same two-edge read latency.
// The bank count and size, the dual clocks and the control register living
// in the PCIe domain follow the design description; the register layout and
// the out-of-range behaviour are this design's choices.
module memory_system
  import ncc_pkg::*;
#(
  parameter int NUM_BANKS = 4
) (
  // PCIe side, 250 MHz
  input  logic                clk_a,
  input  logic                rst_a,
  input  logic                a_en,
  input  logic                a_we,
  input  logic [BAR_AW-1:0]   a_addr,
  input  logic [WORD_W-1:0]   a_wdata,
  output logic                a_rvalid,
  output logic [WORD_W-1:0]   a_rdata,
  output logic [WORD_W-1:0]   ctrl_reg,     // to be synchronized by the NCC side
  input  logic                done_async,   // from the NCC domain
  // NCC side, 25 MHz
  input  logic                clk_b,
  input  logic                rst_b,
  input  logic                b_en,
  input  logic                b_we,
  input  logic [MEM_AW-1:0]   b_addr,
  input  logic [WORD_W-1:0]   b_wdata,
  output logic                b_rvalid,
  output logic [WORD_W-1:0]   b_rdata
);

  localparam int BSEL_W = $clog2(NUM_BANKS);
  localparam int READ_LAT = 2;

  logic [WORD_W-1:0] dout_a [NUM_BANKS];
  logic [WORD_W-1:0] dout_b [NUM_BANKS];

  logic               a_in_mem, a_is_ctrl;
  logic [BSEL_W-1:0]  a_bank, b_bank;

  assign a_in_mem  = (a_addr < BAR_AW'(NUM_BANKS * 2**BANK_AW));
  assign a_is_ctrl = (a_addr == CTRL_ADDR);
  assign a_bank    = a_addr[BANK_AW +: BSEL_W];
  assign b_bank    = b_addr[BANK_AW +: BSEL_W];

  for (genvar i = 0; i < NUM_BANKS; i++) begin : g_bank
    bram_tdp #(.AW(BANK_AW), .DW(WORD_W), .OUT_REG(1'b1)) u_bram (
      .clk_a  (clk_a),
      .en_a   (a_en && a_in_mem && a_bank == BSEL_W'(i)),
      .we_a   (a_we),
      .addr_a (a_addr[BANK_AW-1:0]),
      .din_a  (a_wdata),
      .dout_a (dout_a[i]),
      .clk_b  (clk_b),
      .en_b   (b_en && b_bank == BSEL_W'(i)),
      .we_b   (b_we),
      .addr_b (b_addr[BANK_AW-1:0]),
      .din_b  (b_wdata),
      .dout_b (dout_b[i]));
  end

  // ---------------- control register (PCIe domain) ----------------
  logic done_sync;
  cdc_sync #(.W(1)) u_done_sync (.clk(clk_a), .rst(rst_a), .d(done_async), .q(done_sync));

  always_ff @(posedge clk_a) begin
    if (rst_a)                       ctrl_reg <= '0;
    else if (a_en && a_we && a_is_ctrl) ctrl_reg <= a_wdata;
  end

  // ---------------- port A read return ----------------
  typedef enum logic [1:0] {SRC_NONE, SRC_MEM, SRC_CTRL} a_src_e;
  a_src_e            a_src   [READ_LAT];
  logic [BSEL_W-1:0] a_bsel  [READ_LAT];
  logic              a_rv    [READ_LAT];
  logic [WORD_W-1:0] ctrl_rd [READ_LAT];

  always_ff @(posedge clk_a) begin
    if (rst_a) begin
      for (int i = 0; i < READ_LAT; i++) a_rv[i] <= 1'b0;
    end else begin
      a_rv[0] <= a_en && !a_we;
      for (int i = 1; i < READ_LAT; i++) a_rv[i] <= a_rv[i-1];
    end
    a_src[0]   <= a_in_mem ? SRC_MEM : (a_is_ctrl ? SRC_CTRL : SRC_NONE);
    a_bsel[0]  <= a_bank;
    ctrl_rd[0] <= {ctrl_reg[WORD_W-1:CTRL_DONE_BIT+1], done_sync, ctrl_reg[CTRL_DONE_BIT-1:0]};
    for (int i = 1; i < READ_LAT; i++) begin
      a_src[i]   <= a_src[i-1];
      a_bsel[i]  <= a_bsel[i-1];
      ctrl_rd[i] <= ctrl_rd[i-1];
    end
  end

  assign a_rvalid = a_rv[READ_LAT-1];
  always_comb begin
    case (a_src[READ_LAT-1])
      SRC_MEM:  a_rdata = dout_a[a_bsel[READ_LAT-1]];
      SRC_CTRL: a_rdata = ctrl_rd[READ_LAT-1];
      default:  a_rdata = '0;
    endcase
  end

  // ---------------- port B read return ----------------
  logic [BSEL_W-1:0] b_bsel [READ_LAT];
  logic              b_rv   [READ_LAT];

  always_ff @(posedge clk_b) begin
    if (rst_b) begin
      for (int i = 0; i < READ_LAT; i++) b_rv[i] <= 1'b0;
    end else begin
      b_rv[0] <= b_en && !b_we;
      for (int i = 1; i < READ_LAT; i++) b_rv[i] <= b_rv[i-1];
    end
    b_bsel[0] <= b_bank;
    for (int i = 1; i < READ_LAT; i++) b_bsel[i] <= b_bsel[i-1];
  end

  assign b_rvalid = b_rv[READ_LAT-1];
  assign b_rdata  = dout_b[b_bsel[READ_LAT-1]];

endmodule

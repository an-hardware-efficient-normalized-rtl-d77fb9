// ncc_pkg: types and constants shared by the NCC coprocessor.
//
// Number formats
//   * Pixels are signed 9-bit integers (mean-subtracted image data). Memory
//     holds them as signed bytes, four per 32-bit word, byte 0 in bits [7:0];
//     they are sign-extended to 9 bits on their way into the NCC core.
//   * Log-domain values (lg_t) carry a sign flag, a zero flag and a 64-bit
//     signed fixed-point log2 magnitude with 10 integer and 54 fraction bits.
//   * Linear ("base 10") values are signed 64-bit fixed point with 32 integer
//     and 32 fraction bits.
// Memory map (32-bit word addresses as seen through the 2 MB PCIe BAR)
//   * 0x00000 .. 0x3FFFF : 1 MB of data, four 256 KB banks.
//   * 0x7FFFE            : control/status register.
//   * Set s (one descriptor and one window) starts at word s*SET_WORDS:
//     64 descriptor words (16 rows x 4 words) then 1600 window words
//     (80 rows x 20 words), both row-major.
//   * The result of set s is written at RESULT_BASE + 3*s as
//     {coefficient[63:32], coefficient[31:0], best patch index}.
// The array sizes, pixel width and log/linear widths follow the design
// description; the memory map and control register layout are this
// design's own choices.
package ncc_pkg;

  // Patch geometry
  localparam int DESC_DIM   = 16;               // descriptor is 16x16
  localparam int WIN_DIM    = 80;               // search window is 80x80
  localparam int POS_DIM    = WIN_DIM - DESC_DIM + 1;   // 65 positions per axis
  localparam int NUM_PE     = DESC_DIM * DESC_DIM;      // 256 PEs
  localparam int PIX_PER_WORD = 4;

  // Number formats
  localparam int PIX_W      = 9;
  localparam int LG_INT     = 10;
  localparam int LG_FRAC    = 54;
  localparam int LG_W       = LG_INT + LG_FRAC;  // 64
  localparam int FX_INT     = 32;
  localparam int FX_FRAC    = 32;
  localparam int FX_W       = FX_INT + FX_FRAC;  // 64

  // Memory
  localparam int WORD_W     = 32;
  localparam int MEM_AW     = 18;                // 1 MB of 32-bit words
  localparam int BAR_AW     = 19;                // 2 MB BAR in 32-bit words
  localparam int BANK_AW    = 16;                // 256 KB bank
  localparam logic [BAR_AW-1:0] CTRL_ADDR = 19'h7FFFE;

  localparam int DESC_WORDS = DESC_DIM * DESC_DIM / PIX_PER_WORD;   // 64
  localparam int WIN_ROW_WORDS = WIN_DIM / PIX_PER_WORD;            // 20
  localparam int WIN_WORDS  = WIN_DIM * WIN_ROW_WORDS;              // 1600
  localparam int SET_WORDS  = DESC_WORDS + WIN_WORDS;               // 1664
  localparam int MAX_SETS   = 150;
  localparam int RESULT_WORDS = 3;
  localparam logic [MEM_AW-1:0] RESULT_BASE = MEM_AW'(MAX_SETS * SET_WORDS);

  // Control register fields
  localparam int CTRL_GO_BIT   = 0;
  localparam int CTRL_DONE_BIT = 4;
  typedef enum logic [1:0] {
    OP_NONE = 2'd0,
    OP_NCC  = 2'd1,   // match every set
    OP_INC  = 2'd2    // memory self-test: add one to every word
  } op_e;

  typedef logic signed [PIX_W-1:0] pix_t;
  typedef logic signed [FX_W-1:0]  fx_t;

  typedef struct packed {
    logic                    zero;   // the value is exactly 0
    logic                    neg;    // the value is negative
    logic signed [LG_W-1:0]  val;    // log2 of the magnitude, 10.54
  } lg_t;

  // One request towards a memory port, held until acknowledged.
  typedef struct packed {
    logic              req;
    logic              we;
    logic [MEM_AW-1:0] addr;
    logic [WORD_W-1:0] wdata;
  } mem_req_t;

  typedef struct packed {
    logic              ack;
    logic [WORD_W-1:0] rdata;
  } mem_rsp_t;

endpackage

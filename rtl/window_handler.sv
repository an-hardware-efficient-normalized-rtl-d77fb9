// window_handler: FSM that cuts every 16x16 patch out of an 80x80 window in
// memory and feeds them to the NCC core, using a 16x20 shift-register
// window holder.
//
// The holder has 16 rows and 20 columns; columns 16..19 are a staging area
// for one memory word (four pixels) per row. For each row offset ro
// (0..64) the holder is cleared and the 20 column groups of window rows
// ro..ro+15 are read, one group (16 words, one per row) at a time, into the
// staging columns:
//   * groups 0..3: after each group the holder shifts left by four; after
//     group 3 columns 0..15 hold the patch at column 0, which is sent;
//   * groups 4..19: after each group the holder shifts left by one pixel
//     four times and the patch in columns 0..15 is sent after every shift.
// So each row offset sends 65 patches, 4225 in all, with patch index
// ro*65 + column. win_load is high for one cycle per patch with the patch on
// win_data. Word address of row y, group g of set `frame` is
// frame*SET_WORDS + DESC_WORDS + y*20 + g. Pixels that are read again for
// the next row offset are simply requested again from memory.
// The holder structure and load/shift order follow the design description;
// the memory layout, the one-shift-per-cycle pacing and the patch numbering
// are this design's choices.
module window_handler
  import ncc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [7:0]  frame,
  output logic        done,
  output logic        busy,
  // memory client
  output mem_req_t    mreq,
  input  mem_rsp_t    mrsp,
  // to the NCC core
  output logic        win_load,
  output pix_t        win_data [DESC_DIM][DESC_DIM],
  output logic [12:0] win_index
);

  localparam int HOLD_W = DESC_DIM + PIX_PER_WORD;   // 20

  typedef enum logic [2:0] {IDLE, CLEAR, REQ, SHIFT4, SHIFT1, EMIT, FIN} state_e;
  state_e            state;
  pix_t              hold [DESC_DIM][HOLD_W];
  logic [6:0]        ro;        // row offset 0..64
  logic [3:0]        r;         // row within the holder
  logic [4:0]        g;         // column group 0..19
  logic [1:0]        sc;        // shifts done in the current group
  logic [6:0]        x;         // column of the patch in the holder
  logic [MEM_AW-1:0] base;
  logic [MEM_AW-1:0] row_addr;  // address of (ro + r, group 0)

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      ro <= '0; r <= '0; g <= '0; sc <= '0; x <= '0;
      base <= '0;
    end else begin
      case (state)
        IDLE: if (start) begin
          base  <= MEM_AW'(frame) * MEM_AW'(SET_WORDS) + MEM_AW'(DESC_WORDS);
          ro    <= '0;
          state <= CLEAR;
        end
        CLEAR: begin
          r <= '0; g <= '0; x <= '0;
          state <= REQ;
        end
        REQ: if (mrsp.ack) begin
          r <= r + 4'd1;
          if (r == 4'(DESC_DIM - 1)) begin
            sc    <= '0;
            state <= (g < 5'd4) ? SHIFT4 : SHIFT1;
          end
        end
        SHIFT4: begin
          if (g == 5'd3) state <= EMIT;
          else begin g <= g + 5'd1; state <= REQ; end
        end
        SHIFT1: begin
          x     <= x + 7'd1;
          state <= EMIT;
        end
        EMIT: begin
          if (g < 5'd4) begin
            g <= g + 5'd1;
            state <= REQ;
          end else if (sc != 2'd3) begin
            sc <= sc + 2'd1;
            state <= SHIFT1;
          end else if (g != 5'(WIN_ROW_WORDS - 1)) begin
            g <= g + 5'd1;
            state <= REQ;
          end else if (ro != 7'(POS_DIM - 1)) begin
            ro <= ro + 7'd1;
            state <= CLEAR;
          end else
            state <= FIN;
        end
        FIN: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  // holder: clear, load the staging columns, shift
  always_ff @(posedge clk) begin
    case (state)
      CLEAR: hold <= '{default: '0};
      REQ: if (mrsp.ack)
        for (int k = 0; k < PIX_PER_WORD; k++)
          hold[r][DESC_DIM + k] <= pix_t'($signed(mrsp.rdata[k*8 +: 8]));
      SHIFT4:
        for (int i = 0; i < DESC_DIM; i++)
          for (int j = 0; j < HOLD_W; j++)
            hold[i][j] <= (j + 4 < HOLD_W) ? hold[i][(j + 4) % HOLD_W] : '0;
      SHIFT1:
        for (int i = 0; i < DESC_DIM; i++)
          for (int j = 0; j < HOLD_W; j++)
            hold[i][j] <= (j + 1 < HOLD_W) ? hold[i][(j + 1) % HOLD_W] : '0;
      default: ;
    endcase
  end

  always_comb begin
    row_addr   = base + MEM_AW'(ro + 7'(r)) * MEM_AW'(WIN_ROW_WORDS);
    mreq.req   = (state == REQ);
    mreq.we    = 1'b0;
    mreq.addr  = row_addr + MEM_AW'(g);
    mreq.wdata = '0;
    win_load   = (state == EMIT);
    win_index  = 13'(ro) * 13'(POS_DIM) + 13'(x);
    for (int i = 0; i < DESC_DIM; i++)
      for (int j = 0; j < DESC_DIM; j++)
        win_data[i][j] = hold[i][j];
    done = (state == FIN);
    busy = (state != IDLE);
  end

endmodule

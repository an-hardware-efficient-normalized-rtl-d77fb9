// descriptor_handler: FSM that moves one 16x16 descriptor from memory into
// the NCC core.
//
// On start it pulses desc_start (resetting the core's load counters) and
// then reads the 64 descriptor words of set `frame`, row by row, four pixels
// per word: word address = frame*SET_WORDS + row*4 + column group. Each word
// that returns from the memory arbiter is sign-extended from four signed
// bytes to four 9-bit pixels and handed to the core with a desc_load strobe
// in the same cycle, so the core's counters stay in step with the requests.
// done pulses for one cycle after the last word.
// Memory interface: mem_req_t held until mem_rsp_t.ack (see mem_arbiter).
// Address computation from row, column and frame index and the handling of
// the memory read delay follow the design description; the memory layout
// and the byte packing are this design's choices.
module descriptor_handler
  import ncc_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic [7:0]         frame,
  output logic               done,
  output logic               busy,
  // memory client
  output mem_req_t           mreq,
  input  mem_rsp_t           mrsp,
  // to the NCC core
  output logic               desc_start,
  output logic               desc_load,
  output logic [4*PIX_W-1:0] desc_data
);

  typedef enum logic [1:0] {IDLE, REQ, FIN} state_e;
  state_e            state;
  logic [3:0]        row;
  logic [1:0]        grp;
  logic [MEM_AW-1:0] base;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      row   <= '0;
      grp   <= '0;
      base  <= '0;
    end else begin
      case (state)
        IDLE: if (start) begin
          base  <= MEM_AW'(frame) * MEM_AW'(SET_WORDS);
          row   <= '0;
          grp   <= '0;
          state <= REQ;
        end
        REQ: if (mrsp.ack) begin
          grp <= grp + 2'd1;
          if (grp == 2'd3) begin
            row <= row + 4'd1;
            if (row == 4'd15) state <= FIN;
          end
        end
        FIN: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    mreq.req   = (state == REQ);
    mreq.we    = 1'b0;
    mreq.addr  = base + MEM_AW'({row, grp});
    mreq.wdata = '0;
    desc_start = (state == IDLE) && start;
    desc_load  = (state == REQ) && mrsp.ack;
    for (int k = 0; k < PIX_PER_WORD; k++)
      desc_data[k*PIX_W +: PIX_W] = PIX_W'($signed(mrsp.rdata[k*8 +: 8]));
    done = (state == FIN);
    busy = (state != IDLE);
  end

endmodule

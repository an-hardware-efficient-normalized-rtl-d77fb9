// ncc_controller: second NCC-side FSM, which runs a whole job.
//
// It waits for the synchronized go bit. For operation OP_NCC it processes
// sets 0 .. count-1 in turn: clear the core's best-match register, run the
// descriptor handler for the set, run the window handler (4225 patches),
// wait until the core has no patch in flight, and write the result to
// RESULT_BASE + 3*set as three words: coefficient bits [63:32], bits [31:0]
// (signed 32.32) and the best patch index. For operation OP_INC, the memory
// self-test, it reads words 0 .. count-1 and writes each back plus one.
// When the job is finished it raises done and holds it until go falls, then
// returns to idle (a four-phase handshake across the clock domains).
// sets_done counts the sets finished in the current job.
// Memory interface: mem_req_t held until mem_rsp_t.ack (see mem_arbiter).
// Starting the handlers, writing results back and counting sets follow the
// design description; the result layout, the increment operation as an
// opcode and the handshake are this design's choices.
module ncc_controller
  import ncc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // control, already in this clock domain
  input  logic        go,
  input  op_e         op,
  input  logic [15:0] count,
  output logic        done,
  output logic [15:0] sets_done,
  // memory client
  output mem_req_t    mreq,
  input  mem_rsp_t    mrsp,
  // handlers
  output logic        desc_go,
  output logic        win_go,
  output logic [7:0]  frame,
  input  logic        desc_done,
  input  logic        win_done,
  // NCC core
  output logic        result_clear,
  input  logic        core_busy,
  input  fx_t         best_coef,
  input  logic [12:0] best_index
);

  typedef enum logic [3:0] {
    IDLE, SET_START, WAIT_DESC, WAIT_WIN, DRAIN, WB, INC_RD, INC_WR, FIN
  } state_e;
  state_e            state;
  logic [15:0]       idx;       // set or word number
  logic [1:0]        wb_n;      // result word being written
  logic [WORD_W-1:0] word_q;
  fx_t               coef_q;
  logic [12:0]       index_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      idx       <= '0;
      wb_n      <= '0;
      sets_done <= '0;
    end else begin
      case (state)
        IDLE: if (go) begin
          idx       <= '0;
          sets_done <= '0;
          if (count == '0)         state <= FIN;
          else if (op == OP_NCC)   state <= SET_START;
          else if (op == OP_INC)   state <= INC_RD;
          else                     state <= FIN;
        end
        SET_START: state <= WAIT_DESC;
        WAIT_DESC: if (desc_done) state <= WAIT_WIN;
        WAIT_WIN:  if (win_done)  state <= DRAIN;
        DRAIN: if (!core_busy) begin
          wb_n  <= '0;
          state <= WB;
        end
        WB: if (mrsp.ack) begin
          wb_n <= wb_n + 2'd1;
          if (wb_n == 2'(RESULT_WORDS - 1)) begin
            sets_done <= sets_done + 16'd1;
            idx       <= idx + 16'd1;
            state     <= (idx + 16'd1 == count) ? FIN : SET_START;
          end
        end
        INC_RD: if (mrsp.ack) state <= INC_WR;
        INC_WR: if (mrsp.ack) begin
          idx   <= idx + 16'd1;
          state <= (idx + 16'd1 == count) ? FIN : INC_RD;
        end
        FIN: if (!go) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == INC_RD && mrsp.ack) word_q <= mrsp.rdata;
    if (state == DRAIN) begin
      coef_q  <= best_coef;
      index_q <= best_index;
    end
  end

  always_comb begin
    mreq = '0;
    case (state)
      WB: begin
        mreq.req  = 1'b1;
        mreq.we   = 1'b1;
        mreq.addr = RESULT_BASE + MEM_AW'(idx) * MEM_AW'(RESULT_WORDS) + MEM_AW'(wb_n);
        case (wb_n)
          2'd0:    mreq.wdata = coef_q[63:32];
          2'd1:    mreq.wdata = coef_q[31:0];
          default: mreq.wdata = WORD_W'(index_q);
        endcase
      end
      INC_RD: begin
        mreq.req  = 1'b1;
        mreq.addr = MEM_AW'(idx);
      end
      INC_WR: begin
        mreq.req   = 1'b1;
        mreq.we    = 1'b1;
        mreq.addr  = MEM_AW'(idx);
        mreq.wdata = word_q + WORD_W'(1);
      end
      default: ;
    endcase
    result_clear = (state == SET_START);
    desc_go      = (state == SET_START);
    win_go       = (state == WAIT_DESC) && desc_done;
    frame        = idx[7:0];
    done         = (state == FIN);
  end

endmodule

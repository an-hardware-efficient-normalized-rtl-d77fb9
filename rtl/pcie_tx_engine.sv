// pcie_tx_engine: transmit FSM of the transceiver. It answers a memory read
// request from pcie_rx_engine with a completion-with-data TLP on the
// endpoint core's 64-bit AXI4-Stream transmit interface.
//
// FETCH reads the requested words from the shared memory, one request per
// cycle, into a buffer of MAX_DW words (the returning words are counted
// separately, so any read latency works). Then the TLP is sent: beat 0 =
// {DW1, DW0}, beat 1 = {payload word 0, DW2}, then two payload words per
// beat; tkeep marks a final half beat and tlast the end. The header carries
// the completer ID, successful status, byte count = 4*length, and the
// requester ID, tag, traffic class, attributes and lower address of the
// request. cpl_done pulses when the last beat has been accepted.
// Requests longer than MAX_DW words are cut to MAX_DW words.
// Forming 32-bit words from memory into packets follows the design
// description; the TLP layout is the PCIe completion format for the assumed
// 64-bit endpoint interface, and buffering a whole completion is this
// design's choice.
module pcie_tx_engine
  import ncc_pkg::*;
#(
  parameter int MAX_DW = 32
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [15:0]        completer_id,
  // request from the receive engine
  input  logic               rd_req,
  input  logic [9:0]         rd_len,
  input  logic [BAR_AW-1:0]  rd_addr,
  input  logic [15:0]        rd_req_id,
  input  logic [7:0]         rd_tag,
  input  logic [2:0]         rd_tc,
  input  logic [1:0]         rd_attr,
  input  logic [6:0]         rd_lower_addr,
  output logic               cpl_done,
  output logic               busy,
  // memory read port
  output logic               mem_en,
  output logic [BAR_AW-1:0]  mem_addr,
  input  logic               mem_rvalid,
  input  logic [WORD_W-1:0]  mem_rdata,
  // AXI4-Stream to the endpoint core
  output logic [63:0]        tx_tdata,
  output logic [7:0]         tx_tkeep,
  output logic               tx_tlast,
  output logic               tx_tvalid,
  input  logic               tx_tready
);

  localparam int CW = $clog2(MAX_DW + 1);

  typedef enum logic [2:0] {IDLE, FETCH, HDR0, HDR1, DATA, DONE} state_e;
  state_e            state;
  logic [WORD_W-1:0] buffer [MAX_DW];
  logic [CW-1:0]     len, issued, received, sent;

  logic [31:0] dw0, dw1, dw2;
  assign dw0 = {1'b0, 2'b10, 5'b01010, 1'b0, rd_tc, 4'b0, 1'b0, 1'b0, rd_attr, 2'b0,
                10'(len)};
  assign dw1 = {completer_id, 3'b000, 1'b0, 12'(len) << 2};
  assign dw2 = {rd_req_id, rd_tag, 1'b0, rd_lower_addr};

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      len <= '0; issued <= '0; received <= '0; sent <= '0;
    end else begin
      case (state)
        IDLE: if (rd_req) begin
          len      <= (rd_len > 10'(MAX_DW) || rd_len == 10'd0) ? CW'(MAX_DW) : CW'(rd_len);
          issued   <= '0;
          received <= '0;
          state    <= FETCH;
        end
        FETCH: begin
          if (issued != len) issued <= issued + CW'(1);
          if (mem_rvalid) begin
            received <= received + CW'(1);
            if (received + CW'(1) == len) state <= HDR0;
          end
        end
        HDR0: if (tx_tready) state <= HDR1;
        HDR1: if (tx_tready) begin
          sent  <= CW'(1);
          state <= (len == CW'(1)) ? DONE : DATA;
        end
        DATA: if (tx_tready) begin
          sent <= sent + CW'(2);
          if (sent + CW'(2) >= len) state <= DONE;
        end
        DONE: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  always_ff @(posedge clk)
    if (state == FETCH && mem_rvalid) buffer[received[CW-2:0]] <= mem_rdata;

  always_comb begin
    mem_en    = (state == FETCH) && (issued != len);
    mem_addr  = rd_addr + BAR_AW'(issued);
    tx_tvalid = 1'b0;
    tx_tlast  = 1'b0;
    tx_tkeep  = 8'hFF;
    tx_tdata  = '0;
    case (state)
      HDR0: begin
        tx_tvalid = 1'b1;
        tx_tdata  = {dw1, dw0};
      end
      HDR1: begin
        tx_tvalid = 1'b1;
        tx_tdata  = {buffer[0], dw2};
        tx_tlast  = (len == CW'(1));
      end
      DATA: begin
        tx_tvalid = 1'b1;
        tx_tdata  = {buffer[sent[CW-2:0] + (CW-1)'(1)], buffer[sent[CW-2:0]]};
        tx_tlast  = (sent + CW'(2) >= len);
        tx_tkeep  = (sent + CW'(1) == len) ? 8'h0F : 8'hFF;
      end
      default: ;
    endcase
    cpl_done = (state == DONE);
    busy     = (state != IDLE);
  end

endmodule

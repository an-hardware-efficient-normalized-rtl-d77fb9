// pcie_rx_engine: receive FSM of the transceiver between the PCIe endpoint
// core's AXI4-Stream receive interface and the shared memory.
//
// TLPs arrive on a 64-bit stream in the 7-series endpoint order: beat 0
// holds header DW0 in [31:0] and DW1 in [63:32]; beat 1 holds DW2 (the
// address, for 3-DW headers) in [31:0] and, for a write, the first payload
// DW in [63:32]; later beats hold two payload DWs each, lower DW first.
//   * Memory write (MWr, 32-bit address): the payload is split into 32-bit
//     words written to consecutive word addresses from address[20:2],
//     one word per cycle; tready is held low while the upper word of a beat
//     is being written.
//   * Memory read (MRd, 32-bit address): requester ID, tag, traffic class,
//     attributes, length and address go to the transmit engine; no further
//     TLP is accepted until it reports the completion sent.
//   * Every other TLP is consumed and dropped.
// Byte enables are ignored: all accesses are whole, aligned 32-bit words.
// Splitting packets into 32-bit words and the receiver/transmitter split
// follow the design description; the stream format is that of the endpoint
// core assumed here (64-bit, 3-DW headers), and the rest is this design's
// choice.
module pcie_rx_engine
  import ncc_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  // AXI4-Stream from the endpoint core
  input  logic [63:0]        rx_tdata,
  input  logic [7:0]         rx_tkeep,
  input  logic               rx_tlast,
  input  logic               rx_tvalid,
  output logic               rx_tready,
  // memory write port
  output logic               wr_en,
  output logic [BAR_AW-1:0]  wr_addr,
  output logic [WORD_W-1:0]  wr_data,
  // read request to the transmit engine
  output logic               rd_req,
  output logic [9:0]         rd_len,
  output logic [BAR_AW-1:0]  rd_addr,
  output logic [15:0]        rd_req_id,
  output logic [7:0]         rd_tag,
  output logic [2:0]         rd_tc,
  output logic [1:0]         rd_attr,
  output logic [6:0]         rd_lower_addr,
  input  logic               cpl_done
);

  localparam logic [7:0] FMT_TYPE_MRD32 = 8'h00;
  localparam logic [7:0] FMT_TYPE_MWR32 = 8'h40;

  typedef enum logic [2:0] {HDR, W_ADDR, W_DATA, R_ADDR, R_WAIT, DROP} state_e;
  state_e            state;
  logic [9:0]        remain;    // payload words still to write
  logic              upper;     // writing the upper word of the current beat
  logic [BAR_AW-1:0] addr_q;

  logic unused_keep;
  assign unused_keep = ^rx_tkeep;

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= HDR;
      remain <= '0;
      upper  <= 1'b0;
      addr_q <= '0;
      rd_req <= 1'b0;
      rd_len <= '0; rd_addr <= '0; rd_req_id <= '0; rd_tag <= '0;
      rd_tc <= '0; rd_attr <= '0; rd_lower_addr <= '0;
    end else begin
      case (state)
        HDR: if (rx_tvalid) begin
          rd_len    <= rx_tdata[9:0];
          remain    <= rx_tdata[9:0];
          rd_tc     <= rx_tdata[22:20];
          rd_attr   <= rx_tdata[13:12];
          rd_req_id <= rx_tdata[63:48];
          rd_tag    <= rx_tdata[47:40];
          if (rx_tlast)                             state <= HDR;
          else if (rx_tdata[31:24] == FMT_TYPE_MWR32) state <= W_ADDR;
          else if (rx_tdata[31:24] == FMT_TYPE_MRD32) state <= R_ADDR;
          else                                      state <= DROP;
        end
        W_ADDR: if (rx_tvalid) begin
          addr_q <= rx_tdata[BAR_AW+1:2] + BAR_AW'(1);
          remain <= remain - 10'd1;
          upper  <= 1'b0;
          state  <= rx_tlast ? HDR : W_DATA;
        end
        W_DATA: if (rx_tvalid) begin
          addr_q <= addr_q + BAR_AW'(1);
          remain <= remain - 10'd1;
          if (upper || remain == 10'd1) begin
            upper <= 1'b0;
            if (rx_tlast) state <= HDR;
          end else
            upper <= 1'b1;
        end
        R_ADDR: if (rx_tvalid) begin
          rd_addr       <= rx_tdata[BAR_AW+1:2];
          rd_lower_addr <= {rx_tdata[6:2], 2'b00};
          rd_req        <= 1'b1;
          state         <= rx_tlast ? R_WAIT : DROP;
        end
        R_WAIT: if (cpl_done) begin
          rd_req <= 1'b0;
          state  <= HDR;
        end
        DROP: if (rx_tvalid && rx_tlast) state <= rd_req ? R_WAIT : HDR;
        default: state <= HDR;
      endcase
    end
  end

  always_comb begin
    wr_en   = 1'b0;
    wr_addr = addr_q;
    wr_data = rx_tdata[63:32];
    case (state)
      HDR, DROP: rx_tready = 1'b1;
      W_ADDR: begin
        rx_tready = 1'b1;
        wr_en     = rx_tvalid;
        wr_addr   = rx_tdata[BAR_AW+1:2];
        wr_data   = rx_tdata[63:32];
      end
      W_DATA: begin
        // the lower word is written first; the beat is consumed with the
        // upper word, or with the lower one if it is the last of the payload
        rx_tready = upper || remain == 10'd1;
        wr_en     = rx_tvalid;
        wr_data   = upper ? rx_tdata[63:32] : rx_tdata[31:0];
      end
      R_ADDR:  rx_tready = 1'b1;
      default: rx_tready = 1'b0;
    endcase
  end

  // a read request is held until its completion has been sent
  a_req_hold: assert property (@(posedge clk) disable iff (rst)
    rd_req && !cpl_done |=> rd_req && $stable(rd_addr));

endmodule

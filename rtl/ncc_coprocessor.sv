// ncc_coprocessor: top level of the normalized cross correlation
// coprocessor, from the PCIe endpoint's streams to the NCC core.
//
// Data flow: the host writes descriptor/window sets into the 1 MB shared
// memory through memory-write TLPs (pcie_rx_engine), starts a job by writing
// the control register, polls it for the done flag, and reads the results
// back through memory-read TLPs answered by pcie_tx_engine. On the NCC side
// ncc_controller runs the job: descriptor_handler and window_handler fetch
// the pixels through mem_arbiter and feed ncc_core, whose best coefficient
// and patch index are written back to memory.
// Clocks: clk_pcie (250 MHz) runs the stream engines, memory port A and the
// control register; clk_ncc (25 MHz) runs everything else. The dual-clock
// block RAM carries the data across; go and done cross through two-flop
// synchronizers. rst is synchronous to clk_pcie and reaches the NCC domain
// through a synchronizer, so it must be held for a few clk_ncc cycles.
// The PCIe endpoint core and the clock manager that makes the two clocks are
// outside this module: their streams and clocks are its ports.
// Partitioning and clocking follow the design description; the stream
// format, memory map and control register layout are this design's choices.
module ncc_coprocessor
  import ncc_pkg::*;
#(
  parameter bit PIPELINED = 1'b0    // pipelined NCC datapath variant
) (
  input  logic        clk_pcie,
  input  logic        clk_ncc,
  input  logic        rst,
  input  logic [15:0] cfg_completer_id,
  // receive stream from the endpoint core
  input  logic [63:0] m_axis_rx_tdata,
  input  logic [7:0]  m_axis_rx_tkeep,
  input  logic        m_axis_rx_tlast,
  input  logic        m_axis_rx_tvalid,
  output logic        m_axis_rx_tready,
  // transmit stream to the endpoint core
  output logic [63:0] s_axis_tx_tdata,
  output logic [7:0]  s_axis_tx_tkeep,
  output logic        s_axis_tx_tlast,
  output logic        s_axis_tx_tvalid,
  input  logic        s_axis_tx_tready,
  // status (NCC domain), e.g. for board LEDs
  output logic        job_done,
  output logic [15:0] sets_done
);

  // ---------------- resets ----------------
  logic rst_ncc;
  cdc_sync #(.W(1), .RST_VAL(1'b1)) u_rst_sync (
    .clk(clk_ncc), .rst(1'b0), .d(rst), .q(rst_ncc));

  // ---------------- PCIe side ----------------
  logic               wr_en;
  logic [BAR_AW-1:0]  wr_addr;
  logic [WORD_W-1:0]  wr_data;
  logic               rd_req, cpl_done, tx_busy;
  logic [9:0]         rd_len;
  logic [BAR_AW-1:0]  rd_addr;
  logic [15:0]        rd_req_id;
  logic [7:0]         rd_tag;
  logic [2:0]         rd_tc;
  logic [1:0]         rd_attr;
  logic [6:0]         rd_lower_addr;
  logic               tx_mem_en;
  logic [BAR_AW-1:0]  tx_mem_addr;
  logic               a_rvalid;
  logic [WORD_W-1:0]  a_rdata;

  pcie_rx_engine u_rx (
    .clk(clk_pcie), .rst(rst),
    .rx_tdata(m_axis_rx_tdata), .rx_tkeep(m_axis_rx_tkeep), .rx_tlast(m_axis_rx_tlast),
    .rx_tvalid(m_axis_rx_tvalid), .rx_tready(m_axis_rx_tready),
    .wr_en, .wr_addr, .wr_data,
    .rd_req, .rd_len, .rd_addr, .rd_req_id, .rd_tag, .rd_tc, .rd_attr, .rd_lower_addr,
    .cpl_done);

  pcie_tx_engine u_tx (
    .clk(clk_pcie), .rst(rst), .completer_id(cfg_completer_id),
    .rd_req, .rd_len, .rd_addr, .rd_req_id, .rd_tag, .rd_tc, .rd_attr, .rd_lower_addr,
    .cpl_done, .busy(tx_busy),
    .mem_en(tx_mem_en), .mem_addr(tx_mem_addr), .mem_rvalid(a_rvalid), .mem_rdata(a_rdata),
    .tx_tdata(s_axis_tx_tdata), .tx_tkeep(s_axis_tx_tkeep), .tx_tlast(s_axis_tx_tlast),
    .tx_tvalid(s_axis_tx_tvalid), .tx_tready(s_axis_tx_tready));

  // ---------------- shared memory ----------------
  logic [WORD_W-1:0]  ctrl_reg;
  logic               b_en, b_we, b_rvalid;
  logic [MEM_AW-1:0]  b_addr;
  logic [WORD_W-1:0]  b_wdata, b_rdata;
  logic               ncc_done;

  // the receive engine stalls while a completion is being served, so the
  // two never use port A in the same cycle
  memory_system u_mem (
    .clk_a(clk_pcie), .rst_a(rst),
    .a_en(wr_en | tx_mem_en), .a_we(wr_en),
    .a_addr(wr_en ? wr_addr : tx_mem_addr), .a_wdata(wr_data),
    .a_rvalid, .a_rdata, .ctrl_reg, .done_async(ncc_done),
    .clk_b(clk_ncc), .rst_b(rst_ncc),
    .b_en, .b_we, .b_addr, .b_wdata, .b_rvalid, .b_rdata);

  // ---------------- NCC side ----------------
  localparam int CL_CTRL = 0, CL_DESC = 1, CL_WIN = 2;
  mem_req_t cl_req [3];
  mem_rsp_t cl_rsp [3];
  logic        ctrl_go;
  op_e         ctrl_op;
  logic [15:0] ctrl_count;

  mem_arbiter #(.N_CLIENTS(3)) u_arb (
    .clk(clk_ncc), .rst(rst_ncc), .cl_req, .cl_rsp,
    .m_en(b_en), .m_we(b_we), .m_addr(b_addr), .m_wdata(b_wdata),
    .m_rvalid(b_rvalid), .m_rdata(b_rdata),
    .ctrl_reg_async(ctrl_reg), .ctrl_go, .ctrl_op, .ctrl_count);

  logic        desc_go, win_go, desc_done, win_done, desc_busy, win_busy;
  logic [7:0]  frame;
  logic        result_clear, core_busy;
  fx_t         best_coef;
  logic [12:0] best_index;

  ncc_controller u_ctrl (
    .clk(clk_ncc), .rst(rst_ncc),
    .go(ctrl_go), .op(ctrl_op), .count(ctrl_count), .done(ncc_done), .sets_done,
    .mreq(cl_req[CL_CTRL]), .mrsp(cl_rsp[CL_CTRL]),
    .desc_go, .win_go, .frame, .desc_done, .win_done,
    .result_clear, .core_busy, .best_coef, .best_index);

  assign job_done = ncc_done;

  logic               desc_start, desc_load;
  logic [4*PIX_W-1:0] desc_data;
  logic               win_load;
  pix_t               win_data [DESC_DIM][DESC_DIM];
  logic [12:0]        win_index;

  descriptor_handler u_desc (
    .clk(clk_ncc), .rst(rst_ncc), .start(desc_go), .frame, .done(desc_done), .busy(desc_busy),
    .mreq(cl_req[CL_DESC]), .mrsp(cl_rsp[CL_DESC]),
    .desc_start, .desc_load, .desc_data);

  window_handler u_win (
    .clk(clk_ncc), .rst(rst_ncc), .start(win_go), .frame, .done(win_done), .busy(win_busy),
    .mreq(cl_req[CL_WIN]), .mrsp(cl_rsp[CL_WIN]),
    .win_load, .win_data, .win_index);

  logic        coef_valid, has_value;
  fx_t         coef;
  logic [12:0] coef_index;

  ncc_core #(.PIPELINED(PIPELINED)) u_core (
    .clk(clk_ncc), .rst(rst_ncc),
    .desc_start, .desc_load, .desc_data,
    .win_load, .win_data, .win_index,
    .result_clear, .coef_valid, .coef, .coef_index,
    .has_value, .best_coef, .best_index, .busy(core_busy));

  logic unused;
  assign unused = ^{tx_busy, desc_busy, win_busy, coef_valid, has_value, coef, coef_index};

endmodule

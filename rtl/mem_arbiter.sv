// mem_arbiter: first of the four NCC-side control FSMs. It owns the NCC port
// of the shared memory and brings the control register into the NCC clock
// domain.
//
// Memory: N_CLIENTS clients each present a mem_req_t and hold it until they
// see ack in their mem_rsp_t. The arbiter serves one request at a time,
// lowest client number first: it drives the memory enable for one cycle
// (ISSUE), waits for the read data to return (WAIT, two cycles for the
// block RAM), and then acknowledges with the read word for one cycle (ACK).
// A write is acknowledged in the cycle after it is issued. A read therefore
// takes four NCC cycles and a write two, plus one idle cycle between
// requests.
// Control: the go bit of the control register passes through cdc_sync; the
// operation and count fields are only taken while the synchronized go bit
// is high, by which time they have been stable for two cycles, and are
// passed on to the controller.
// Serving all memory traffic and passing on the control signals follow the
// design description; the handshake, priority order and timing are this
// design's choices.
module mem_arbiter
  import ncc_pkg::*;
#(
  parameter int N_CLIENTS = 3
) (
  input  logic                clk,
  input  logic                rst,
  // clients
  input  mem_req_t            cl_req [N_CLIENTS],
  output mem_rsp_t            cl_rsp [N_CLIENTS],
  // NCC port of memory_system
  output logic                m_en,
  output logic                m_we,
  output logic [MEM_AW-1:0]   m_addr,
  output logic [WORD_W-1:0]   m_wdata,
  input  logic                m_rvalid,
  input  logic [WORD_W-1:0]   m_rdata,
  // control register, PCIe domain, and its synchronized fields
  input  logic [WORD_W-1:0]   ctrl_reg_async,
  output logic                ctrl_go,
  output op_e                 ctrl_op,
  output logic [15:0]         ctrl_count
);

  localparam int CW = (N_CLIENTS > 1) ? $clog2(N_CLIENTS) : 1;

  typedef enum logic [1:0] {IDLE, ISSUE, WAIT, ACK} state_e;
  state_e            state;
  logic [CW-1:0]     owner;
  mem_req_t          cur;
  logic [WORD_W-1:0] rdata_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      owner <= '0;
      cur   <= '0;
    end else begin
      case (state)
        IDLE: begin
          for (int i = N_CLIENTS - 1; i >= 0; i--)
            if (cl_req[i].req) begin
              owner <= CW'(i);
              cur   <= cl_req[i];
              state <= ISSUE;
            end
        end
        ISSUE: state <= cur.we ? ACK : WAIT;
        WAIT:  if (m_rvalid) state <= ACK;
        ACK:   state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  always_ff @(posedge clk)
    if (state == WAIT && m_rvalid) rdata_q <= m_rdata;

  assign m_en    = (state == ISSUE);
  assign m_we    = cur.we;
  assign m_addr  = cur.addr;
  assign m_wdata = cur.wdata;

  always_comb
    for (int i = 0; i < N_CLIENTS; i++) begin
      cl_rsp[i].ack   = (state == ACK) && (owner == CW'(i));
      cl_rsp[i].rdata = rdata_q;
    end

  // ---------------- control signals ----------------
  logic go_s;
  cdc_sync #(.W(1)) u_go_sync (.clk(clk), .rst(rst), .d(ctrl_reg_async[CTRL_GO_BIT]), .q(go_s));

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl_go    <= 1'b0;
      ctrl_op    <= OP_NONE;
      ctrl_count <= '0;
    end else begin
      ctrl_go <= go_s;
      if (go_s) begin
        ctrl_op    <= op_e'(ctrl_reg_async[2:1]);
        ctrl_count <= ctrl_reg_async[31:16];
      end
    end
  end

  // a client must hold its request, unchanged, until it is acknowledged
  for (genvar i = 0; i < N_CLIENTS; i++) begin : g_chk
    property p_hold;
      @(posedge clk) disable iff (rst)
        (cl_req[i].req && !cl_rsp[i].ack) |=> cl_req[i].req && $stable(cl_req[i].addr);
    endproperty
    a_hold: assert property (p_hold) else $error("client %0d dropped its request", i);
  end

endmodule

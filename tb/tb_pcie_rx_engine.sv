// tb_pcie_rx_engine: self-checking test of the receive engine. Random TLPs
// are sent on the 64-bit receive stream with random gaps in tvalid: memory
// writes of 1 to 20 words, memory reads, and TLPs of other types that must be
// dropped. Every memory write port cycle is compared with the expected
// (address, data) sequence, which the testbench builds from the payload.
// For a read, the request fields (length, word address, requester ID, tag,
// traffic class, attributes, lower address) are checked; the testbench then
// waits a random time before pulsing cpl_done, and the engine must accept no
// beat in between (the stall). Stream beats are driven at the falling edge
// and a beat counts as taken when tvalid and tready are both high at the
// rising edge.
`timescale 1ns/1ps
module tb_pcie_rx_engine;
  import ncc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #2 clk = ~clk;
  int checks = 0, failures = 0;

  logic [63:0] rx_tdata;
  logic [7:0]  rx_tkeep;
  logic rx_tlast, rx_tvalid, rx_tready, wr_en, rd_req, cpl_done;
  logic [BAR_AW-1:0] wr_addr, rd_addr;
  logic [WORD_W-1:0] wr_data;
  logic [9:0] rd_len;
  logic [15:0] rd_req_id;
  logic [7:0] rd_tag;
  logic [2:0] rd_tc;
  logic [1:0] rd_attr;
  logic [6:0] rd_lower_addr;

  pcie_rx_engine dut (.clk, .rst, .rx_tdata, .rx_tkeep, .rx_tlast, .rx_tvalid, .rx_tready,
                      .wr_en, .wr_addr, .wr_data, .rd_req, .rd_len, .rd_addr, .rd_req_id,
                      .rd_tag, .rd_tc, .rd_attr, .rd_lower_addr, .cpl_done);

  // expected memory writes
  logic [BAR_AW-1:0] exp_a [$];
  logic [31:0]       exp_d [$];
  int n_writes = 0, n_stall_cycles = 0;
  always @(posedge clk) if (!rst && wr_en) begin
    checks++;
    if (exp_a.size() == 0) begin
      failures++;
      $display("FAIL unexpected write to %h", wr_addr);
    end else begin
      logic [BAR_AW-1:0] a;
      logic [31:0] d;
      a = exp_a.pop_front();
      d = exp_d.pop_front();
      if (wr_addr != a || wr_data != d) begin
        failures++;
        $display("FAIL write %h=%h, expected %h=%h", wr_addr, wr_data, a, d);
      end
    end
    n_writes++;
  end
  always @(negedge clk) if (rx_tvalid && !rx_tready) n_stall_cycles++;

  task automatic beat(logic [63:0] d, logic last);
    @(negedge clk);
    while ($urandom % 4 == 0) begin
      rx_tvalid = 1'b0;
      @(negedge clk);
    end
    rx_tdata = d; rx_tlast = last; rx_tvalid = 1'b1;
    rx_tkeep = 8'hFF;
    @(posedge clk);
    while (!rx_tready) @(posedge clk);
    #0.5 rx_tvalid = 1'b0;
  endtask

  function automatic logic [63:0] hdr(logic [7:0] ft, int len, logic [2:0] tc, logic [1:0] attr,
                                      logic [15:0] id, logic [7:0] tag);
    return {id, tag, 8'hFF, ft, 1'b0, tc, 4'b0, 2'b00, attr, 2'b00, 10'(len)};
  endfunction

  task automatic mwr(int len);
    logic [31:0] w [$];
    logic [BAR_AW-1:0] a;
    a = BAR_AW'($urandom % 300000);
    for (int i = 0; i < len; i++) begin
      w.push_back($urandom);
      exp_a.push_back(a + BAR_AW'(i));
      exp_d.push_back(w[i]);
    end
    beat(hdr(8'h40, len, 3'd0, 2'd0, 16'h0100, 8'h00), 1'b0);
    beat({w[0], 11'd0, a, 2'b00}, len == 1);
    for (int i = 1; i < len; i += 2)
      beat({(i + 1 < len) ? w[i + 1] : 32'h0, w[i]}, i + 2 >= len);
  endtask

  task automatic mrd();
    int len, wait_cyc, stalled;
    logic [BAR_AW-1:0] a;
    logic [2:0] tc;
    logic [1:0] attr;
    logic [15:0] id;
    logic [7:0] tag;
    len = 1 + int'($urandom % 32); a = BAR_AW'($urandom); tc = 3'($urandom);
    attr = 2'($urandom); id = 16'($urandom); tag = 8'($urandom);
    beat(hdr(8'h00, len, tc, attr, id, tag), 1'b0);
    beat({32'h0, 11'd0, a, 2'b00}, 1'b1);
    @(negedge clk);
    checks++;
    if (!rd_req || rd_len != 10'(len) || rd_addr != a || rd_req_id != id || rd_tag != tag ||
        rd_tc != tc || rd_attr != attr || rd_lower_addr != {a[4:0], 2'b00}) begin
      failures++;
      $display("FAIL read request fields");
    end
    // offer the next header while the completion is pending: it must stall
    rx_tdata = hdr(8'h40, 1, 3'd0, 2'd0, 16'h0, 8'h0); rx_tlast = 1'b0; rx_tvalid = 1'b1;
    wait_cyc = 2 + int'($urandom % 10);
    stalled = 0;
    repeat (wait_cyc) begin
      @(negedge clk);
      if (!rx_tready) stalled++;
    end
    rx_tvalid = 1'b0;
    checks++;
    if (stalled != wait_cyc) begin failures++; $display("FAIL beat accepted during a read"); end
    cpl_done = 1'b1;
    @(negedge clk);
    cpl_done = 1'b0;
    checks++;
    if (rd_req) begin failures++; $display("FAIL rd_req not dropped after cpl_done"); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected_writes;
    rx_tdata = '0; rx_tkeep = '0; rx_tlast = 0; rx_tvalid = 0; cpl_done = 0;
    expected_writes = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      case ($urandom % 4)
        0, 1: begin
          int len;
          len = 1 + int'($urandom % 20);
          expected_writes += len;
          mwr(len);
        end
        2: mrd();
        default: begin   // message TLP with data: dropped
          beat(hdr(8'h72, 2, 3'd0, 2'd0, 16'h0, 8'h0), 1'b0);
          beat(64'h0123_4567_89AB_CDEF, 1'b0);
          beat(64'hFEDC_BA98_7654_3210, 1'b1);
        end
      endcase
    end
    repeat (5) @(negedge clk);
    checks++;
    if (n_writes != expected_writes || exp_a.size() != 0) begin
      failures++;
      $display("FAIL %0d writes, expected %0d", n_writes, expected_writes);
    end
    checks++;
    if (n_stall_cycles == 0) begin failures++; $display("FAIL no stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

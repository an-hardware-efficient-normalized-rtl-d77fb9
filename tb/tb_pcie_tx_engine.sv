// tb_pcie_tx_engine: self-checking test of the completion transmitter. For
// random read requests (1 to 40 words, so some exceed the 32-word limit) a
// behavioural memory answers the engine's reads two clocks after each
// request with a hash of the address. The transmit stream is back-pressured
// at random. Every completion is collected and checked: format/type 0x4A,
// length and byte count (the request length, cut to 32 words), completer ID,
// requester ID, tag, traffic class, attributes and lower address, every
// payload word, tkeep on the last beat, tlast, and exactly one cpl_done
// pulse after the last beat.
`timescale 1ns/1ps
module tb_pcie_tx_engine;
  import ncc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #2 clk = ~clk;
  int checks = 0, failures = 0;

  logic rd_req, cpl_done, busy, mem_en, mem_rvalid, tx_tlast, tx_tvalid, tx_tready;
  logic [9:0] rd_len;
  logic [BAR_AW-1:0] rd_addr, mem_addr;
  logic [15:0] rd_req_id;
  logic [7:0] rd_tag, tx_tkeep;
  logic [2:0] rd_tc;
  logic [1:0] rd_attr;
  logic [6:0] rd_lower_addr;
  logic [31:0] mem_rdata;
  logic [63:0] tx_tdata;

  pcie_tx_engine dut (.clk, .rst, .completer_id(16'hBEEF), .rd_req, .rd_len, .rd_addr,
                      .rd_req_id, .rd_tag, .rd_tc, .rd_attr, .rd_lower_addr, .cpl_done, .busy,
                      .mem_en, .mem_addr, .mem_rvalid, .mem_rdata,
                      .tx_tdata, .tx_tkeep, .tx_tlast, .tx_tvalid, .tx_tready);

  function automatic logic [31:0] word_at(logic [BAR_AW-1:0] a);
    return 32'(a) * 32'h2545F491 + 32'h1357;
  endfunction

  // memory with a read latency of two clocks
  logic v1;
  logic [BAR_AW-1:0] a1, a2;
  always @(posedge clk) begin
    v1 <= mem_en;  mem_rvalid <= v1;
    a1 <= mem_addr; a2 <= a1;
  end
  assign mem_rdata = word_at(a2);

  always @(posedge clk) #0.5 tx_tready = ($urandom % 3) != 0;

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_req = 0; rd_len = '0; rd_addr = '0; rd_req_id = '0; rd_tag = '0;
    rd_tc = '0; rd_attr = '0; rd_lower_addr = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 200; n++) begin
      logic [63:0] beats [$];
      logic [7:0]  keeps [$];
      logic [31:0] words [$];
      int len, n_done;
      beats.delete(); keeps.delete(); words.delete();
      len = 1 + int'($urandom % 40);
      @(negedge clk);
      rd_len = 10'(len); rd_addr = BAR_AW'($urandom % 200000);
      rd_req_id = 16'($urandom); rd_tag = 8'($urandom); rd_tc = 3'($urandom);
      rd_attr = 2'($urandom); rd_lower_addr = {5'($urandom), 2'b00};
      rd_req = 1'b1;
      if (len > 32) len = 32;
      n_done = 0;
      // everything is sampled at the falling edge, where it is stable; a beat
      // with tvalid and tready there is taken at the next rising edge
      forever begin
        @(negedge clk);
        if (cpl_done) begin
          n_done++;
          rd_req = 1'b0;
          break;
        end
        if (tx_tvalid && tx_tready) begin
          beats.push_back(tx_tdata);
          keeps.push_back(tx_tkeep);
          checks++;
          if (tx_tlast != (beats.size() == 1 + (len + 2) / 2)) begin
            failures++;
            $display("FAIL tlast on beat %0d of a %0d-word completion", beats.size(), len);
          end
        end
      end
      @(negedge clk);
      if (cpl_done) n_done++;
      expect_eq("cpl_done pulses", n_done, 1);
      expect_eq("fmt/type", beats[0][31:24], 8'h4A);
      expect_eq("tc", beats[0][22:20], rd_tc);
      expect_eq("attr", beats[0][13:12], rd_attr);
      expect_eq("length", beats[0][9:0], len);
      expect_eq("completer id", beats[0][63:48], 16'hBEEF);
      expect_eq("status", beats[0][47:45], 0);
      expect_eq("byte count", beats[0][43:32], 4 * len);
      expect_eq("requester id", beats[1][31:16], rd_req_id);
      expect_eq("tag", beats[1][15:8], rd_tag);
      expect_eq("lower address", beats[1][6:0], rd_lower_addr);
      words.push_back(beats[1][63:32]);
      for (int b = 2; b < beats.size(); b++) begin
        words.push_back(beats[b][31:0]);
        if (keeps[b] == 8'hFF) words.push_back(beats[b][63:32]);
      end
      expect_eq("beats", beats.size(), 1 + (len + 2) / 2);
      expect_eq("payload words", words.size(), len);
      for (int i = 0; i < words.size() && i < len; i++)
        expect_eq("payload", words[i], word_at(rd_addr + BAR_AW'(i)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

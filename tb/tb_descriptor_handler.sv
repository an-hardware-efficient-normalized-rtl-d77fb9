// tb_descriptor_handler: self-checking test of the descriptor fetcher. A
// behavioural memory answers read requests after a random delay with a word
// that is a fixed hash of its address. For several sets, the handler must
// pulse desc_start once with the start command, then deliver 64 words in
// address order from set*1664, each as four sign-extended 9-bit pixels
// (lowest byte first) on a desc_load cycle, then pulse done once.
`timescale 1ns/1ps
module tb_descriptor_handler;
  import ncc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, done, busy, desc_start, desc_load;
  logic [7:0] frame;
  mem_req_t mreq;
  mem_rsp_t mrsp;
  logic [4*PIX_W-1:0] desc_data;

  descriptor_handler dut (.clk, .rst, .start, .frame, .done, .busy, .mreq, .mrsp,
                          .desc_start, .desc_load, .desc_data);

  function automatic logic [31:0] word_at(int addr);
    return 32'(addr) * 32'h9E3779B1 ^ 32'h0F0F7711;
  endfunction

  initial begin
    int dly;
    mrsp = '0;
    forever begin
      @(negedge clk);
      mrsp.ack = 1'b0;
      if (mreq.req) begin
        dly = 1 + $urandom % 4;
        repeat (dly - 1) @(negedge clk);
        mrsp.ack   = 1'b1;
        mrsp.rdata = word_at(int'(mreq.addr));
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_load = 0, n_start = 0, n_done = 0, cur_set = 0;
  always @(negedge clk) if (!rst) begin
    if (desc_start) n_start++;
    if (desc_load) begin
      logic [31:0] w;
      w = word_at(cur_set * SET_WORDS + n_load);
      for (int k = 0; k < 4; k++) begin
        checks++;
        if ($signed(desc_data[k*PIX_W +: PIX_W]) != $signed(w[k*8 +: 8])) begin
          failures++;
          $display("FAIL set %0d word %0d pixel %0d", cur_set, n_load, k);
        end
      end
      n_load++;
    end
    if (done) n_done++;
  end

  initial begin
    int sets [4];
    sets = '{0, 1, 7, 149};
    start = 1'b0; frame = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    foreach (sets[s]) begin
      cur_set = sets[s];
      n_load = 0; n_start = 0; n_done = 0;
      @(negedge clk);
      frame = 8'(sets[s]); start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      wait (n_done == 1);
      repeat (3) @(negedge clk);
      checks++;
      if (n_load != DESC_WORDS || n_start != 1 || n_done != 1 || busy) begin
        failures++;
        $display("FAIL set %0d: %0d loads, %0d starts, %0d dones", cur_set, n_load, n_start, n_done);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

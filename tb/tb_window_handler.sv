// tb_window_handler: self-checking test of the search-window handler. A
// behavioural memory answers the handler's read requests after a random
// delay of 1 to 4 clocks, returning a word that is a fixed hash of its
// address. For set 2 every emitted 16x16 patch is compared pixel by pixel
// with the window built independently from the same hash (80x80 window,
// 20 words per row, 4 signed bytes per word, lowest byte = leftmost pixel).
// The patches must come in raster order, index = row*65 + column, 4225 of
// them, followed by one done pulse. The handler must hold each request
// unchanged until it is acknowledged.
`timescale 1ns/1ps
module tb_window_handler;
  import ncc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, done, busy, win_load;
  logic [7:0] frame;
  mem_req_t mreq;
  mem_rsp_t mrsp;
  pix_t win_data [DESC_DIM][DESC_DIM];
  logic [12:0] win_index;

  window_handler dut (.clk, .rst, .start, .frame, .done, .busy, .mreq, .mrsp,
                      .win_load, .win_data, .win_index);

  function automatic logic [31:0] word_at(int addr);
    return 32'(addr) * 32'h9E3779B1 ^ 32'h5A5A1234;
  endfunction
  // pixel (row, col) of the window of set s
  function automatic int pix(int s, int row, int col);
    logic [31:0] w = word_at(s * SET_WORDS + DESC_WORDS + row * WIN_ROW_WORDS + col / 4);
    return int'($signed(w[(col % 4) * 8 +: 8]));
  endfunction

  // behavioural memory with random response delay
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
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_patch = 0, n_done = 0, n_bad_pix = 0;
  always @(negedge clk) if (!rst) begin
    if (win_load) begin
      int ro, x;
      ro = n_patch / POS_DIM;
      x  = n_patch % POS_DIM;
      checks++;
      if (int'(win_index) != n_patch) begin
        failures++;
        $display("FAIL patch %0d carries index %0d", n_patch, win_index);
      end
      checks++;
      begin
        bit bad;
        bad = 1'b0;
        for (int i = 0; i < DESC_DIM; i++)
          for (int j = 0; j < DESC_DIM; j++)
            if (int'(win_data[i][j]) != pix(2, ro + i, x + j)) bad = 1'b1;
        if (bad) begin
          failures++;
          if (n_bad_pix++ < 5) $display("FAIL patch %0d (row %0d col %0d) pixels differ", n_patch, ro, x);
        end
      end
      n_patch++;
    end
    if (done) n_done++;
  end

  initial begin
    start = 1'b0; frame = 8'd2;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    wait (n_done == 1);
    repeat (3) @(negedge clk);
    checks++;
    if (n_patch != POS_DIM * POS_DIM) begin
      failures++;
      $display("FAIL %0d patches emitted, expected %0d", n_patch, POS_DIM * POS_DIM);
    end
    checks++;
    if (busy) begin failures++; $display("FAIL still busy after done"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

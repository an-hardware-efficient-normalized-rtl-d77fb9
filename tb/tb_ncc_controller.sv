// tb_ncc_controller: self-checking test of the job sequencer. The handlers
// and the NCC core are replaced by simple responders: desc_done follows
// desc_go after a random delay, win_done follows win_go likewise, core_busy
// stays high for a random time after that, and a new random best coefficient
// and index are presented for every set. A behavioural memory answers the
// controller's requests after a random delay. The test runs an NCC job of
// five sets and an add-one job of twelve words and checks: the order of the
// handler starts and the set number on frame, the three result words of
// every set at their addresses, sets_done, the words after the add-one job,
// and that done stays high until go is dropped.
`timescale 1ns/1ps
module tb_ncc_controller;
  import ncc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #20 clk = ~clk;
  int checks = 0, failures = 0;

  logic go, done, desc_go, win_go, desc_done, win_done, result_clear, core_busy;
  op_e op;
  logic [15:0] count, sets_done;
  mem_req_t mreq;
  mem_rsp_t mrsp;
  logic [7:0] frame;
  fx_t best_coef;
  logic [12:0] best_index;

  ncc_controller dut (.clk, .rst, .go, .op, .count, .done, .sets_done, .mreq, .mrsp,
                      .desc_go, .win_go, .frame, .desc_done, .win_done, .result_clear,
                      .core_busy, .best_coef, .best_index);

  logic [31:0] mem [int];

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // behavioural memory
  initial begin
    int dly;
    mrsp = '0;
    forever begin
      @(negedge clk);
      mrsp.ack = 1'b0;
      if (mreq.req) begin
        dly = 1 + $urandom % 4;
        repeat (dly - 1) @(negedge clk);
        mrsp.ack = 1'b1;
        if (mreq.we) mem[int'(mreq.addr)] = mreq.wdata;
        else         mrsp.rdata = mem.exists(int'(mreq.addr)) ? mem[int'(mreq.addr)] : 32'h0;
      end
    end
  end

  // handler and core responders
  fx_t         coefs [5];
  logic [12:0] idxs  [5];
  int          n_desc_go = 0, n_win_go = 0, seq_err = 0;
  initial begin
    desc_done = 0; best_coef = '0; best_index = '0;
    forever begin
      @(negedge clk);
      if (desc_go) begin
        if (int'(frame) != n_desc_go) seq_err++;
        if (!result_clear) seq_err++;
        n_desc_go++;
        repeat ($urandom % 6) @(negedge clk);
        desc_done = 1'b1;
        @(negedge clk);
        desc_done = 1'b0;
      end
    end
  end
  // win_go is issued in the same cycle as desc_done: sample it at the edge
  initial begin
    win_done = 0; core_busy = 0;
    forever begin
      @(posedge clk);
      if (win_go) begin
        if (n_win_go + 1 != n_desc_go) seq_err++;
        n_win_go++;
        @(negedge clk);
        core_busy = 1'b1;
        repeat ($urandom % 20) @(negedge clk);
        win_done = 1'b1;
        @(negedge clk);
        win_done = 1'b0;
        repeat ($urandom % 5) @(negedge clk);
        best_coef  = coefs[n_win_go - 1];
        best_index = idxs[n_win_go - 1];
        core_busy  = 1'b0;
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

  initial begin
    go = 0; op = OP_NONE; count = '0;
    foreach (coefs[i]) begin
      coefs[i] = fx_t'({$urandom, $urandom});
      idxs[i]  = 13'($urandom % 4225);
    end
    for (int i = 0; i < 12; i++) mem[i] = $urandom;
    mem[3] = 32'hFFFF_FFFF;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // ---- NCC job over five sets ----
    @(negedge clk);
    op = OP_NCC; count = 16'd5; go = 1'b1;
    wait (done);
    @(negedge clk);
    expect_eq("desc starts", n_desc_go, 5);
    expect_eq("win starts", n_win_go, 5);
    expect_eq("sequence errors", seq_err, 0);
    expect_eq("sets_done", sets_done, 5);
    for (int s = 0; s < 5; s++) begin
      int a;
      a = int'(RESULT_BASE) + 3 * s;
      expect_eq("result coef hi", mem[a],     coefs[s][63:32]);
      expect_eq("result coef lo", mem[a + 1], coefs[s][31:0]);
      expect_eq("result index",   mem[a + 2], idxs[s]);
    end
    repeat (10) @(negedge clk);
    expect_eq("done held while go high", done, 1);
    go = 1'b0;
    repeat (2) @(negedge clk);
    expect_eq("done dropped", done, 0);
    // ---- add-one job over twelve words ----
    begin
      logic [31:0] before_inc [12];
      for (int i = 0; i < 12; i++) before_inc[i] = mem[i];
      @(negedge clk);
      op = OP_INC; count = 16'd12; go = 1'b1;
      wait (done);
      @(negedge clk);
      for (int i = 0; i < 12; i++) expect_eq("incremented word", mem[i], 32'(before_inc[i] + 32'd1));
      expect_eq("word after the range untouched", mem.exists(12), 0);
      go = 1'b0;
      repeat (2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ncc_coprocessor: end-to-end test of the coprocessor at its default
// parameters, with the testbench playing the host and the PCIe endpoint.
// The host writes two full sets (a 16x16 descriptor cut from a random 80x80
// window at a known position, plus the window) with memory-write TLPs,
// starts an NCC job through the control register, polls the done flag with
// memory-read TLPs, completes the go/done handshake, and reads the results:
// each set must report a coefficient of exactly 1.0 at the known patch.
// Then it runs the add-one memory test over a few words, writes and reads
// every bank and an unmapped address. The transmit stream is back-pressured
// at random. Mechanisms counted (each must occur): receive stalls while a
// payload is written, transmit back-pressure, multi-beat writes, single-
// and multi-word completions, both operations, the done handshake, all four
// banks, and an unmapped read.
`timescale 1ns/1ps
module tb_ncc_coprocessor;
  import ncc_pkg::*;

  logic clk_pcie = 0, clk_ncc = 0, rst = 1;
  always #2  clk_pcie = ~clk_pcie;   // 250 MHz
  always #20 clk_ncc  = ~clk_ncc;    // 25 MHz

  int checks = 0, failures = 0;

  logic [63:0] rx_tdata;  logic [7:0] rx_tkeep;  logic rx_tlast, rx_tvalid, rx_tready;
  logic [63:0] tx_tdata;  logic [7:0] tx_tkeep;  logic tx_tlast, tx_tvalid, tx_tready;
  logic job_done; logic [15:0] sets_done;

  ncc_coprocessor dut (
    .clk_pcie, .clk_ncc, .rst, .cfg_completer_id(16'h0100),
    .m_axis_rx_tdata(rx_tdata), .m_axis_rx_tkeep(rx_tkeep), .m_axis_rx_tlast(rx_tlast),
    .m_axis_rx_tvalid(rx_tvalid), .m_axis_rx_tready(rx_tready),
    .s_axis_tx_tdata(tx_tdata), .s_axis_tx_tkeep(tx_tkeep), .s_axis_tx_tlast(tx_tlast),
    .s_axis_tx_tvalid(tx_tvalid), .s_axis_tx_tready(tx_tready),
    .job_done, .sets_done);

  // ---------------- mechanism counters ----------------
  int n_rx_stall = 0, n_tx_backpressure = 0, n_multibeat_wr = 0, n_cpl_single = 0,
      n_cpl_multi = 0, n_op_ncc = 0, n_op_inc = 0, n_handshake = 0, n_unmapped = 0;
  int bank_seen [4] = '{0, 0, 0, 0};

  always @(negedge clk_pcie) begin
    if (rx_tvalid && !rx_tready) n_rx_stall++;
    if (tx_tvalid && !tx_tready) n_tx_backpressure++;
  end

  // random back-pressure on the transmit stream
  always @(posedge clk_pcie) tx_tready <= ($urandom_range(0, 3) != 0);

  // ---------------- stream helpers ----------------
  task automatic send_beat(logic [63:0] d, logic [7:0] keep, logic last);
    // drive on the falling edge; the handshake is decided by tready there,
    // which holds until the next rising edge
    @(negedge clk_pcie);
    rx_tdata = d; rx_tkeep = keep; rx_tlast = last; rx_tvalid = 1'b1;
    while (!rx_tready) @(negedge clk_pcie);
    @(posedge clk_pcie); #0.1;
    rx_tvalid = 1'b0; rx_tlast = 1'b0;
  endtask

  // memory write of words[] at 32-bit word address waddr
  task automatic mwr(int unsigned waddr, logic [31:0] words [$]);
    int n = words.size();
    logic [31:0] dw0 = {8'h40, 14'b0, 10'(n)};
    logic [31:0] dw1 = {16'h0000, 8'h00, 8'hFF};
    send_beat({dw1, dw0}, 8'hFF, 1'b0);
    send_beat({words[0], 32'(waddr << 2)}, 8'hFF, n == 1);
    for (int i = 1; i < n; i += 2) begin
      if (i + 1 < n) send_beat({words[i+1], words[i]}, 8'hFF, i + 2 >= n);
      else           send_beat({32'h0, words[i]}, 8'h0F, 1'b1);
    end
    if (n > 1) n_multibeat_wr++;
    for (int i = 0; i < n; i++)
      if (waddr + i < 2**18) bank_seen[(waddr + i) >> 16]++;
  endtask

  // memory read of n words; checks the completion header
  task automatic mrd(int unsigned waddr, int n, output logic [31:0] words [$]);
    logic [7:0] tag = 8'($urandom);
    logic [31:0] h [3];
    logic [31:0] got [$];
    logic last;
    logic [31:0] dw0 = {8'h00, 14'b0, 10'(n)};
    logic [31:0] dw1 = {16'hBEEF, tag, 8'hFF};
    send_beat({dw1, dw0}, 8'hFF, 1'b0);
    send_beat({32'h0, 32'(waddr << 2)}, 8'h0F, 1'b1);
    // collect the completion, sampling each beat before its rising edge
    do @(negedge clk_pcie); while (!(tx_tvalid && tx_tready));
    h[0] = tx_tdata[31:0]; h[1] = tx_tdata[63:32];
    @(posedge clk_pcie);
    do @(negedge clk_pcie); while (!(tx_tvalid && tx_tready));
    h[2] = tx_tdata[31:0]; got.push_back(tx_tdata[63:32]);
    last = tx_tlast;
    @(posedge clk_pcie);
    while (!last) begin
      do @(negedge clk_pcie); while (!(tx_tvalid && tx_tready));
      got.push_back(tx_tdata[31:0]);
      if (tx_tkeep == 8'hFF) got.push_back(tx_tdata[63:32]);
      last = tx_tlast;
      @(posedge clk_pcie);
    end
    checks++;
    if (h[0][31:24] != 8'h4A || h[0][9:0] != 10'(n) || h[1][31:16] != 16'h0100 ||
        h[1][11:0] != 12'(4*n) || h[2][31:16] != 16'hBEEF || h[2][15:8] != tag ||
        h[2][6:0] != 7'((waddr << 2) & 32'h7F) || got.size() != n) begin
      failures++;
      $display("FAIL completion header %h %h %h, %0d words", h[0], h[1], h[2], got.size());
    end
    if (n == 1) n_cpl_single++; else n_cpl_multi++;
    words = got;
  endtask

  // ---------------- test data ----------------
  localparam int NSETS = 2;
  int win  [NSETS][80][80];
  int pos_r [NSETS], pos_c [NSETS];

  function automatic logic [31:0] pack4(int p0, int p1, int p2, int p3);
    return {8'(p3), 8'(p2), 8'(p1), 8'(p0)};
  endfunction

  task automatic load_set(int s);
    logic [31:0] q [$];
    int base = s * SET_WORDS;
    // descriptor: 16 rows of 4 words
    q = {};
    for (int r = 0; r < 16; r++)
      for (int g = 0; g < 4; g++) begin
        int y = pos_r[s] + r, x = pos_c[s] + 4*g;
        q.push_back(pack4(win[s][y][x], win[s][y][x+1], win[s][y][x+2], win[s][y][x+3]));
      end
    mwr(base, q);
    // window: 80 rows of 20 words, one TLP of 20 words per row
    for (int y = 0; y < 80; y++) begin
      q = {};
      for (int g = 0; g < 20; g++)
        q.push_back(pack4(win[s][y][4*g], win[s][y][4*g+1], win[s][y][4*g+2], win[s][y][4*g+3]));
      mwr(base + DESC_WORDS + y * WIN_ROW_WORDS, q);
    end
  endtask

  task automatic wait_done(logic want);
    logic [31:0] r [$];
    int polls = 0;
    do begin
      repeat (200) @(posedge clk_pcie);
      mrd(32'(CTRL_ADDR), 1, r);
      polls++;
    end while (r[0][CTRL_DONE_BIT] != want && polls < 100000);
    checks++;
    if (r[0][CTRL_DONE_BIT] != want) begin failures++; $display("FAIL done never became %b", want); end
  endtask

  task automatic run_job(op_e op, int count);
    logic [31:0] q [$];
    q = {{16'(count), 13'b0, op, 1'b1}};
    mwr(32'(CTRL_ADDR), q);
    wait_done(1'b1);
    q = {32'h0};
    mwr(32'(CTRL_ADDR), q);
    wait_done(1'b0);
    n_handshake++;
  endtask

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk_ncc);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r [$], prev_words [$];
    logic [31:0] q [$];
    rx_tdata = '0; rx_tkeep = '0; rx_tlast = 0; rx_tvalid = 0;
    for (int s = 0; s < NSETS; s++) begin
      for (int y = 0; y < 80; y++)
        for (int x = 0; x < 80; x++) win[s][y][x] = $urandom_range(0, 255) - 128;
      pos_r[s] = $urandom_range(0, 64);
      pos_c[s] = $urandom_range(0, 64);
    end
    repeat (20) @(posedge clk_ncc);
    @(posedge clk_pcie); #0.1 rst = 0;
    repeat (10) @(posedge clk_ncc);

    // ---- NCC job over all sets ----
    for (int s = 0; s < NSETS; s++) load_set(s);
    // read back a few words of set 1 (multi-word completion)
    mrd(SET_WORDS + DESC_WORDS, 5, r);
    checks++;
    if (r[0] != pack4(win[1][0][0], win[1][0][1], win[1][0][2], win[1][0][3]) ||
        r[4] != pack4(win[1][0][16], win[1][0][17], win[1][0][18], win[1][0][19])) begin
      failures++; $display("FAIL readback %h %h", r[0], r[4]);
    end
    run_job(OP_NCC, NSETS);
    n_op_ncc++;
    checks++;
    if (sets_done != 16'(NSETS)) begin failures++; $display("FAIL sets_done %0d", sets_done); end
    for (int s = 0; s < NSETS; s++) begin
      mrd(RESULT_BASE + RESULT_WORDS * s, 3, r);
      checks++;
      if ({r[0], r[1]} != 64'h0000_0001_0000_0000 || r[2] != 32'(pos_r[s] * 65 + pos_c[s])) begin
        failures++;
        $display("FAIL set %0d: coefficient %h%h index %0d, expected 1.0 at %0d",
                 s, r[0], r[1], r[2], pos_r[s] * 65 + pos_c[s]);
      end else
        $display("set %0d: best match 1.0 at patch %0d (row %0d, col %0d)", s, r[2], pos_r[s], pos_c[s]);
    end

    // ---- add-one memory test ----
    mrd(0, 8, prev_words);
    run_job(OP_INC, 8);
    n_op_inc++;
    mrd(0, 8, r);
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (r[i] != prev_words[i] + 1) begin failures++; $display("FAIL increment word %0d", i); end
    end

    // ---- every bank, and an unmapped address ----
    for (int b = 0; b < 4; b++) begin
      q = {32'hA5A5_0000 + b, 32'h5A5A_0000 + b};
      mwr(b * 65536 + 65534, q);
      mrd(b * 65536 + 65534, 2, r);
      checks++;
      if (r[0] != q[0] || r[1] != q[1]) begin failures++; $display("FAIL bank %0d", b); end
    end
    q = {32'hDEAD_BEEF};
    mwr(32'h50000, q);
    mrd(32'h50000, 1, r);
    n_unmapped++;
    checks++;
    if (r[0] != 0) begin failures++; $display("FAIL unmapped read %h", r[0]); end

    // ---- every mechanism happened ----
    begin
      int counts [9];
      string names [9];
      counts = '{n_rx_stall, n_tx_backpressure, n_multibeat_wr, n_cpl_single,
                         n_cpl_multi, n_op_ncc, n_op_inc, n_handshake, n_unmapped};
      names = '{"rx stall", "tx back-pressure", "multi-beat write", "single-word completion",
                           "multi-word completion", "NCC job", "add-one job", "go/done handshake", "unmapped access"};
      for (int i = 0; i < 9; i++) begin
        checks++;
        $display("mechanism %s: %0d", names[i], counts[i]);
        if (counts[i] == 0) begin failures++; $display("FAIL mechanism %s never happened", names[i]); end
      end
      for (int b = 0; b < 4; b++) begin
        checks++;
        if (bank_seen[b] == 0) begin failures++; $display("FAIL bank %0d never written", b); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_memory_system: self-checking test of the shared four-bank memory with
// its two clock domains (4 ns PCIe-side clock, 40 ns NCC-side clock). Port A
// writes random words across all four banks and reads them back; port B
// reads the same words from the other domain and writes its own, which port
// A then reads. Every read must return data exactly two port-clock edges
// after the request, flagged by rvalid. The control register must keep what
// port A writes, show the synchronized done input in bit 4, and reads of an
// unmapped address must return zero while writes to it change nothing.
`timescale 1ns/1ps
module tb_memory_system;
  import ncc_pkg::*;

  logic clk_a = 1'b0, clk_b = 1'b0, rst = 1'b1;
  always #2  clk_a = ~clk_a;
  always #20 clk_b = ~clk_b;
  int checks = 0, failures = 0;

  logic a_en, a_we, a_rvalid, done_async, b_en, b_we, b_rvalid;
  logic [BAR_AW-1:0] a_addr;
  logic [MEM_AW-1:0] b_addr;
  logic [WORD_W-1:0] a_wdata, a_rdata, ctrl_reg, b_wdata, b_rdata;

  memory_system dut (.clk_a, .rst_a(rst), .a_en, .a_we, .a_addr, .a_wdata, .a_rvalid, .a_rdata,
                     .ctrl_reg, .done_async, .clk_b, .rst_b(rst), .b_en, .b_we, .b_addr,
                     .b_wdata, .b_rvalid, .b_rdata);

  logic [31:0] model [int];

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic a_acc(bit w, int addr, logic [31:0] v, output logic [31:0] r);
    @(negedge clk_a);
    a_en = 1'b1; a_we = w; a_addr = BAR_AW'(addr); a_wdata = v;
    @(negedge clk_a);
    a_en = 1'b0; a_we = 1'b0;
    checks++;
    if (a_rvalid) begin failures++; $display("FAIL port A rvalid after one edge"); end
    @(negedge clk_a);
    checks++;
    if (a_rvalid != !w) begin failures++; $display("FAIL port A rvalid after two edges"); end
    r = a_rdata;
  endtask
  task automatic b_acc(bit w, int addr, logic [31:0] v, output logic [31:0] r);
    @(negedge clk_b);
    b_en = 1'b1; b_we = w; b_addr = MEM_AW'(addr); b_wdata = v;
    @(negedge clk_b);
    b_en = 1'b0; b_we = 1'b0;
    checks++;
    if (b_rvalid) begin failures++; $display("FAIL port B rvalid after one edge"); end
    @(negedge clk_b);
    checks++;
    if (b_rvalid != !w) begin failures++; $display("FAIL port B rvalid after two edges"); end
    r = b_rdata;
  endtask

  initial begin
    repeat (2000000) @(posedge clk_a);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r, v;
    int addrs [$];
    int a;
    a_en = 0; a_we = 0; a_addr = 0; a_wdata = 0;
    b_en = 0; b_we = 0; b_addr = 0; b_wdata = 0; done_async = 0;
    repeat (3) @(negedge clk_b);
    rst = 1'b0;
    // port A writes, spread over the four banks
    for (int i = 0; i < 200; i++) begin
      a = (i % 4) * 65536 + int'($urandom % 65536);
      if (model.exists(a)) continue;
      v = $urandom;
      a_acc(1'b1, a, v, r);
      model[a] = v;
      addrs.push_back(a);
    end
    foreach (addrs[i]) begin
      a_acc(1'b0, addrs[i], '0, r);
      expect_eq("A read-back", r, model[addrs[i]]);
    end
    // port B reads what A wrote, then overwrites half of it
    foreach (addrs[i]) begin
      b_acc(1'b0, addrs[i], '0, r);
      expect_eq("B read of A data", r, model[addrs[i]]);
      if (i % 2 == 0) begin
        v = $urandom;
        b_acc(1'b1, addrs[i], v, r);
        model[addrs[i]] = v;
      end
    end
    foreach (addrs[i]) begin
      a_acc(1'b0, addrs[i], '0, r);
      expect_eq("A read of B data", r, model[addrs[i]]);
    end
    // unmapped address
    a_acc(1'b1, 32'h50000, 32'hDEADBEEF, r);
    a_acc(1'b0, 32'h50000, '0, r);
    expect_eq("unmapped read", r, 32'h0);
    foreach (addrs[i]) begin
      a_acc(1'b0, addrs[i], '0, r);
      expect_eq("no alias of unmapped write", r, model[addrs[i]]);
    end
    // control register and done bit
    a_acc(1'b1, int'(CTRL_ADDR), 32'h0003_0003, r);
    expect_eq("ctrl_reg output", ctrl_reg, 32'h0003_0003);
    a_acc(1'b0, int'(CTRL_ADDR), '0, r);
    expect_eq("ctrl read, done low", r, 32'h0003_0003);
    done_async = 1'b1;
    repeat (3) @(negedge clk_a);
    a_acc(1'b0, int'(CTRL_ADDR), '0, r);
    expect_eq("ctrl read, done high", r, 32'h0003_0013);
    done_async = 1'b0;
    repeat (3) @(negedge clk_a);
    a_acc(1'b0, int'(CTRL_ADDR), '0, r);
    expect_eq("ctrl read, done low again", r, 32'h0003_0003);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

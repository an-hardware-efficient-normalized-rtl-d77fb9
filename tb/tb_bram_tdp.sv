// tb_bram_tdp: self-checking test of the true dual-port RAM with two
// unrelated clocks. Port A and port B each write and read random addresses
// (disjoint halves, so the two ports never collide); a software copy of the
// memory gives the expected read data, which must arrive exactly two edges
// of the port's own clock after the request (RAM read plus output register).
// Data written by one port is then read back through the other. Read-first
// behaviour is checked on port A by a write that returns the old contents.
`timescale 1ns/1ps
module tb_bram_tdp;
  localparam int AW = 8;
  logic clk_a = 1'b0, clk_b = 1'b0;
  always #2 clk_a = ~clk_a;
  always #7 clk_b = ~clk_b;
  int checks = 0, failures = 0;

  logic en_a, we_a, en_b, we_b;
  logic [AW-1:0] addr_a, addr_b;
  logic [31:0] din_a, din_b, dout_a, dout_b;
  logic [31:0] model [2**AW];

  bram_tdp #(.AW(AW)) dut (.clk_a, .en_a, .we_a, .addr_a, .din_a, .dout_a,
                           .clk_b, .en_b, .we_b, .addr_b, .din_b, .dout_b);

  initial begin
    repeat (200000) @(posedge clk_a);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one access on port A: returns the read data seen two edges later
  task automatic acc_a(bit w, logic [AW-1:0] a, logic [31:0] v, output logic [31:0] r);
    @(negedge clk_a);
    en_a = 1'b1; we_a = w; addr_a = a; din_a = v;
    @(negedge clk_a);
    en_a = 1'b0; we_a = 1'b0;
    @(negedge clk_a);
    r = dout_a;
  endtask
  task automatic acc_b(bit w, logic [AW-1:0] a, logic [31:0] v, output logic [31:0] r);
    @(negedge clk_b);
    en_b = 1'b1; we_b = w; addr_b = a; din_b = v;
    @(negedge clk_b);
    en_b = 1'b0; we_b = 1'b0;
    @(negedge clk_b);
    r = dout_b;
  endtask

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] r, v;
    logic [AW-1:0] a;
    en_a = 0; we_a = 0; addr_a = 0; din_a = 0;
    en_b = 0; we_b = 0; addr_b = 0; din_b = 0;
    // fill through both ports
    for (int i = 0; i < 2**AW; i++) begin
      v = $urandom; model[i] = v;
      if (i % 2 == 0) acc_a(1'b1, AW'(i), v, r); else acc_b(1'b1, AW'(i), v, r);
    end
    // concurrent random traffic, port A on the lower half, port B on the upper
    fork
      for (int i = 0; i < 400; i++) begin
        logic [31:0] ra, va;
        logic [AW-1:0] aa;
        aa = AW'($urandom % 2**(AW-1));
        va = $urandom;
        if ($urandom % 2) begin
          acc_a(1'b1, aa, va, ra);
          expect_eq("A read-first", ra, model[aa]);
          model[aa] = va;
        end else begin
          acc_a(1'b0, aa, '0, ra);
          expect_eq("A read", ra, model[aa]);
        end
      end
      for (int i = 0; i < 150; i++) begin
        logic [31:0] rb, vb;
        logic [AW-1:0] ab;
        ab = AW'(2**(AW-1) + $urandom % 2**(AW-1));
        vb = $urandom;
        if ($urandom % 2) begin
          acc_b(1'b1, ab, vb, rb);
          model[ab] = vb;
        end else begin
          acc_b(1'b0, ab, '0, rb);
          expect_eq("B read", rb, model[ab]);
        end
      end
    join
    // cross-port read back
    for (int i = 0; i < 2**AW; i++) begin
      a = AW'(i);
      if (i % 2 == 0) acc_b(1'b0, a, '0, r); else acc_a(1'b0, a, '0, r);
      expect_eq("cross-port read", r, model[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

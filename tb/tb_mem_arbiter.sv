// tb_mem_arbiter: self-checking test of the memory arbiter. Three client
// processes issue random reads and writes, each in its own address range,
// and hold every request until it is acknowledged. Behind the arbiter a
// behavioural memory answers reads two clock edges after the enable, as the
// block RAM does. Checked: the data of every read, the final memory image,
// that simultaneous requests are granted to the lowest-numbered client, and
// that go, op and count of the control word reach the outputs after
// synchronization.
`timescale 1ns/1ps
module tb_mem_arbiter;
  import ncc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #20 clk = ~clk;
  int checks = 0, failures = 0;

  mem_req_t cl_req [3];
  mem_rsp_t cl_rsp [3];
  logic m_en, m_we, m_rvalid, ctrl_go;
  logic [MEM_AW-1:0] m_addr;
  logic [WORD_W-1:0] m_wdata, m_rdata, ctrl_reg_async;
  op_e ctrl_op;
  logic [15:0] ctrl_count;

  mem_arbiter #(.N_CLIENTS(3)) dut (.clk, .rst, .cl_req, .cl_rsp, .m_en, .m_we, .m_addr,
                                    .m_wdata, .m_rvalid, .m_rdata, .ctrl_reg_async,
                                    .ctrl_go, .ctrl_op, .ctrl_count);

  logic [31:0] mem [int];
  logic [31:0] shadow [int];   // what the clients believe is stored

  // memory: read data two edges after the enable
  logic        rv1, rv2;
  logic [31:0] rd1, rd2;
  always @(posedge clk) begin
    if (m_en && m_we) mem[int'(m_addr)] = m_wdata;
    rv2 <= rv1; rd2 <= rd1;
    rv1 <= m_en && !m_we;
    rd1 <= mem.exists(int'(m_addr)) ? mem[int'(m_addr)] : 32'h0;
  end
  assign m_rvalid = rv2;
  assign m_rdata  = rd2;

  task automatic client(int id);
    for (int n = 0; n < 150; n++) begin
      int a;
      repeat ($urandom % 3) @(negedge clk);
      a = id * 1000 + int'($urandom % 16);
      cl_req[id].req   = 1'b1;
      cl_req[id].we    = ($urandom % 2) == 1;
      cl_req[id].addr  = MEM_AW'(a);
      cl_req[id].wdata = $urandom;
      do @(posedge clk); while (!cl_rsp[id].ack);
      if (cl_req[id].we) shadow[a] = cl_req[id].wdata;
      else begin
        checks++;
        if (cl_rsp[id].rdata != (shadow.exists(a) ? shadow[a] : 32'h0)) begin
          failures++;
          $display("FAIL client %0d read %0d: got %h", id, a, cl_rsp[id].rdata);
        end
      end
      @(negedge clk);
      cl_req[id] = '0;
    end
  endtask

  // grant order: a grant out of IDLE must go to the lowest requesting client
  int n_contended = 0;
  always @(posedge clk) if (!rst && dut.state == dut.IDLE) begin
    int expo;
    expo = -1;
    for (int i = 2; i >= 0; i--) if (cl_req[i].req) expo = i;
    if (expo >= 0) begin
      if (cl_req[0].req + cl_req[1].req + cl_req[2].req > 1) n_contended++;
      #1;
      checks++;
      if (int'(dut.owner) != expo) begin
        failures++;
        $display("FAIL granted client %0d, expected %0d", dut.owner, expo);
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (cl_req[i]) cl_req[i] = '0;
    ctrl_reg_async = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    fork
      client(0);
      client(1);
      client(2);
    join
    foreach (shadow[a]) begin
      checks++;
      if (mem[a] != shadow[a]) begin failures++; $display("FAIL memory word %0d", a); end
    end
    checks++;
    if (n_contended == 0) begin failures++; $display("FAIL no contended grant happened"); end
    // control word: go, op = add-one, count = 0x1234
    ctrl_reg_async = {16'h1234, 13'd0, 2'(OP_INC), 1'b1};
    repeat (4) @(negedge clk);
    checks++;
    if (!ctrl_go || ctrl_op != OP_INC || ctrl_count != 16'h1234) begin
      failures++;
      $display("FAIL control fields %b %0d %h", ctrl_go, ctrl_op, ctrl_count);
    end
    ctrl_reg_async = '0;
    repeat (4) @(negedge clk);
    checks++;
    if (ctrl_go) begin failures++; $display("FAIL go did not drop"); end
    $display("contended grants: %0d", n_contended);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_reg_bank: random test of the four-read, two-write register bank against
// a register model kept in the testbench. Checks the write-first bypass on
// all four read ports, that x0 reads zero and ignores writes, and reset.
`timescale 1ns/1ps
module tb_reg_bank;
  logic             clk = 0, rst_n = 0;
  logic [3:0][4:0]  raddr;
  logic [3:0][31:0] rdata;
  logic [1:0]       we;
  logic [1:0][4:0]  waddr;
  logic [1:0][31:0] wdata;
  logic [31:0]      model [32];
  int checks = 0, failures = 0;

  reg_bank dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] exp_v;
    we = '0; waddr = '0; wdata = '0; raddr = '0;
    for (int i = 0; i < 32; i++) model[i] = 0;
    #12 rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      for (int r = 0; r < 4; r++) raddr[r] = 5'($urandom);
      we[0] = 1'($urandom); waddr[0] = 5'($urandom); wdata[0] = $urandom;
      we[1] = 1'($urandom); waddr[1] = 5'($urandom); wdata[1] = $urandom;
      if (waddr[1] == waddr[0]) waddr[1] = waddr[0] + 5'd1;
      if (n % 50 == 0) begin raddr[n % 4] = 5'd0; we[0] = 1'b1; waddr[0] = 5'd0; end
      if (n % 7 == 0) raddr[n % 4] = waddr[1];
      #1;
      for (int r = 0; r < 4; r++) begin
        exp_v = model[raddr[r]];
        for (int w = 0; w < 2; w++) if (we[w] && waddr[w] == raddr[r]) exp_v = wdata[w];
        if (raddr[r] == 0) exp_v = 0;
        checks++;
        if (rdata[r] !== exp_v) begin
          failures++;
          $display("FAIL: port %0d x%0d = %h expected %h", r, raddr[r], rdata[r], exp_v);
        end
      end
      @(posedge clk);
      for (int w = 0; w < 2; w++) if (we[w] && waddr[w] != 0) model[waddr[w]] = wdata[w];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

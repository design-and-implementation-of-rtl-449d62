// tb_data_mem: random byte-masked writes and reads on the data memory's
// Wishbone port against a model; checks that read data and ack appear one
// cycle after the strobe and that a read with no strobe keeps the last data.
`timescale 1ns/1ps
module tb_data_mem;
  localparam int AW = 6, DEPTH = 1 << AW;
  logic clk = 0, rst = 1, cyc = 0, stb = 0, we = 0;
  logic [31:0] adr = 0, dat_w = 0, dat_o;
  logic [3:0]  sel = 0;
  logic        stall, ack, err;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;

  data_mem #(.ADDR_WIDTH(AW)) dut (.clk_i(clk), .rst_i(rst), .cyc_i(cyc), .stb_i(stb),
    .we_i(we), .adr_i(adr), .dat_i(dat_w), .sel_i(sel), .stall_o(stall), .ack_o(ack),
    .err_o(err), .dat_o(dat_o));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] last;
    bit have_last = 0;
    #22 rst = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      cyc = 1; stb = 1; we = 1; sel = 4'hF; adr = 32'(4 * i); dat_w = $urandom; model[i] = dat_w;
    end
    for (int n = 0; n < 2000; n++) begin
      int i;
      @(negedge clk);
      i = $urandom_range(DEPTH - 1);
      adr = 32'(4 * i) | 32'($urandom_range(3));
      stb = ($urandom_range(7) != 0);
      we = 1'($urandom); sel = 4'($urandom); dat_w = $urandom;
      @(posedge clk); #1;
      check(ack == stb, "ack one cycle after strobe");
      if (stb && we) begin
        for (int b = 0; b < 4; b++) if (sel[b]) model[i][8*b +: 8] = dat_w[8*b +: 8];
      end else if (stb) begin
        check(dat_o == model[i], $sformatf("read word %0d = %h expected %h", i, dat_o, model[i]));
        last = dat_o; have_last = 1;
      end else if (have_last) begin
        check(dat_o == last, "data held without strobe");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

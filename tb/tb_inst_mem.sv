// tb_inst_mem: writes random words into the dual-output instruction memory
// through its Wishbone port with byte masks, then reads every address and
// checks that dat_o holds the addressed word and dat1_o the next one
// (wrapping at the end), that data and ack arrive one cycle after the strobe.
`timescale 1ns/1ps
module tb_inst_mem;
  localparam int AW = 6, DEPTH = 1 << AW;
  logic clk = 0, rst = 1, cyc = 0, stb = 0, we = 0;
  logic [31:0] adr = 0, dat_w = 0, dat_o, dat1_o;
  logic [3:0]  sel = 0;
  logic        stall, ack, err;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;

  inst_mem #(.ADDR_WIDTH(AW)) dut (.clk_i(clk), .rst_i(rst), .cyc_i(cyc), .stb_i(stb),
    .we_i(we), .adr_i(adr), .dat_i(dat_w), .sel_i(sel), .stall_o(stall), .ack_o(ack),
    .err_o(err), .dat_o(dat_o), .dat1_o(dat1_o));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    #50000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #22 rst = 0;
    // full-word fill
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      cyc = 1; stb = 1; we = 1; sel = 4'hF; adr = 32'(4 * i); dat_w = $urandom; model[i] = dat_w;
      @(posedge clk); #1;
      check(ack, "write acknowledged after one cycle");
    end
    // partial writes
    for (int n = 0; n < 40; n++) begin
      int i;
      @(negedge clk);
      i = $urandom_range(DEPTH - 1);
      sel = 4'($urandom); adr = 32'(4 * i); dat_w = $urandom;
      for (int b = 0; b < 4; b++) if (sel[b]) model[i][8*b +: 8] = dat_w[8*b +: 8];
    end
    // dual reads
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 0; adr = 32'(4 * i);
      @(posedge clk); #1;
      check(ack, "read acknowledged after one cycle");
      check(dat_o == model[i], $sformatf("word %0d = %h expected %h", i, dat_o, model[i]));
      check(dat1_o == model[(i + 1) % DEPTH],
            $sformatf("next word %0d = %h expected %h", i + 1, dat1_o, model[(i + 1) % DEPTH]));
    end
    @(negedge clk); stb = 0;
    @(posedge clk); #1 check(!ack, "no ack without strobe");
    check(!stall && !err, "stall and err stay low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

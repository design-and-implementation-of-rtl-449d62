// reg_bank: the integer register file shared by both pipelines.
//
// 32 registers of 32 bits with four read ports (rs1/rs2 of pipe 0 and of
// pipe 1) and two write ports (the write-back stage of each pipe), as the
// dual-issue core needs. Register x0 always reads as zero and ignores writes.
// Reads are combinational; a write on the same cycle as a read of the same
// register is passed straight through to the read port (write-first), so the
// write-back stage and the issue stage never need an extra cycle between them.
// Writes take effect at the rising clock edge; reset clears all registers.
//
// The port count, register count and width follow the core's description.
// The base core wrote the file on the falling clock edge and kept the ID/EX
// operand registers inside this block; here writes are on the rising edge with
// a bypass, and the operand registers belong to each pipeline instead.
// The two write ports never target the same register in one cycle (the issue
// logic never pairs two writers of one register); an assertion checks it.
module reg_bank
  import rv_pkg::*;
#(
  parameter int unsigned NREGS = 32,
  parameter int unsigned NRD   = 4,
  parameter int unsigned NWR   = 2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [NRD-1:0][4:0]       raddr,
  output logic [NRD-1:0][XLEN-1:0]  rdata,
  input  logic [NWR-1:0]            we,
  input  logic [NWR-1:0][4:0]       waddr,
  input  logic [NWR-1:0][XLEN-1:0]  wdata
);

  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else begin
      for (int w = 0; w < NWR; w++)
        if (we[w] && waddr[w] != 5'd0) regs[waddr[w]] <= wdata[w];
    end
  end

  always_comb begin
    for (int r = 0; r < NRD; r++) begin
      rdata[r] = regs[raddr[r]];
      for (int w = 0; w < NWR; w++)
        if (we[w] && waddr[w] == raddr[r]) rdata[r] = wdata[w];
      if (raddr[r] == 5'd0) rdata[r] = '0;
    end
  end

  // Two write ports must not hit the same non-zero register in one cycle
  if (NWR > 1) begin : g_wr_chk
    a_one_writer : assert property (@(posedge clk) disable iff (!rst_n)
      !(we[0] && we[1] && waddr[0] == waddr[1] && waddr[0] != 5'd0))
      else $error("reg_bank: both write ports target x%0d", waddr[0]);
  end

endmodule

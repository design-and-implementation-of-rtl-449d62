// inst_mem: dual-output instruction memory on a Wishbone slave port.
//
// Each read returns two consecutive 32-bit words, the one at the byte address
// on adr_i and the next one (address + 4), so that the core fetches an
// instruction pair per clock. The word index is adr_i[ADDR_WIDTH+1:2]; the
// second word index wraps around the end of the array. Reads and writes are
// synchronous: a strobe with we_i low registers both words into dat_o and
// dat1_o at the rising edge; a strobe with we_i high writes the bytes selected
// by sel_i. ack_o follows one cycle after each strobe inside a cycle, stall_o
// and err_o are always low. The write side is used to load the program while
// the core is held in reset.
//
// The dual read port, the byte-masked write, the single-cycle acknowledge and
// the default depth of 512 words (ADDR_WIDTH = 9) follow the core's memory
// description; the wrap of the second word at the end of the array is this
// design's choice.
module inst_mem #(
  parameter int unsigned ADDR_WIDTH = 9,
  parameter int unsigned DATA_WIDTH = 32,
  parameter int unsigned NUM_WMASKS = 4
) (
  input  logic                  clk_i,
  input  logic                  rst_i,
  input  logic                  cyc_i,
  input  logic                  stb_i,
  input  logic                  we_i,
  input  logic [31:0]           adr_i,
  input  logic [DATA_WIDTH-1:0] dat_i,
  input  logic [NUM_WMASKS-1:0] sel_i,
  output logic                  stall_o,
  output logic                  ack_o,
  output logic                  err_o,
  output logic [DATA_WIDTH-1:0] dat_o,
  output logic [DATA_WIDTH-1:0] dat1_o
);
  localparam int unsigned DEPTH = 1 << ADDR_WIDTH;

  logic [DATA_WIDTH-1:0] mem [DEPTH];
  logic [ADDR_WIDTH-1:0] addr0, addr1;

  assign addr0   = adr_i[ADDR_WIDTH+1:2];
  assign addr1   = addr0 + 1'b1;
  assign stall_o = 1'b0;
  assign err_o   = 1'b0;

  always_ff @(posedge clk_i) begin
    if (stb_i && we_i) begin
      for (int b = 0; b < NUM_WMASKS; b++)
        if (sel_i[b]) mem[addr0][b*8 +: 8] <= dat_i[b*8 +: 8];
    end
  end

  always_ff @(posedge clk_i) begin
    if (stb_i && !we_i) begin
      dat_o  <= mem[addr0];
      dat1_o <= mem[addr1];
    end
  end

  always_ff @(posedge clk_i) begin
    if (rst_i)      ack_o <= 1'b0;
    else if (cyc_i) ack_o <= stb_i;
    else            ack_o <= 1'b0;
  end

endmodule

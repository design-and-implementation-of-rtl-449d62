// data_mem: data memory on a Wishbone slave port, separate from the
// instruction memory.
//
// One 32-bit word per access. A strobe with we_i high writes the bytes
// selected by sel_i at the rising edge; a strobe with we_i low registers the
// addressed word into dat_o at the rising edge. ack_o is raised one cycle
// after every strobe inside a cycle, so a load's data is valid in the cycle
// after the request; stall_o and err_o are always low. The word index is
// adr_i[ADDR_WIDTH+1:2]; higher address bits are ignored.
//
// Splitting data and instruction memory, the byte-masked write and the
// one-cycle acknowledge follow the core's memory description; the default
// depth of 512 words uses the same ADDR_WIDTH as the instruction memory,
// which is this design's choice.
module data_mem #(
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
  output logic [DATA_WIDTH-1:0] dat_o
);
  localparam int unsigned DEPTH = 1 << ADDR_WIDTH;

  logic [DATA_WIDTH-1:0] mem [DEPTH];
  logic [ADDR_WIDTH-1:0] addr;

  assign addr    = adr_i[ADDR_WIDTH+1:2];
  assign stall_o = 1'b0;
  assign err_o   = 1'b0;

  always_ff @(posedge clk_i) begin
    if (stb_i && we_i) begin
      for (int b = 0; b < NUM_WMASKS; b++)
        if (sel_i[b]) mem[addr][b*8 +: 8] <= dat_i[b*8 +: 8];
    end
  end

  always_ff @(posedge clk_i)
    if (stb_i && !we_i) dat_o <= mem[addr];

  always_ff @(posedge clk_i) begin
    if (rst_i)      ack_o <= 1'b0;
    else if (cyc_i) ack_o <= stb_i;
    else            ack_o <= 1'b0;
  end

endmodule

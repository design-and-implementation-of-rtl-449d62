// pc_logic: holds the fetch PC and chooses the next one.
//
// pc is the address of the older word of the pair now at the instruction
// memory outputs; pc_next is the address presented to the memory this cycle
// (its words appear at the outputs after the next rising edge). Priority:
//   reset            -> RESET_PC
//   take_branch      -> take_branch_addr (the pair now fetched is squashed)
//   stall_0, stall_1 or stall_ex -> pc (re-read the same pair)
//   stall_dual       -> pc + 4 (only the older word was issued)
//   otherwise        -> pc + pc_increment (4 or 8, from the issue unit)
// pair_valid is low in the first cycle after reset, when the memory outputs
// hold nothing fetched yet.
//
// Holding the PC on a stall from either pipeline's hazard unit and the
// branch redirect follow the core's PC truth table. The core's table also
// holds the PC on a dual-hazard stall, while its earlier description advances
// it by four when a single hazard unit fires; this design does the latter
// for the dual hazard, so that the older instruction of the pair still
// issues. stall_ex (a multi-cycle divide) is a further stall input of this
// design.
module pc_logic #(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        stall_0,
  input  logic        stall_1,
  input  logic        stall_dual,
  input  logic        stall_ex,
  input  logic        take_branch,
  input  logic [31:0] take_branch_addr,
  input  logic [31:0] pc_increment,
  output logic [31:0] pc,
  output logic [31:0] pc_next,
  output logic        pair_valid
);
  always_comb begin
    if (!pair_valid)                      pc_next = pc;
    else if (take_branch)                 pc_next = take_branch_addr;
    else if (stall_0 || stall_1 || stall_ex) pc_next = pc;
    else if (stall_dual)                  pc_next = pc + 32'd4;
    else                                  pc_next = pc + pc_increment;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc         <= RESET_PC;
      pair_valid <= 1'b0;
    end else begin
      pc         <= pc_next;
      pair_valid <= 1'b1;
    end
  end
endmodule

// hazard_unit: the per-pipeline hazard detection unit.
//
// Compares the source registers of the instruction in this pipe's decode slot
// with the destination register of a load in the execute stage. A load's data
// only arrives from the data memory in the write-back stage, one cycle too
// late to be forwarded to an instruction that enters execute right behind it,
// so the unit raises stall_IF: the PC holds, nothing is issued, and a bubble
// enters execute. All other results are forwarded and need no stall.
// Only pipe 1 executes loads, so both pipes' units watch pipe 1's execute
// stage. Combinational.
//
// Checking decode-stage sources against the execute-stage destination follows
// the core's hazard description; restricting the check to loads, because
// every other result is forwarded, is this design's choice.
module hazard_unit (
  input  logic       valid_id,
  input  logic       uses_rs1,
  input  logic [4:0] rs1_id,
  input  logic       uses_rs2,
  input  logic [4:0] rs2_id,
  input  logic       ex_is_load,
  input  logic [4:0] rd_ex,
  output logic       stall_IF
);
  always_comb begin
    stall_IF = 1'b0;
    if (valid_id && ex_is_load && rd_ex != 5'd0)
      stall_IF = (uses_rs1 && rs1_id == rd_ex) || (uses_rs2 && rs2_id == rd_ex);
  end
endmodule

// issue_unit: steers the fetched instruction pair onto the two pipelines.
//
// The instruction memory delivers two words per cycle: inst_a (older, at pc_a)
// and inst_b (younger, at pc_a + 4). Pipe 0 executes branches, jumps and ALU
// operations; pipe 1 executes loads, stores and ALU operations. From the
// classes of the two words the unit picks which word goes to which pipe,
// which pipe gets a NOP, how far the PC advances (pc_increment, 4 or 8) and
// the priority bit (0: pipe 0 holds the older instruction, 1: pipe 1 does):
//
//   older   younger | pipe 0   pipe 1   | stall_0 stall_1 prio inc
//   branch  any     | older    NOP      |   0       1      0    4
//   mem     mem     | NOP      older    |   1       0      1    4
//   mem     br/alu  | younger  older    |   0       0      1    8
//   alu     mem     | older    younger  |   0       0      0    8
//   alu     branch  | younger  older    |   0       0      1    8
//   alu     alu     | older    younger  |   0       0      0    8
//
// No instruction follows a branch in the same pair, since it could be on the
// wrong path. The table outputs (issue_stall_*_tbl, priority, pc_increment)
// depend on the two words only. The final issue decision also looks at the
// hazard signals: a pipeline hazard (stall_pipe) or a flush issues nothing
// (both issue_stall outputs high), and a dependency inside the pair
// (stall_dual) turns the younger instruction into a NOP so that only the older
// one issues. Purely combinational.
//
// The table and the three status signals are the core's issue logic; the
// handling of stall_dual by dropping only the younger instruction is this
// design's reading of the partial PC stall the core describes.
module issue_unit
  import rv_pkg::*;
(
  input  logic        pair_valid,   // inst_a/inst_b hold a fetched pair
  input  logic [31:0] pc_a,
  input  logic [31:0] inst_a,
  input  logic [31:0] inst_b,
  input  logic        stall_pipe,   // a pipeline hazard unit or execute stall
  input  logic        stall_dual,   // dependency between the pair
  input  logic        flush,        // a taken branch squashes this pair
  // instruction routed to each pipe (valid only where the table places one)
  output logic [31:0] inst_0,
  output logic [31:0] pc_0,
  output logic [31:0] inst_1,
  output logic [31:0] pc_1,
  output logic        issue_stall_0_tbl,
  output logic        issue_stall_1_tbl,
  output logic        priority_o,
  output logic [31:0] pc_increment,
  // final decision
  output logic        issue_stall_0,
  output logic        issue_stall_1,
  output logic        issued_a,     // older instruction left the issue stage
  output logic        issued_b      // younger instruction left the issue stage
);
  iclass_e cls_a, cls_b;
  logic    older_to_1;   // priority: older instruction goes to pipe 1
  logic    only_older;   // table issues a single instruction

  assign cls_a = classify(inst_a);
  assign cls_b = classify(inst_b);

  always_comb begin
    older_to_1 = 1'b0;
    only_older = 1'b0;
    unique case (cls_a)
      CLS_BRANCH: begin older_to_1 = 1'b0; only_older = 1'b1; end
      CLS_MEM:    begin older_to_1 = 1'b1; only_older = (cls_b == CLS_MEM); end
      default:    begin older_to_1 = (cls_b == CLS_BRANCH); only_older = 1'b0; end
    endcase
  end

  assign priority_o        = older_to_1;
  assign pc_increment      = only_older ? 32'd4 : 32'd8;
  assign inst_0            = older_to_1 ? inst_b : inst_a;
  assign pc_0              = older_to_1 ? pc_a + 32'd4 : pc_a;
  assign inst_1            = older_to_1 ? inst_a : inst_b;
  assign pc_1              = older_to_1 ? pc_a : pc_a + 32'd4;
  // the pipe that would carry the younger instruction idles when only one issues
  assign issue_stall_0_tbl = only_older &&  older_to_1;
  assign issue_stall_1_tbl = only_older && !older_to_1;

  logic go, younger_ok;
  assign go         = pair_valid && !stall_pipe && !flush;
  assign younger_ok = !only_older && !stall_dual;
  assign issued_a   = go;
  assign issued_b   = go && younger_ok;

  // pipe 0 carries the older one when !older_to_1, else the younger one
  assign issue_stall_0 = older_to_1 ? !issued_b : !issued_a;
  assign issue_stall_1 = older_to_1 ? !issued_a : !issued_b;

endmodule

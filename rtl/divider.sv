// divider: multi-cycle M-extension divide and remainder unit.
//
// A restoring shift-subtract divider on the operand magnitudes, one quotient
// bit per clock: 32 cycles per division plus one to load the operands. The
// signed forms (DIV, REM) divide magnitudes and fix the signs afterwards.
// Division by zero returns all ones as the quotient and the dividend as the
// remainder, and the overflow case -2^31 / -1 returns -2^31 and 0, as the
// RISC-V M extension requires.
//
// Interface: hold req high with op/a/b stable while the divide instruction
// sits in the execute stage. busy is high while the result is not ready; the
// execute stage is stalled on busy. done goes high with result valid and
// stays high until advance (the instruction leaves execute), after which a
// new request can start. Start to done: 33 clock cycles.
//
// The core is described as implementing the M extension and its execute
// stage as having a stall input; the iterative algorithm and its timing are
// this design's choices.
module divider
  import rv_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        advance,
  output logic        busy,
  output logic        done,
  output logic [31:0] result
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;
  state_e      state;
  logic [5:0]  count;
  logic [31:0] quo, rem, dvs;
  logic        neg_q, neg_r, want_rem, by_zero;

  logic is_signed;
  logic [31:0] mag_a, mag_b;
  assign is_signed = (op == ALU_DIV || op == ALU_REM);
  assign mag_a     = (is_signed && a[31]) ? -a : a;
  assign mag_b     = (is_signed && b[31]) ? -b : b;

  logic [32:0] trial;
  assign trial = {rem, quo[31]} - {1'b0, dvs};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; count <= '0; quo <= '0; rem <= '0; dvs <= '0;
      neg_q <= 1'b0; neg_r <= 1'b0; want_rem <= 1'b0; by_zero <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (req) begin
          quo      <= mag_a;
          rem      <= '0;
          dvs      <= mag_b;
          neg_q    <= is_signed && (a[31] ^ b[31]);
          neg_r    <= is_signed && a[31];
          want_rem <= (op == ALU_REM || op == ALU_REMU);
          by_zero  <= (b == 32'd0);
          count    <= 6'd32;
          state    <= S_RUN;
        end
        S_RUN: begin
          // shift the next dividend bit into the partial remainder
          if (!trial[32]) begin
            rem <= trial[31:0];
            quo <= {quo[30:0], 1'b1};
          end else begin
            rem <= {rem[30:0], quo[31]};
            quo <= {quo[30:0], 1'b0};
          end
          count <= count - 6'd1;
          if (count == 6'd1) state <= S_DONE;
        end
        S_DONE: if (advance) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign done = (state == S_DONE);
  assign busy = req && !done;

  always_comb begin
    if (want_rem)     result = neg_r ? -rem : rem;
    else if (by_zero) result = 32'hFFFF_FFFF;
    else              result = neg_q ? -quo : quo;
  end
endmodule

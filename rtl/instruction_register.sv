// Instruction register: holds the set of NUM_INST instructions being executed.
//
// It follows the instruction inputs while load is high (the unit is idle and
// Ready) and holds them while a set runs, so the dependency manager, the
// distributer and the ALUs all see one stable set of opcodes and addresses for
// the whole execution cycle. Storing the instructions is one of the unit's
// basic functions in the original design; the register's form (a load-enabled
// bank that samples on the edge where the unit leaves Ready) is this design's.
module instruction_register
  import alu_dm_pkg::*;
#(
  parameter int unsigned N = NUM_INST
) (
  input  logic   clk,
  input  logic   rst,       // synchronous, active high; clears to NOPs
  input  logic   load,
  input  instr_t d [N],
  output instr_t q [N]
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) q[i] <= '{op: OP_NOP, default: '0};
    end else if (load) begin
      for (int i = 0; i < N; i++) q[i] <= d[i];
    end
  end

endmodule

// Parallel processing unit with built-in dependency management.
//
// The unit executes a set of NUM_INST instructions (four) over NUM_REGS data
// registers (twelve, four bits each) in one execution cycle, on one ALU per
// instruction. Instructions that do not read a register written by an earlier
// instruction of the set run in parallel; the others wait, in hardware, for
// the instructions they depend on, with their results forwarded straight from
// the producing ALU. No compiler scheduling is needed.
//
// Structure (one instance each unless stated):
//   transfer u_read_inputs    - input data buffer, loaded while Ready
//   instruction_register      - the stored instruction set, loaded while Ready
//   distributer               - operand selection and result merging
//   dependency_manager        - enables, bypasses, Ready / Complete
//   alu u_alu[NUM_INST]       - instruction i always runs on ALU i
//   transfer u_write_outputs  - output data buffer, loaded while busy
//
// Use: while Ready is high, present the instructions and the input data and
// raise NDR. The rising edge of NDR is acted on at the next clock edge; that
// edge also captures the instructions and data, which may then change. When
// Complete rises (with Ready) the output registers hold the results: each
// output register is the input register of the same address unless an
// instruction wrote it. Complete stays high until the next NDR edge.
//
// Latency, counted in clock edges after the one that sees the NDR edge: 3 when
// no instruction depends on another, plus 3 per level of dependency (12 for a
// chain of four). The block structure, the interface and the per-dependency
// cost follow the original design; the clocking of the data and instruction
// buffers, the synchronous reset and the Bypass status outputs are this
// design's choices.
module alu_dm_top
  import alu_dm_pkg::*;
(
  input  logic   clk,
  input  logic   rst,                  // synchronous, active high
  input  logic   ndr,                  // new data ready
  input  instr_t instr_in [NUM_INST],  // opcode and A / B / Q addresses
  input  data_t  ireg [NUM_REGS],      // input data registers 1..12
  output logic   ready,
  output logic   complete,
  output logic   bypass [NUM_INST],    // instruction i is skipped in this cycle
  output data_t  oreg [NUM_REGS]       // output data registers 1..12
);

  data_t  in_buf   [NUM_REGS];
  data_t  out_next [NUM_REGS];
  instr_t instr    [NUM_INST];
  data_t  a_data   [NUM_INST];
  data_t  b_data   [NUM_INST];
  data_t  q_data   [NUM_INST];
  logic   alu_done [NUM_INST];
  logic   enable   [NUM_INST];

  transfer #(.N(NUM_REGS)) u_read_inputs (
    .clk, .rst, .load(ready), .d(ireg), .q(in_buf)
  );

  instruction_register #(.N(NUM_INST)) u_instr (
    .clk, .rst, .load(ready), .d(instr_in), .q(instr)
  );

  distributer #(.N(NUM_INST), .R(NUM_REGS)) u_distributer (
    .clk, .rst,
    .instr,
    .in_reg      (in_buf),
    .alu_complete(alu_done),
    .q_data,
    .a_data,
    .b_data,
    .out_reg     (out_next)
  );

  dependency_manager #(.N(NUM_INST)) u_dep_mngr (
    .clk, .rst, .ndr,
    .instr,
    .alu_complete(alu_done),
    .enable,
    .bypass,
    .ready,
    .complete
  );

  for (genvar i = 0; i < NUM_INST; i++) begin : g_alu
    alu u_alu (
      .clk, .rst,
      .a       (a_data[i]),
      .b       (b_data[i]),
      .opcode  (instr[i].op),
      .enable  (enable[i]),
      .q       (q_data[i]),
      .complete(alu_done[i])
    );
  end

  transfer #(.N(NUM_REGS)) u_write_outputs (
    .clk, .rst, .load(!ready), .d(out_next), .q(oreg)
  );

endmodule

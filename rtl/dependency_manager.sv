// Dependency manager: decides which of the NUM_INST instructions of a set may
// run on its ALU in each clock, and tells the outside world when the set is
// done.
//
// Instruction j depends on an earlier instruction i (i < j) when i is active
// and writes a register that j reads (A_j == Q_i or B_j == Q_i). Instruction j
// is enabled once every earlier instruction it depends on has completed;
// instructions with no such dependency are enabled together in the first
// clock of the cycle, so independent instructions run in parallel. An
// instruction whose opcode is 000, or whose destination address names no
// register, is bypassed: it is never enabled, its Bypass output is high while
// the set runs, and completion does not wait for it. Only read-after-write
// dependencies are tracked, as in the original design: the distributer gives
// every instruction its operands from the input registers or from earlier
// instructions only, and merges results in instruction order, so reuse of a
// register by a later instruction needs no ordering.
//
// Handshake: Ready is high while idle. A rising edge of NDR seen while Ready
// starts a cycle: Ready and Complete drop on that edge. Complete and Ready
// rise together on the edge at which every active instruction's ALU reports
// Complete; Complete then stays high until the next cycle starts, and all
// Enables drop on that edge. NDR edges during a cycle are ignored.
//
// Timing: enables of independent instructions rise one clock after the NDR
// edge is seen, their ALUs complete one clock later and Complete rises one
// clock after that (3 clocks from NDR to Complete). The ALU Complete flags are
// registered here before they release a dependent instruction, which leaves
// the distributer one clock to register the forwarded result as the dependent
// instruction's operand; each level of dependency therefore adds 3 clocks, the
// cost per dependency the original design reports. The dependency rule, the
// bypass and the NDR / Ready / Complete handshake follow the original design;
// the state machine, the registered Complete flags and the reset are this
// design's.
module dependency_manager
  import alu_dm_pkg::*;
#(
  parameter int unsigned N = NUM_INST
) (
  input  logic   clk,
  input  logic   rst,           // synchronous, active high
  input  logic   ndr,           // new data ready, acted on at its rising edge
  input  instr_t instr [N],     // the stored instruction set
  input  logic   alu_complete [N],
  output logic   enable [N],
  output logic   bypass [N],
  output logic   ready,
  output logic   complete
);

  typedef enum logic {S_IDLE, S_RUN} state_e;

  state_e state;
  logic   ndr_q;
  logic   done_q [N];   // ALU Complete flags, one clock late
  logic   active [N];
  logic   release_ok [N];
  logic   all_done;

  always_comb begin
    for (int j = 0; j < N; j++) begin
      active[j]     = instr_active(instr[j].op, instr[j].q);
      release_ok[j] = active[j];
      for (int i = 0; i < j; i++) begin
        if (instr_active(instr[i].op, instr[i].q) &&
            (instr[j].a == instr[i].q || instr[j].b == instr[i].q) &&
            !done_q[i])
          release_ok[j] = 1'b0;
      end
    end
    all_done = 1'b1;
    for (int i = 0; i < N; i++)
      if (active[i] && !alu_complete[i]) all_done = 1'b0;
  end

  always_comb begin
    for (int i = 0; i < N; i++) bypass[i] = (state == S_RUN) && !active[i];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      ndr_q    <= 1'b0;
      ready    <= 1'b1;
      complete <= 1'b0;
      for (int i = 0; i < N; i++) begin
        enable[i] <= 1'b0;
        done_q[i] <= 1'b0;
      end
    end else begin
      ndr_q <= ndr;
      unique case (state)
        S_IDLE: begin
          if (ndr && !ndr_q) begin
            state    <= S_RUN;
            ready    <= 1'b0;
            complete <= 1'b0;
            for (int i = 0; i < N; i++) done_q[i] <= 1'b0;
          end
        end
        S_RUN: begin
          if (all_done) begin
            state    <= S_IDLE;
            ready    <= 1'b1;
            complete <= 1'b1;
            for (int i = 0; i < N; i++) begin
              enable[i] <= 1'b0;
              done_q[i] <= 1'b0;
            end
          end else begin
            for (int i = 0; i < N; i++) begin
              done_q[i] <= alu_complete[i];
              enable[i] <= enable[i] || release_ok[i];
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // An ALU may only report Complete while it is enabled, and a bypassed
  // instruction is never enabled.
  for (genvar i = 0; i < N; i++) begin : g_chk
    a_no_enable_when_bypassed : assert property (
      @(posedge clk) disable iff (rst) !(enable[i] && bypass[i]));
  end

endmodule

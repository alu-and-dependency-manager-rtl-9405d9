// Distributer: connects the data registers to the ALUs.
//
// Operands: for each instruction j, the A and B operand registers are loaded
// every clock with the value the instruction must read. If an earlier active
// instruction of the set writes that register, the value is the result of the
// nearest such instruction, taken from its ALU output; otherwise it is the
// addressed input register. An address that names no register (0 or above
// NUM_REGS) reads as zero. The dependency manager enables instruction j only
// after the writers it reads from have completed and this register has had
// one clock to take their result.
//
// Results: the output registers are combinational. Each one is the input
// register of the same address, replaced by the result of every completed
// instruction that writes it, in instruction order, so that of two completed
// instructions writing one register the later one wins.
//
// The forwarding from earlier instructions, the pass-through of unmodified
// registers and the write-back on Complete follow the original design. Taking
// the nearest earlier writer (rather than the first), ignoring bypassed
// instructions as writers, reading unused addresses as zero and registering
// the operands are this design's choices.
module distributer
  import alu_dm_pkg::*;
#(
  parameter int unsigned N = NUM_INST,
  parameter int unsigned R = NUM_REGS
) (
  input  logic   clk,
  input  logic   rst,            // synchronous, active high
  input  instr_t instr [N],      // SLCT_A / SLCT_B / SLCT_Q of each instruction
  input  data_t  in_reg [R],     // input data buffer
  input  logic   alu_complete [N],
  input  data_t  q_data [N],     // ALU results
  output data_t  a_data [N],     // operands to the ALUs
  output data_t  b_data [N],
  output data_t  out_reg [R]     // to the output data buffer
);

  data_t a_next [N];
  data_t b_next [N];

  function automatic data_t read_reg(addr_t addr, data_t regs [R]);
    data_t v = '0;
    for (int r = 0; r < R; r++)
      if (int'(addr) == r + 1) v = regs[r];
    return v;
  endfunction

  always_comb begin
    for (int j = 0; j < N; j++) begin
      a_next[j] = read_reg(instr[j].a, in_reg);
      b_next[j] = read_reg(instr[j].b, in_reg);
      for (int i = 0; i < j; i++) begin
        if (instr_active(instr[i].op, instr[i].q)) begin
          if (instr[i].q == instr[j].a) a_next[j] = q_data[i];
          if (instr[i].q == instr[j].b) b_next[j] = q_data[i];
        end
      end
    end
  end

  always_comb begin
    for (int r = 0; r < R; r++) begin
      out_reg[r] = in_reg[r];
      for (int i = 0; i < N; i++)
        if (alu_complete[i] && int'(instr[i].q) == r + 1) out_reg[r] = q_data[i];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < N; j++) begin
        a_data[j] <= '0;
        b_data[j] <= '0;
      end
    end else begin
      for (int j = 0; j < N; j++) begin
        a_data[j] <= a_next[j];
        b_data[j] <= b_next[j];
      end
    end
  end

endmodule

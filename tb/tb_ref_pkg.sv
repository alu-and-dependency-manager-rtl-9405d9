// Reference model for the testbenches of the parallel ALU unit.
//
// The unit must give the same results as executing the instruction set one
// instruction at a time, in order, on a register file initialised with the
// input registers; bypassed instructions (opcode 000 or a destination that
// names no register) change nothing, and a source address naming no register
// reads zero. Latency: an active instruction's dependency level is one more
// than the highest level of the earlier active instructions writing one of
// its sources; the set takes 3 clocks per level from the NDR edge to Complete
// (one clock if nothing is active).
package tb_ref_pkg;
  import alu_dm_pkg::*;

  function automatic data_t ref_op(opcode_e op, data_t a, data_t b);
    case (op)
      OP_OR:  return a | b;
      OP_AND: return a & b;
      OP_ADD: return data_t'((int'(a) + int'(b)) % (1 << DATA_W));
      OP_SUB: return data_t'((int'(a) - int'(b) + (1 << DATA_W)) % (1 << DATA_W));
      OP_SHL: return data_t'((int'(a) * 2) % (1 << DATA_W));
      OP_SHR: return data_t'(int'(a) / 2);
      OP_ROR: return data_t'(int'(a) / 2 + (int'(a) % 2) * (1 << (DATA_W - 1)));
      default: return '0;
    endcase
  endfunction

  function automatic bit ref_valid(addr_t x);
    return int'(x) >= 1 && int'(x) <= NUM_REGS;
  endfunction

  function automatic bit ref_active(instr_t ins);
    return ins.op != OP_NOP && ref_valid(ins.q);
  endfunction

  function automatic data_t ref_read(data_t regs [NUM_REGS], addr_t x);
    if (!ref_valid(x)) return '0;
    return regs[x - 1];
  endfunction

  // Runs the set in order; returns the final registers.
  function automatic void ref_run(input instr_t ins [NUM_INST],
                                  input data_t in_regs [NUM_REGS],
                                  output data_t out_regs [NUM_REGS]);
    data_t r [NUM_REGS];
    r = in_regs;
    for (int j = 0; j < NUM_INST; j++)
      if (ref_active(ins[j]))
        r[ins[j].q - 1] = ref_op(ins[j].op, ref_read(r, ins[j].a), ref_read(r, ins[j].b));
    out_regs = r;
  endfunction

  // Dependency level of each instruction (0 for bypassed ones).
  function automatic void ref_levels(input instr_t ins [NUM_INST], output int lvl [NUM_INST]);
    for (int j = 0; j < NUM_INST; j++) begin
      lvl[j] = 0;
      if (ref_active(ins[j])) begin
        lvl[j] = 1;
        for (int i = 0; i < j; i++)
          if (ref_active(ins[i]) && (ins[i].q == ins[j].a || ins[i].q == ins[j].b))
            if (lvl[i] + 1 > lvl[j]) lvl[j] = lvl[i] + 1;
      end
    end
  endfunction

  // Clocks from the edge that sees the NDR edge to the edge raising Complete.
  function automatic int ref_latency(instr_t ins [NUM_INST]);
    int lvl [NUM_INST];
    int m = 0;
    ref_levels(ins, lvl);
    foreach (lvl[j]) if (lvl[j] > m) m = lvl[j];
    return m == 0 ? 1 : 3 * m;
  endfunction

  // A random instruction; addresses mostly valid, sometimes 0 or 13..15.
  function automatic addr_t rand_addr();
    int unsigned p = $urandom_range(0, 19);
    if (p == 0) return '0;
    if (p == 1) return addr_t'($urandom_range(13, 15));
    return addr_t'($urandom_range(1, 12));
  endfunction

  function automatic instr_t rand_instr(int unsigned nop_pct);
    instr_t x;
    x.op = ($urandom_range(0, 99) < nop_pct) ? OP_NOP : opcode_e'($urandom_range(1, 7));
    x.a  = rand_addr();
    x.b  = rand_addr();
    x.q  = rand_addr();
    return x;
  endfunction

  // A random instruction whose addresses fall in 1..nregs, to force reuse.
  function automatic instr_t rand_instr_dense(int unsigned nregs);
    instr_t x;
    x.op = opcode_e'($urandom_range(1, 7));
    x.a  = addr_t'($urandom_range(1, nregs));
    x.b  = addr_t'($urandom_range(1, nregs));
    x.q  = addr_t'($urandom_range(1, nregs));
    return x;
  endfunction

endpackage

// Self-checking testbench of the distributer. Random instruction sets (with
// addresses drawn from a few registers so that forwarding is frequent), random
// input registers, ALU results and Complete flags. Checks, against a model
// written here:
//   - each operand register, one clock later, holds the result of the nearest
//     earlier active instruction writing the source register, else the input
//     register, else zero for an address naming no register;
//   - each output register is the input register unless completed
//     instructions write it, the highest-numbered one winning.
module tb_distributer;
  import alu_dm_pkg::*;
  import tb_ref_pkg::*;

  logic   clk = 0;
  logic   rst;
  instr_t instr [NUM_INST];
  data_t  in_reg [NUM_REGS];
  logic   alu_complete [NUM_INST];
  data_t  q_data [NUM_INST];
  data_t  a_data [NUM_INST];
  data_t  b_data [NUM_INST];
  data_t  out_reg [NUM_REGS];
  int     checks = 0, failures = 0;
  int     forwards = 0, overrides = 0;

  distributer dut (.*);

  always #5 clk = ~clk;

  function automatic data_t exp_operand(int j, addr_t src);
    data_t v;
    v = ref_read(in_reg, src);
    for (int i = j - 1; i >= 0; i--)
      if (ref_active(instr[i]) && instr[i].q == src) return q_data[i];
    return v;
  endfunction

  function automatic bit forwarded(int j, addr_t src);
    for (int i = 0; i < j; i++)
      if (ref_active(instr[i]) && instr[i].q == src) return 1;
    return 0;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t ea [NUM_INST], eb [NUM_INST];
    rst = 1;
    foreach (instr[i]) begin instr[i] = '{op: OP_NOP, default: '0}; alu_complete[i] = 0; q_data[i] = '0; end
    foreach (in_reg[i]) in_reg[i] = '0;
    @(posedge clk); @(negedge clk);
    rst = 0;
    for (int t = 0; t < 2000; t++) begin
      foreach (instr[i]) instr[i] = (t % 2 == 1) ? rand_instr_dense(4) : rand_instr(15);
      foreach (in_reg[i]) in_reg[i] = data_t'($urandom);
      foreach (q_data[i]) q_data[i] = data_t'($urandom);
      foreach (alu_complete[i]) alu_complete[i] = $urandom_range(0, 1) == 1 && ref_active(instr[i]);
      #1;
      // output registers, combinational
      for (int r = 0; r < NUM_REGS; r++) begin
        data_t e;
        e = in_reg[r];
        for (int i = 0; i < NUM_INST; i++)
          if (alu_complete[i] && instr[i].q == r + 1) begin e = q_data[i]; overrides++; end
        check(out_reg[r] == e, $sformatf("t=%0d out_reg%0d=%h exp=%h", t, r + 1, out_reg[r], e));
      end
      for (int j = 0; j < NUM_INST; j++) begin
        ea[j] = exp_operand(j, instr[j].a);
        eb[j] = exp_operand(j, instr[j].b);
        if (forwarded(j, instr[j].a) || forwarded(j, instr[j].b)) forwards++;
      end
      @(posedge clk); @(negedge clk);
      for (int j = 0; j < NUM_INST; j++) begin
        check(a_data[j] == ea[j], $sformatf("t=%0d A%0d=%h exp=%h", t, j + 1, a_data[j], ea[j]));
        check(b_data[j] == eb[j], $sformatf("t=%0d B%0d=%h exp=%h", t, j + 1, b_data[j], eb[j]));
      end
    end
    check(forwards > 0, "some operands were forwarded");
    check(overrides > 0, "some output registers were overridden");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

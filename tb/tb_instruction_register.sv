// Self-checking testbench of the instruction register: random instruction
// sets with random load; the register must take the set on a loaded edge,
// hold it otherwise, and clear to no-operations on reset.
module tb_instruction_register;
  import alu_dm_pkg::*;
  import tb_ref_pkg::*;

  logic   clk = 0;
  logic   rst, load;
  instr_t d [NUM_INST];
  instr_t q [NUM_INST];
  instr_t model [NUM_INST];
  int     checks = 0, failures = 0;

  instruction_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load = 1;
    foreach (d[i]) d[i] = rand_instr(0);
    @(posedge clk); @(negedge clk);
    foreach (q[i]) begin
      checks++;
      if (q[i].op != OP_NOP) begin failures++; $display("FAIL reset op"); end
    end
    rst = 0;
    foreach (model[i]) model[i] = q[i];
    for (int t = 0; t < 500; t++) begin
      foreach (d[i]) d[i] = rand_instr(10);
      load = $urandom_range(0, 2) == 0;
      @(posedge clk);
      if (load) model = d;
      @(negedge clk);
      foreach (q[i]) begin
        checks++;
        if (q[i] !== model[i]) begin
          failures++;
          $display("FAIL t=%0d instr %0d q=%h exp=%h", t, i, q[i], model[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench of the ALU: every opcode with every pair of 4-bit
// operands. Checks the result against a reference written with integer
// arithmetic, that Complete rises exactly one clock after Enable, that Q and
// Complete hold while Enable stays high even if the operands change, and that
// Complete clears one clock after Enable drops.
module tb_alu;
  import alu_dm_pkg::*;
  import tb_ref_pkg::*;

  logic    clk = 0;
  logic    rst;
  data_t   a, b, q;
  opcode_e opcode;
  logic    enable, complete;
  int      checks = 0, failures = 0;

  alu dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; enable = 0; a = '0; b = '0; opcode = OP_NOP;
    repeat (2) @(posedge clk);
    rst = 0;
    @(posedge clk);
    check(complete == 0, "complete low after reset");
    for (int op = 1; op < 8; op++) begin
      for (int x = 0; x < 16; x++) begin
        for (int y = 0; y < 16; y++) begin
          data_t exp;
          @(negedge clk);
          opcode = opcode_e'(op); a = data_t'(x); b = data_t'(y); enable = 1;
          exp = ref_op(opcode_e'(op), data_t'(x), data_t'(y));
          @(negedge clk);
          check(complete == 1, $sformatf("complete one clock after enable op=%0d", op));
          check(q == exp, $sformatf("op=%0d a=%0d b=%0d q=%0d exp=%0d", op, x, y, q, exp));
          // operands change while still enabled: result must hold
          a = ~a; b = b + 1;
          @(negedge clk);
          check(complete == 1 && q == exp, "result holds while enabled");
          enable = 0;
          @(negedge clk);
          check(complete == 0, "complete clears after enable drops");
          check(q == exp, "q keeps last result");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

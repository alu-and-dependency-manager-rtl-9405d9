// Throughput workload: 1000 instructions streamed through the unit as 250
// back-to-back sets of four, first all independent (best case), then all
// four-deep chains (worst case). NDR is raised on the first clock at which
// Complete is seen and dropped right after the start edge, so each set costs
// its latency plus one clock for the next NDR edge: 4 clocks per independent
// set (1000 clocks for 1000 instructions) and 13 per chained set (3250). The
// testbench checks every set's output registers against in-order execution
// and the total clock count of each run.
module tb_workload_1000;
  import alu_dm_pkg::*;
  import tb_ref_pkg::*;

  localparam int SETS = 250;

  logic   clk = 0;
  logic   rst, ndr;
  instr_t instr_in [NUM_INST];
  data_t  ireg [NUM_REGS];
  logic   ready, complete;
  logic   bypass [NUM_INST];
  data_t  oreg [NUM_REGS];
  int     checks = 0, failures = 0;
  int     cycle = 0;

  alu_dm_top dut (.*);

  always #3 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

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

  // A set of four instructions over distinct registers; chained makes each
  // instruction read the previous one's destination.
  task automatic make_set(bit chained, output instr_t s [NUM_INST]);
    int perm [NUM_REGS];
    foreach (perm[i]) perm[i] = i + 1;
    perm.shuffle();
    for (int i = 0; i < NUM_INST; i++) begin
      s[i].op = opcode_e'($urandom_range(1, 7));
      s[i].a  = addr_t'(chained && i > 0 ? perm[3 * i - 1] : perm[3 * i]);
      s[i].b  = addr_t'(perm[3 * i + 1]);
      s[i].q  = addr_t'(perm[3 * i + 2]);
    end
  endtask

  task automatic stream(bit chained, int exp_set_clocks);
    instr_t s [NUM_INST];
    data_t  d [NUM_REGS];
    data_t  exp [NUM_REGS];
    int     start, total;
    @(negedge clk);
    check(ready, "ready before the stream");
    start = cycle;
    for (int n = 0; n < SETS; n++) begin
      make_set(chained, s);
      foreach (d[i]) d[i] = data_t'($urandom);
      ref_run(s, d, exp);
      check(ref_latency(s) == exp_set_clocks - 1, "set latency as intended");
      instr_in = s;
      ireg = d;
      ndr = 1;
      @(negedge clk);
      ndr = 0;
      while (!complete) @(negedge clk);
      foreach (oreg[r])
        check(oreg[r] == exp[r], $sformatf("set %0d oREG%0d=%h exp=%h", n, r + 1, oreg[r], exp[r]));
    end
    total = cycle - start;
    $display("%s: %0d instructions in %0d clocks (%0d ns at 6 ns)",
             chained ? "chained" : "independent", SETS * NUM_INST, total, total * 6);
    check(total == SETS * exp_set_clocks, $sformatf("total clocks %0d exp %0d", total, SETS * exp_set_clocks));
  endtask

  initial begin
    rst = 1; ndr = 0;
    foreach (instr_in[i]) instr_in[i] = '{op: OP_NOP, default: '0};
    foreach (ireg[i]) ireg[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    stream(0, 4);
    stream(1, 13);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

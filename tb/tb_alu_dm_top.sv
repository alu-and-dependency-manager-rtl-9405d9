// End-to-end testbench of the processing unit at its default size (four
// instructions, twelve 4-bit registers). Each execution cycle presents an
// instruction set and input registers, raises NDR and waits for Complete. It
// checks:
//   - the twelve output registers against in-order execution of the set;
//   - the clocks from the edge that sees the NDR edge to Complete: 3 per
//     dependency level (3 with no dependency, 12 for a chain of four);
//   - Ready low while busy and high with Complete; Bypass per instruction;
//   - that inputs changed during a cycle and NDR edges during a cycle do not
//     disturb it, and that outputs hold while idle.
// Directed sets come first (no dependency, the chain-of-four worst case, a
// bypass, two writers of one register), then random sets. Every mechanism of
// the design must occur at least once: parallel issue, dependency stall with
// forwarding, bypass, write-after-write merge, NDR ignored while busy.
module tb_alu_dm_top;
  import alu_dm_pkg::*;
  import tb_ref_pkg::*;

  logic   clk = 0;
  logic   rst, ndr;
  instr_t instr_in [NUM_INST];
  data_t  ireg [NUM_REGS];
  logic   ready, complete;
  logic   bypass [NUM_INST];
  data_t  oreg [NUM_REGS];
  int     checks = 0, failures = 0;
  int     n_parallel = 0, n_stall = 0, n_bypass = 0, n_waw = 0, n_ignored_ndr = 0;
  int     n_worst = 0, n_nodep = 0;

  alu_dm_top dut (.*);

  always #3 clk = ~clk;   // 6 ns period

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

  task automatic run_set(instr_t s [NUM_INST], data_t d [NUM_REGS], bit disturb);
    data_t exp [NUM_REGS];
    int    lvl [NUM_INST];
    int    lat, k, n1;
    bit    saw_bypass [NUM_INST];
    ref_run(s, d, exp);
    ref_levels(s, lvl);
    lat = ref_latency(s);
    foreach (saw_bypass[i]) saw_bypass[i] = 0;
    @(negedge clk);
    check(ready, "ready before NDR");
    instr_in = s;
    ireg = d;
    ndr = 1;
    @(posedge clk);
    @(negedge clk);
    check(!ready && !complete, "busy after NDR");
    foreach (bypass[i]) if (bypass[i]) saw_bypass[i] = 1;
    k = 0;
    if (disturb) begin
      // the unit captured its inputs: scramble them, and pulse NDR
      foreach (ireg[i]) ireg[i] = ~d[i];
      foreach (instr_in[i]) instr_in[i] = rand_instr(0);
      ndr = 0;
    end
    while (!complete && k < 40) begin
      if (disturb && k == 1) begin ndr = 1; n_ignored_ndr++; end
      @(posedge clk); @(negedge clk);
      k++;
      if (!complete) check(!ready, "ready low while busy");
      foreach (bypass[i]) if (bypass[i]) saw_bypass[i] = 1;
    end
    check(k == lat, $sformatf("latency %0d exp %0d", k, lat));
    check(ready, "ready with complete");
    foreach (oreg[r])
      check(oreg[r] == exp[r], $sformatf("oREG%0d=%h exp=%h", r + 1, oreg[r], exp[r]));
    n1 = 0;
    foreach (s[i]) begin
      check(saw_bypass[i] == !ref_active(s[i]), $sformatf("bypass %0d", i));
      if (saw_bypass[i]) n_bypass++;
      if (lvl[i] == 1) n1++;
      if (lvl[i] > 1) n_stall++;
      for (int j = i + 1; j < NUM_INST; j++)
        if (ref_active(s[i]) && ref_active(s[j]) && s[i].q == s[j].q) n_waw++;
    end
    if (n1 > 1) n_parallel++;
    if (lat == 12) n_worst++;
    if (lat == 3 && n1 == NUM_INST) n_nodep++;
    ndr = 0;
    foreach (ireg[i]) ireg[i] = data_t'($urandom);
    repeat (3) @(negedge clk);
    check(complete && ready, "complete holds");
    foreach (oreg[r]) check(oreg[r] == exp[r], "outputs hold while idle");
  endtask

  initial begin
    instr_t s [NUM_INST];
    data_t  d [NUM_REGS];
    rst = 1; ndr = 0;
    foreach (instr_in[i]) instr_in[i] = '{op: OP_NOP, default: '0};
    foreach (ireg[i]) ireg[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    foreach (d[i]) d[i] = data_t'(i + 3);
    // four independent instructions
    s[0] = '{OP_ADD, 4'd1, 4'd2, 4'd9};
    s[1] = '{OP_SUB, 4'd3, 4'd4, 4'd10};
    s[2] = '{OP_OR,  4'd5, 4'd6, 4'd11};
    s[3] = '{OP_ROR, 4'd7, 4'd0, 4'd12};
    run_set(s, d, 0);
    // worst case: every instruction needs the previous result
    s[0] = '{OP_ADD, 4'd1, 4'd2, 4'd3};
    s[1] = '{OP_SUB, 4'd3, 4'd4, 4'd5};
    s[2] = '{OP_SHL, 4'd5, 4'd0, 4'd6};
    s[3] = '{OP_AND, 4'd6, 4'd3, 4'd1};
    run_set(s, d, 1);
    // a bypassed instruction and two writers of register 2
    s[0] = '{OP_OR,  4'd1, 4'd3, 4'd2};
    s[1] = '{OP_NOP, 4'd2, 4'd2, 4'd4};
    s[2] = '{OP_SHR, 4'd8, 4'd0, 4'd2};
    s[3] = '{OP_ADD, 4'd2, 4'd2, 4'd0};
    run_set(s, d, 0);
    for (int t = 0; t < 400; t++) begin
      foreach (d[i]) d[i] = data_t'($urandom);
      foreach (s[i]) s[i] = (t % 2 == 1) ? rand_instr_dense(5) : rand_instr(15);
      run_set(s, d, t % 4 == 0);
    end
    $display("no_dependency_sets=%0d worst_case_sets=%0d parallel=%0d stalls=%0d bypasses=%0d waw=%0d ignored_ndr=%0d",
             n_nodep, n_worst, n_parallel, n_stall, n_bypass, n_waw, n_ignored_ndr);
    check(n_nodep > 0, "no-dependency set ran");
    check(n_worst > 0, "worst-case chain ran");
    check(n_parallel > 0, "parallel issue happened");
    check(n_stall > 0, "dependency stall happened");
    check(n_bypass > 0, "bypass happened");
    check(n_waw > 0, "two writers of one register happened");
    check(n_ignored_ndr > 0, "NDR during a cycle happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

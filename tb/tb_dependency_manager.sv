// Self-checking testbench of the dependency manager, with the ALUs modelled
// here as a one-clock delay from Enable to Complete. For random instruction
// sets (many of them with dense register reuse) and directed ones (no
// dependency, a chain of four, all bypassed) it checks:
//   - Ready drops on the edge that sees the NDR rising edge; NDR edges during
//     a cycle are ignored;
//   - instruction j is first enabled 3*(level-1)+1 clocks after that edge,
//     level being its dependency depth, and stays enabled until Complete;
//   - bypassed instructions are never enabled and show Bypass while running;
//   - Complete and Ready rise 3*(highest level) clocks after the NDR edge
//     (one clock if all are bypassed), and Complete holds until the next NDR.
module tb_dependency_manager;
  import alu_dm_pkg::*;
  import tb_ref_pkg::*;

  logic   clk = 0;
  logic   rst, ndr;
  instr_t instr [NUM_INST];
  logic   alu_complete [NUM_INST];
  logic   enable [NUM_INST];
  logic   bypass [NUM_INST];
  logic   ready, complete;
  int     checks = 0, failures = 0;
  int     n_parallel = 0, n_stall = 0, n_bypass = 0, n_ignored_ndr = 0;

  dependency_manager dut (.*);

  always #5 clk = ~clk;

  // ALU model: Complete one clock after Enable, cleared when Enable drops.
  always_ff @(posedge clk)
    for (int i = 0; i < NUM_INST; i++) alu_complete[i] <= rst ? 1'b0 : enable[i];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_set(instr_t s [NUM_INST], bit pulse_during);
    int lvl [NUM_INST];
    int first_en [NUM_INST];
    int lat, k, n_first;
    ref_levels(s, lvl);
    lat = ref_latency(s);
    foreach (first_en[i]) first_en[i] = -1;
    @(negedge clk);
    instr = s;
    ndr = 1;
    @(posedge clk);            // edge k = 0 sees the NDR edge
    @(negedge clk);
    check(!ready && !complete, "ready and complete drop after NDR");
    k = 0;
    while (!complete && k < 40) begin
      if (pulse_during && k == 2) ndr = 0;
      if (pulse_during && k == 3) begin ndr = 1; n_ignored_ndr++; end
      @(posedge clk); @(negedge clk);
      k++;
      for (int i = 0; i < NUM_INST; i++) begin
        if (!complete) begin
          check(bypass[i] == !ref_active(s[i]), $sformatf("bypass %0d", i));
          if (bypass[i]) n_bypass++;
          if (first_en[i] >= 0) check(enable[i], $sformatf("enable %0d holds", i));
        end
        if (enable[i] && first_en[i] < 0) first_en[i] = k;
      end
    end
    check(k == lat, $sformatf("latency %0d exp %0d", k, lat));
    check(ready, "ready rises with complete");
    n_first = 0;
    for (int i = 0; i < NUM_INST; i++) begin
      if (ref_active(s[i])) begin
        check(first_en[i] == 3 * (lvl[i] - 1) + 1,
              $sformatf("instr %0d first enabled at %0d, level %0d", i, first_en[i], lvl[i]));
        if (lvl[i] == 1) n_first++;
        if (lvl[i] > 1) n_stall++;
      end else begin
        check(first_en[i] < 0, $sformatf("bypassed %0d enabled", i));
      end
      check(!enable[i], "enables drop at complete");
    end
    if (n_first > 1) n_parallel++;
    ndr = 0;
    repeat (2) @(negedge clk);
    check(complete && ready, "complete holds while idle");
  endtask

  initial begin
    instr_t s [NUM_INST];
    rst = 1; ndr = 0;
    foreach (instr[i]) instr[i] = '{op: OP_NOP, default: '0};
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(ready && !complete, "idle after reset");
    // no dependencies
    s[0] = '{OP_ADD, 4'd1, 4'd2, 4'd5};
    s[1] = '{OP_SUB, 4'd3, 4'd4, 4'd6};
    s[2] = '{OP_OR,  4'd1, 4'd3, 4'd7};
    s[3] = '{OP_AND, 4'd2, 4'd4, 4'd8};
    run_set(s, 0);
    // chain of four (worst case)
    s[0] = '{OP_ADD, 4'd1, 4'd2, 4'd5};
    s[1] = '{OP_SUB, 4'd5, 4'd4, 4'd6};
    s[2] = '{OP_OR,  4'd1, 4'd6, 4'd7};
    s[3] = '{OP_SHL, 4'd7, 4'd0, 4'd8};
    run_set(s, 1);
    // all bypassed
    s[0] = '{OP_NOP, 4'd1, 4'd2, 4'd5};
    s[1] = '{OP_ADD, 4'd1, 4'd2, 4'd0};
    s[2] = '{OP_NOP, 4'd1, 4'd6, 4'd7};
    s[3] = '{OP_OR,  4'd7, 4'd0, 4'd13};
    run_set(s, 0);
    for (int t = 0; t < 300; t++) begin
      foreach (s[i]) s[i] = (t % 2 == 1) ? rand_instr_dense(5) : rand_instr(15);
      run_set(s, t % 3 == 0);
    end
    check(n_parallel > 0, "parallel enables happened");
    check(n_stall > 0, "dependency stalls happened");
    check(n_bypass > 0, "bypasses happened");
    check(n_ignored_ndr > 0, "NDR during a cycle happened");
    $display("parallel=%0d stalls=%0d bypass=%0d ignored_ndr=%0d", n_parallel, n_stall, n_bypass, n_ignored_ndr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

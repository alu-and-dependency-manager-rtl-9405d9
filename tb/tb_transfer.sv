// Self-checking testbench of the transfer buffer: random data with random
// load; the buffer must take the data on a loaded edge and hold otherwise.
module tb_transfer;
  import alu_dm_pkg::*;

  logic  clk = 0;
  logic  rst, load;
  data_t d [NUM_REGS];
  data_t q [NUM_REGS];
  data_t model [NUM_REGS];
  int    checks = 0, failures = 0;

  transfer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load = 0;
    foreach (d[i]) d[i] = '0;
    @(posedge clk); @(negedge clk);
    rst = 0;
    foreach (model[i]) model[i] = '0;
    for (int t = 0; t < 500; t++) begin
      foreach (d[i]) d[i] = data_t'($urandom);
      load = $urandom_range(0, 2) == 0;
      @(posedge clk);
      if (load) model = d;
      @(negedge clk);
      foreach (q[i]) begin
        checks++;
        if (q[i] !== model[i]) begin
          failures++;
          $display("FAIL t=%0d reg %0d q=%h exp=%h", t, i + 1, q[i], model[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

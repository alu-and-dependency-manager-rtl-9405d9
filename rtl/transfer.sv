// Transfer buffer: NUM_REGS data registers of DATA_W bits between the system
// ports and the inside of the processing unit.
//
// The unit uses two of these. The input instance captures the twelve input
// data registers while the unit is idle and freezes them for the length of an
// execution cycle, so the external system may change its inputs at any time.
// The output instance follows the distributer's results while a set of
// instructions runs and freezes them when the set completes, so the outputs
// only ever change while the unit is busy.
//
// Interface: load high at a clock edge copies d into q; otherwise q holds.
// Reset clears q. The buffer's role and its size are the original design's;
// the clock, the load input and the reset are this design's choices.
module transfer
  import alu_dm_pkg::*;
#(
  parameter int unsigned N = NUM_REGS
) (
  input  logic  clk,
  input  logic  rst,       // synchronous, active high
  input  logic  load,
  input  data_t d [N],
  output data_t q [N]
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) q[i] <= '0;
    end else if (load) begin
      for (int i = 0; i < N; i++) q[i] <= d[i];
    end
  end

endmodule

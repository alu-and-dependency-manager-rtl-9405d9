// One ALU of the processing unit: 4-bit operands A and B, 3-bit opcode,
// result Q and a Complete flag.
//
// Operation: while Enable is high and Complete is still low, the ALU computes
// the operation selected by OPCode on the operands present at that clock edge,
// registers the result on Q and raises Complete. Q and Complete then hold for
// as long as Enable stays high, so the result is not recomputed from operands
// that change later. When Enable drops, Complete clears on the next edge; Q
// keeps the last result. Opcode 000 is never enabled (the dependency manager
// bypasses it); if it is, the ALU still completes and writes zero.
//
// Timing: Enable seen at edge n -> Q valid and Complete high after edge n.
// One clock of latency, as in the original design, where the ALU finishes one
// clock after it is enabled. The seven operations and their opcodes are the
// original design's; the registered result, the hold-while-enabled behaviour
// and the synchronous reset are choices of this design.
module alu
  import alu_dm_pkg::*;
(
  input  logic    clk,
  input  logic    rst,       // synchronous, active high
  input  data_t   a,
  input  data_t   b,
  input  opcode_e opcode,
  input  logic    enable,
  output data_t   q,
  output logic    complete
);

  data_t result;

  always_comb begin
    unique case (opcode)
      OP_OR:   result = a | b;
      OP_AND:  result = a & b;
      OP_ADD:  result = a + b;
      OP_SUB:  result = a - b;
      OP_SHL:  result = a << 1;
      OP_SHR:  result = a >> 1;
      OP_ROR:  result = {a[0], a[DATA_W-1:1]};
      default: result = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      q        <= '0;
      complete <= 1'b0;
    end else if (!enable) begin
      complete <= 1'b0;
    end else if (!complete) begin
      q        <= result;
      complete <= 1'b1;
    end
  end

endmodule

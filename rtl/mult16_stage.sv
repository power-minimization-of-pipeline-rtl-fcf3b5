// mult16_stage: combinational logic of one pipeline stage.
//
// The evaluated pipelines place one ISCAS'85 benchmark circuit in every
// stage; the one built here is c6288, a 16 x 16 unsigned multiplier with a
// 32-bit input (two operands) and a 32-bit output (the product). The stage
// word x is split into operand a = x[2*HALF-1:HALF] and b = x[HALF-1:0], and
// y = a * b, so stages can be chained word to word. The benchmark's gate-level
// array structure is not reproduced: the product is written with '*' and left
// to synthesis, which gives the same function.
//
// Purely combinational, no clock. HALF = 16 is the c6288 operand width.
module mult16_stage #(
  parameter int unsigned HALF = 16
) (
  input  logic [2*HALF-1:0] x,
  output logic [2*HALF-1:0] y
);

  logic [2*HALF-1:0] op_a, op_b;

  always_comb begin
    op_a = {{HALF{1'b0}}, x[2*HALF-1:HALF]};
    op_b = {{HALF{1'b0}}, x[HALF-1:0]};
    y    = op_a * op_b;   // a full-width product of two HALF-bit operands
  end

endmodule

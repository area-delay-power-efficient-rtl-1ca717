// cg0: carry generator for group carry-in 0.
//
// Produces the full-carry word c1^0 that the group would have if its carry
// input were 0. Bit 0 is the half-carry c0(0); every higher bit is
//   c10(i) = c0(i) | (s0(i) & c10(i-1)),
// an AND gate followed by an OR gate, so the word ripples from bit 0 upwards.
// The gate structure follows the design: s0(0) is not needed, because with
// carry-in 0 bit 0 carries only when both operand bits are 1. Combinational,
// no clock.
//
// Ports: s0, c0 (N bits, from the half-sum generator) -> c10 (N bits).
module cg0 #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] s0,
  input  logic [N-1:0] c0,
  output logic [N-1:0] c10
);
  assign c10[0] = c0[0];

  for (genvar i = 1; i < N; i++) begin : g_bit
    assign c10[i] = c0[i] | (s0[i] & c10[i-1]);
  end
endmodule

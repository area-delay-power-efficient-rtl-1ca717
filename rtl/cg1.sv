// cg1: carry generator for group carry-in 1.
//
// Produces the full-carry word c1^1 that the group would have if its carry
// input were 1. With a carry of 1 entering bit 0, that bit carries out when
// either operand bit is 1, so c11(0) = c0(0) | s0(0), a single OR gate. Every
// higher bit is c11(i) = c0(i) | (s0(i) & c11(i-1)), the same AND-OR stage as
// in the carry-in-0 generator. The gate structure follows the design; it is
// combinational, no clock.
//
// Ports: s0, c0 (N bits, from the half-sum generator) -> c11 (N bits).
module cg1 #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] s0,
  input  logic [N-1:0] c0,
  output logic [N-1:0] c11
);
  assign c11[0] = c0[0] | s0[0];

  for (genvar i = 1; i < N; i++) begin : g_bit
    assign c11[i] = c0[i] | (s0[i] & c11[i-1]);
  end
endmodule

// hsg: half-sum generator of the proposed carry-select group.
//
// For every bit it forms the half-sum s0(i) = A(i) xor B(i) and the
// half-carry c0(i) = A(i) and B(i): one XOR and one AND gate per bit, as the
// design describes. Both words feed the two carry generators, and s0 also
// feeds the final-sum generator. Combinational, no clock.
//
// Ports: a, b (N bits) -> s0, c0 (N bits).
module hsg #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s0,
  output logic [N-1:0] c0
);
  always_comb begin
    s0 = a ^ b;
    c0 = a & b;
  end
endmodule

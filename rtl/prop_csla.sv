// prop_csla: one N-bit group of the proposed carry-select adder.
//
// A classic carry-select group adds its operands twice, once for each value
// of the incoming carry, and then multiplexes the sums. This group instead
// works on carry words:
//   1. hsg   forms the half-sum s0 = a ^ b and half-carry c0 = a & b;
//   2. cg0   and cg1 turn (s0, c0) into the full-carry words c10 and c11 the
//            group would have with carry-in 0 and with carry-in 1;
//   3. cs_unit picks one carry word with the real carry-in (AND-OR per bit);
//   4. fsg   forms the sum s(i) = s0(i) ^ c(i-1), with cin below bit 0.
// The carry selection happens before the final sum, so the carry-out
// c(N-1) is ready after one AND-OR stage once cin arrives, and the sum one
// XOR later. This unit structure is the design's; the block is
// combinational and has no clock.
//
// Ports: a, b (N bits), cin -> s (N bits), cout.
module prop_csla #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N-1:0] s0, c0;    // half-sum and half-carry words
  logic [N-1:0] c10, c11;  // full-carry words for carry-in 0 and 1
  logic [N-1:0] c;         // selected carry word

  hsg #(.N(N)) u_hsg (
    .a (a),
    .b (b),
    .s0(s0),
    .c0(c0)
  );

  cg0 #(.N(N)) u_cg0 (
    .s0 (s0),
    .c0 (c0),
    .c10(c10)
  );

  cg1 #(.N(N)) u_cg1 (
    .s0 (s0),
    .c0 (c0),
    .c11(c11)
  );

  cs_unit #(.N(N)) u_cs (
    .c10(c10),
    .c11(c11),
    .cin(cin),
    .c  (c)
  );

  fsg #(.N(N)) u_fsg (
    .s0 (s0),
    .c  (c),
    .cin(cin),
    .s  (s)
  );

  assign cout = c[N-1];
endmodule

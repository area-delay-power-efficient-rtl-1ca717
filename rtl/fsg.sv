// fsg: final-sum generator of the proposed carry-select group.
//
// Forms the sum from the half-sum word and the selected carry word:
// s(0) = s0(0) xor cin and s(i) = s0(i) xor c(i-1), one XOR gate per bit, as
// the design describes. The top carry bit c(N-1) is not used here; it is the
// group's carry-out. Combinational, no clock.
//
// Ports: s0, c (N bits), cin -> s (N bits).
module fsg #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] s0,
  input  logic [N-1:0] c,
  input  logic         cin,
  output logic [N-1:0] s
);
  logic [N-1:0] carry_in;

  if (N > 1) begin : g_wide
    assign carry_in = {c[N-2:0], cin};
  end else begin : g_one
    assign carry_in = cin;
  end

  assign s = s0 ^ carry_in;
endmodule

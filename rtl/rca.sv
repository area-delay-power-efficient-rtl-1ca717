// rca: N-bit ripple-carry adder.
//
// In the square-root carry-select adder this adds the least significant bits
// (bits 1:0 in the 16-bit adder) with the adder's own carry input, and its
// carry output starts the chain of carry-select groups. It is a chain of N
// full adders, each passing its carry to the next; the delay grows linearly
// with N, which is why it is only used for the short low part. That it is
// built from full adders is the ordinary construction of a ripple-carry
// adder; the adder is combinational and has no clock.
//
// Ports: a, b (N bits), cin -> s (N bits), cout.
module rca #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_fa
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .s   (s[i]),
      .cout(carry[i+1])
    );
  end

  assign cout = carry[N];
endmodule

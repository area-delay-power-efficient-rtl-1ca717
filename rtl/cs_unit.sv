// cs_unit: carry-select unit of the proposed carry-select group.
//
// Selects the final carry word: c = c10 when cin = 0 and c = c11 when
// cin = 1. It is not a multiplexer. Because a carry-in of 1 can only add
// carries, every bit set in c10 is also set in c11, and the selection reduces
// to one AND and one OR gate per bit: c(i) = c10(i) | (cin & c11(i)). That
// gate structure is the design's. The reduction is only correct for carry
// words with this property; a deferred assertion checks it. The selection is
// made before the final sum is formed, and c(N-1) is the group's carry-out.
// Combinational, no clock.
//
// Ports: c10, c11 (N bits), cin -> c (N bits).
module cs_unit #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] c10,
  input  logic [N-1:0] c11,
  input  logic         cin,
  output logic [N-1:0] c
);
  always_comb begin
    c = c10 | ({N{cin}} & c11);
  end

  // Every carry produced with carry-in 0 is also produced with carry-in 1.
  always_comb begin
    a_carry_pattern : assert #0 ((c10 & ~c11) == '0)
      else $error("cs_unit: c10 has a bit that c11 lacks (c10=%b c11=%b)", c10, c11);
  end
endmodule

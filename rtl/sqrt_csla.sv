// sqrt_csla: square-root carry-select adder built from proposed CSLA groups.
//
// fs = a + b + cin, with carry-out cout. The low RCA_WIDTH bits are added by
// a ripple-carry adder; the rest of the word is split into carry-select
// groups (prop_csla) whose widths grow by one bit per group, so that a
// wider group has more time to form its carry words while the carry from
// below ripples through the narrower groups. Each group's carry-out is the
// next group's carry-in. With the defaults (WIDTH 16, RCA_WIDTH 2) the
// groups cover bits 3:2, 6:4, 10:7 and 15:11, with internal carries c1..c4
// between the stages; this is the published 16-bit arrangement. The group
// rule for other widths (see csla_pkg) is this design's own continuation.
//
// The adder is purely combinational: no clock and no reset. The result is
// valid one combinational settling time after the operands change.
//
// Ports: a, b (WIDTH bits), cin -> fs (WIDTH bits), cout.
module sqrt_csla
  import csla_pkg::*;
#(
  parameter int unsigned WIDTH     = 16,
  parameter int unsigned RCA_WIDTH = 2
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] fs,
  output logic             cout
);
  localparam int unsigned NG = num_groups(WIDTH, RCA_WIDTH);

  // carry[0] leaves the ripple-carry part; carry[g+1] leaves group g.
  logic [NG:0] carry;

  rca #(.N(RCA_WIDTH)) u_rca (
    .a   (a[RCA_WIDTH-1:0]),
    .b   (b[RCA_WIDTH-1:0]),
    .cin (cin),
    .s   (fs[RCA_WIDTH-1:0]),
    .cout(carry[0])
  );

  for (genvar g = 0; g < NG; g++) begin : g_grp
    localparam int unsigned LSB = group_lsb(RCA_WIDTH, g);
    localparam int unsigned GW  = group_width(WIDTH, RCA_WIDTH, g);

    prop_csla #(.N(GW)) u_csla (
      .a   (a[LSB+GW-1:LSB]),
      .b   (b[LSB+GW-1:LSB]),
      .cin (carry[g]),
      .s   (fs[LSB+GW-1:LSB]),
      .cout(carry[g+1])
    );
  end

  assign cout = carry[NG];

  initial begin
    assert (WIDTH > RCA_WIDTH && RCA_WIDTH > 0)
      else $fatal(1, "sqrt_csla: WIDTH must exceed RCA_WIDTH, and RCA_WIDTH must be positive");
  end
endmodule

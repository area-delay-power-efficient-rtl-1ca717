// tb_sqrt_csla: end-to-end test of the 16-bit square-root carry-select
// adder at its default parameters.
//
// Applies directed vectors (zero, all ones, a carry rippling through every
// group, the operand pair a = F0F0, b = FF00, cin = 0, whose sum is EFF0
// with carry-out 1) and 200000 random vectors. Each result {cout, fs} is
// compared with the integer sum a + b + cin, and every carry passed between
// stages (c1..c4) with the carry out of the same bit position of that sum; a stage carry is
// read back through the ports as fs[lsb] ^ a[lsb] ^ b[lsb] of the group it
// enters.
//
// It also counts the adder's mechanisms and fails if one never happened:
// for each carry-select group, the carry-in selecting the carry-in-1 word
// while that word differs from the carry-in-0 word, and the same for the
// carry-in-0 word; a carry generated in the ripple part and carried
// through all four groups to cout; and a carry-out of 1.
module tb_sqrt_csla;
  import csla_pkg::*;

  localparam int unsigned WIDTH     = 16;
  localparam int unsigned RCA_WIDTH = 2;
  localparam int unsigned NG        = num_groups(WIDTH, RCA_WIDTH);

  logic [WIDTH-1:0] a, b, fs;
  logic             cin, cout;
  int checks = 0, failures = 0;
  int sel1[NG], sel0[NG];
  int full_ripple = 0, carry_out = 0;

  sqrt_csla dut (.a(a), .b(b), .cin(cin), .fs(fs), .cout(cout));

  // Carry into bit position pos of a + b + cin.
  function automatic logic carry_into(logic [WIDTH-1:0] x, logic [WIDTH-1:0] y, logic ci,
                                      int unsigned pos);
    logic [WIDTH:0] m = (WIDTH + 1)'((64'd1 << pos) - 1);
    logic [WIDTH:0] t = ((WIDTH + 1)'(x) & m) + ((WIDTH + 1)'(y) & m) + (WIDTH + 1)'(ci);
    return t[pos];
  endfunction

  task automatic apply(logic [WIDTH-1:0] x, logic [WIDTH-1:0] y, logic ci);
    logic [WIDTH:0] want;
    a = x; b = y; cin = ci;
    #1;
    want = (WIDTH + 1)'(x) + (WIDTH + 1)'(y) + (WIDTH + 1)'(ci);
    checks++;
    if ({cout, fs} !== want) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b got %b_%h want %b_%h", x, y, ci, cout, fs,
               want[WIDTH], want[WIDTH-1:0]);
    end
    // The carry entering a group is visible at the group's lowest sum bit:
    // fs[lsb] = a[lsb] ^ b[lsb] ^ carry. The carry out of the last group is cout.
    for (int unsigned g = 0; g <= NG; g++) begin
      automatic int unsigned pos = (g == NG) ? WIDTH : group_lsb(RCA_WIDTH, g);
      automatic logic got = (g == NG) ? cout : fs[pos] ^ x[pos] ^ y[pos];
      automatic logic want_c = carry_into(x, y, ci, pos);
      checks++;
      if (got !== want_c) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%b carry into bit %0d is %b", x, y, ci, pos, got);
      end
      // The two carry words of group g differ exactly when its bit 0
      // propagates; the incoming carry then decides which one is used.
      if (g < NG && (x[pos] ^ y[pos]) == 1'b1) begin
        if (want_c) sel1[g]++; else sel0[g]++;
      end
    end
    if (carry_into(x, y, ci, RCA_WIDTH) && ((x ^ y) >> RCA_WIDTH) == (WIDTH'(1) << (WIDTH - RCA_WIDTH)) - 1)
      full_ripple++;
    if (cout) carry_out++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (sel1[g]) begin sel1[g] = 0; sel0[g] = 0; end
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply('1, '0, 1'b1);
    apply('1, WIDTH'(1), 1'b0);
    apply(16'hF0F0, 16'hFF00, 1'b0);
    checks++;
    if (fs !== 16'hEFF0 || cout !== 1'b1) failures++;
    for (int unsigned g = 0; g < NG; g++) begin
      // Carry arriving at each group with and without propagation.
      automatic int unsigned lsb = group_lsb(RCA_WIDTH, g);
      apply(WIDTH'(1) << lsb | WIDTH'(1), WIDTH'(1), 1'b1);
      apply(WIDTH'(1) << lsb, '0, 1'b0);
    end
    for (int n = 0; n < 200000; n++)
      apply(WIDTH'($urandom), WIDTH'($urandom), 1'($urandom));

    for (int unsigned g = 0; g < NG; g++) begin
      $display("group %0d (bits %0d..%0d): carry-in-1 word selected %0d, carry-in-0 word selected %0d",
               g, group_lsb(RCA_WIDTH, g),
               group_lsb(RCA_WIDTH, g) + group_width(WIDTH, RCA_WIDTH, g) - 1, sel1[g], sel0[g]);
      checks++;
      if (sel1[g] == 0 || sel0[g] == 0) failures++;
    end
    $display("carry through all groups: %0d, carry-out: %0d", full_ripple, carry_out);
    checks++;
    if (full_ripple == 0 || carry_out == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

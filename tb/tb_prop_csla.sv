// tb_prop_csla: exhaustive check of the proposed carry-select group at the
// four widths the 16-bit adder uses (2, 3, 4 and 5 bits) and at the default
// width. {cout, s} must equal a + b + cin for every input. It also counts
// the cases in which the carry-in changes the carry word (half-sum bit 0
// set), for each value of cin, and fails if either never occurred.
module tb_prop_csla;
  logic [4:0] a, b;
  logic       cin;
  logic [1:0] s2;
  logic [2:0] s3;
  logic [3:0] s4;
  logic [4:0] s5;
  logic       co2, co3, co4, co5;
  int checks = 0, failures = 0;
  int sel0 = 0, sel1 = 0;

  prop_csla #(.N(2)) dut2 (.a(a[1:0]), .b(b[1:0]), .cin(cin), .s(s2), .cout(co2));
  prop_csla #(.N(3)) dut3 (.a(a[2:0]), .b(b[2:0]), .cin(cin), .s(s3), .cout(co3));
  prop_csla          dut4 (.a(a[3:0]), .b(b[3:0]), .cin(cin), .s(s4), .cout(co4));
  prop_csla #(.N(5)) dut5 (.a(a),      .b(b),      .cin(cin), .s(s5), .cout(co5));

  task automatic check(int n, int got, int i, int j, int ci);
    int m = (1 << n) - 1;
    int want = (i & m) + (j & m) + ci;
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL N=%0d a=%h b=%h cin=%0d got %h want %h", n, i & m, j & m, ci, got, want);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      for (int j = 0; j < 32; j++) begin
        for (int ci = 0; ci < 2; ci++) begin
          a = 5'(i); b = 5'(j); cin = 1'(ci);
          #1;
          if (((i ^ j) & 1) == 1) begin
            if (ci == 1) sel1++; else sel0++;
          end
          check(5, int'({co5, s5}), i, j, ci);
          if (i < 16 && j < 16) check(4, int'({co4, s4}), i, j, ci);
          if (i < 8 && j < 8)   check(3, int'({co3, s3}), i, j, ci);
          if (i < 4 && j < 4)   check(2, int'({co2, s2}), i, j, ci);
        end
      end
    end
    $display("carry word selected by cin: cin=0 %0d times, cin=1 %0d times", sel0, sel1);
    checks++;
    if (sel0 == 0 || sel1 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cs_unit: check of the carry-select unit at N = 4.
// The two carry words are the true carry words of a + b + 0 and a + b + 1,
// computed arithmetically here for every operand pair; for both values of
// cin the unit must return the carry word of a + b + cin.
module tb_cs_unit;
  localparam int unsigned N = 4;
  logic [N-1:0] c10, c11, c;
  logic         cin;
  int checks = 0, failures = 0;

  cs_unit #(.N(N)) dut (.c10(c10), .c11(c11), .cin(cin), .c(c));

  // Carry out of each bit position of x + y + ci.
  function automatic logic [N-1:0] carry_word(int x, int y, int ci);
    logic [N-1:0] w;
    for (int k = 0; k < N; k++) begin
      int m = (1 << (k + 1)) - 1;
      w[k] = 1'(((x & m) + (y & m) + ci) >> (k + 1));
    end
    return w;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << N); i++) begin
      for (int j = 0; j < (1 << N); j++) begin
        for (int ci = 0; ci < 2; ci++) begin
          c10 = carry_word(i, j, 0);
          c11 = carry_word(i, j, 1);
          cin = 1'(ci);
          #1;
          checks++;
          if (c !== carry_word(i, j, ci)) begin
            failures++;
            $display("FAIL a=%h b=%h cin=%b c=%b", i, j, cin, c);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

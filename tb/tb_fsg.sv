// tb_fsg: exhaustive check of the final-sum generator at N = 4.
// For every a, b and cin it is given the half-sum word and the true carry
// word of a + b + cin (computed arithmetically here) and must return the
// low N bits of a + b + cin.
module tb_fsg;
  localparam int unsigned N = 4;
  logic [N-1:0] s0, c, s;
  logic         cin;
  int checks = 0, failures = 0;

  fsg #(.N(N)) dut (.s0(s0), .c(c), .cin(cin), .s(s));

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
          s0  = N'(i ^ j);
          cin = 1'(ci);
          for (int k = 0; k < N; k++) begin
            automatic int m = (1 << (k + 1)) - 1;
            c[k] = 1'(((i & m) + (j & m) + ci) >> (k + 1));
          end
          #1;
          checks++;
          if (s !== N'(i + j + ci)) begin
            failures++;
            $display("FAIL a=%h b=%h cin=%b s=%h", i, j, cin, s);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

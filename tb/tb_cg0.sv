// tb_cg0: exhaustive check of the carry generator for carry-in 0 at N = 4.
// The half-sum and half-carry words are formed from every operand pair,
// and each bit of c10 must equal the carry out of that bit position in the
// integer sum a + b + 0.
module tb_cg0;
  localparam int unsigned N = 4;
  logic [N-1:0] a, b, s0, c0, c10;
  int checks = 0, failures = 0;

  cg0 #(.N(N)) dut (.s0(s0), .c0(c0), .c10(c10));

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
        a  = N'(i);
        b  = N'(j);
        s0 = a ^ b;
        c0 = a & b;
        #1;
        for (int k = 0; k < N; k++) begin
          automatic int lowmask = (1 << (k + 1)) - 1;
          automatic logic expect_c = 1'(((i & lowmask) + (j & lowmask) + 0) >> (k + 1));
          checks++;
          if (c10[k] !== expect_c) begin
            failures++;
            $display("FAIL a=%h b=%h bit %0d got %b want %b", a, b, k, c10[k], expect_c);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

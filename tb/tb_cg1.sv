// tb_cg1: exhaustive check of the carry generator for carry-in 1 at N = 4.
// The half-sum and half-carry words are formed from every operand pair,
// and each bit of c11 must equal the carry out of that bit position in the
// integer sum a + b + 1.
module tb_cg1;
  localparam int unsigned N = 4;
  logic [N-1:0] a, b, s0, c0, c11;
  int checks = 0, failures = 0;

  cg1 #(.N(N)) dut (.s0(s0), .c0(c0), .c11(c11));

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
          automatic logic expect_c = 1'(((i & lowmask) + (j & lowmask) + 1) >> (k + 1));
          checks++;
          if (c11[k] !== expect_c) begin
            failures++;
            $display("FAIL a=%h b=%h bit %0d got %b want %b", a, b, k, c11[k], expect_c);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_hsg: exhaustive check of the half-sum generator at N = 4.
// For every operand pair the half-sum and half-carry must satisfy
// s0 + 2*c0 == a + b, and s0 and c0 may never both be 1 in a bit.
module tb_hsg;
  localparam int unsigned N = 4;
  logic [N-1:0] a, b, s0, c0;
  int checks = 0, failures = 0;

  hsg #(.N(N)) dut (.a(a), .b(b), .s0(s0), .c0(c0));

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
        a = N'(i);
        b = N'(j);
        #1;
        checks++;
        if (int'(s0) + 2 * int'(c0) !== i + j || (s0 & c0) !== '0) begin
          failures++;
          $display("FAIL a=%h b=%h s0=%b c0=%b", a, b, s0, c0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

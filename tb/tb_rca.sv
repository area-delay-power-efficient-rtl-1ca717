// tb_rca: exhaustive check of the ripple-carry adder at N = 2 (its use in
// the 16-bit adder) and at N = 5. {cout, s} must equal a + b + cin.
module tb_rca;
  logic [1:0] a2, b2, s2;
  logic [4:0] a5, b5, s5;
  logic       cin, co2, co5;
  int checks = 0, failures = 0;

  rca #(.N(2)) dut2 (.a(a2), .b(b2), .cin(cin), .s(s2), .cout(co2));
  rca #(.N(5)) dut5 (.a(a5), .b(b5), .cin(cin), .s(s5), .cout(co5));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      for (int j = 0; j < 32; j++) begin
        for (int ci = 0; ci < 2; ci++) begin
          a5 = 5'(i); b5 = 5'(j);
          a2 = 2'(i); b2 = 2'(j);
          cin = 1'(ci);
          #1;
          checks++;
          if ({co5, s5} !== 6'(i + j + ci)) begin
            failures++;
            $display("FAIL N=5 a=%h b=%h cin=%b got %h", a5, b5, cin, {co5, s5});
          end
          if (i < 4 && j < 4) begin
            checks++;
            if ({co2, s2} !== 3'(i + j + ci)) begin
              failures++;
              $display("FAIL N=2 a=%h b=%h cin=%b got %h", a2, b2, cin, {co2, s2});
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

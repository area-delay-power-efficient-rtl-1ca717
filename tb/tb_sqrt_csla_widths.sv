// tb_sqrt_csla_widths: the square-root carry-select adder at the other
// operand widths it is evaluated at, 32 and 64 bits, with the group rule of
// csla_pkg (32 bits: ripple part 2, groups 2,3,4,5,6,7,3; 64 bits: ripple
// part 2, groups 2 to 10 and a last group of 8). Each adder gets directed
// carry-chain vectors and 100000 random vectors, and {cout, fs} is compared
// with the integer sum a + b + cin.
module tb_sqrt_csla_widths;
  logic [63:0] a, b;
  logic        cin;
  logic [31:0] fs32;
  logic [63:0] fs64;
  logic        co32, co64;
  int checks = 0, failures = 0;

  sqrt_csla #(.WIDTH(32)) dut32 (.a(a[31:0]), .b(b[31:0]), .cin(cin), .fs(fs32), .cout(co32));
  sqrt_csla #(.WIDTH(64)) dut64 (.a(a),       .b(b),       .cin(cin), .fs(fs64), .cout(co64));

  task automatic apply(logic [63:0] x, logic [63:0] y, logic ci);
    logic [32:0] want32;
    logic [64:0] want64;
    a = x; b = y; cin = ci;
    #1;
    want32 = 33'(x[31:0]) + 33'(y[31:0]) + 33'(ci);
    want64 = 65'(x) + 65'(y) + 65'(ci);
    checks += 2;
    if ({co32, fs32} !== want32) begin
      failures++;
      $display("FAIL 32-bit a=%h b=%h cin=%b got %b_%h", x[31:0], y[31:0], ci, co32, fs32);
    end
    if ({co64, fs64} !== want64) begin
      failures++;
      $display("FAIL 64-bit a=%h b=%h cin=%b got %b_%h", x, y, ci, co64, fs64);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0, 1'b0);
    apply('1, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply('1, 64'd1, 1'b0);
    apply(64'h8000_0000_8000_0000, 64'h8000_0000_8000_0000, 1'b0);
    for (int n = 0; n < 100000; n++)
      apply({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

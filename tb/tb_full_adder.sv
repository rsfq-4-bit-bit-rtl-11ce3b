// Exhaustive test of the one-bit full adder: all eight input combinations,
// sum and carry compared with the arithmetic sum a + b + c.
module tb_full_adder;
  logic a, b, c, sum, cout;
  int checks = 0, failures = 0;

  full_adder dut (.a, .b, .c, .sum, .cout);

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({cout, sum} != 2'(a + b + c)) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b -> cout=%b sum=%b", a, b, c, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #1000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

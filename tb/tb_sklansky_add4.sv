// Exhaustive test of the 4-bit Sklansky adder: all 512 combinations of a, b
// and carry in, {cout, sum} compared with a + b + cin.
module tb_sklansky_add4;
  import bsm_pkg::*;
  slice_t a, b, sum;
  logic   cin, cout;
  int checks = 0, failures = 0;

  sklansky_add4 dut (.a, .b, .cin, .sum, .cout);

  initial begin
    for (int v = 0; v < 512; v++) begin
      {cin, a, b} = 9'(v);
      #1;
      checks++;
      if ({cout, sum} != 5'(a + b + cin)) begin
        failures++;
        $display("FAIL %h + %h + %b -> %b %h", a, b, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #10000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

// End-to-end test of the bit-slice multiplier at its default size (n = 2,
// 8 x 8 bits), with no parameter override: 300 signed and unsigned
// multiplications, directed and random, back to back and with gaps, every
// product and its output timing checked against a 64-bit reference. See
// tb_mult_env for what is checked.
module tb_bitslice_mult;
  int checks, failures;
  bit done;

  tb_mult_env #(.N(2), .USE_DEFAULT(1'b1), .NOPS(300), .SEED(7)) env (
    .checks, .failures, .done
  );

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #100000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

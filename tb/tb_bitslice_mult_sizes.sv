// End-to-end test of the bit-slice multiplier at other operand sizes:
// n = 1, 3, 4 and 8 (4x4, 12x12, 16x16 and 32x32 bits), each with random and
// directed signed and unsigned operations, back to back and with gaps. See
// tb_mult_env for what is checked.
module tb_bitslice_mult_sizes;
  int  checks [4];
  int  failures [4];
  bit  done [4];

  tb_mult_env #(.N(1), .NOPS(200), .SEED(11)) e1 (.checks(checks[0]), .failures(failures[0]), .done(done[0]));
  tb_mult_env #(.N(3), .NOPS(200), .SEED(12)) e3 (.checks(checks[1]), .failures(failures[1]), .done(done[1]));
  tb_mult_env #(.N(4), .NOPS(200), .SEED(13)) e4 (.checks(checks[2]), .failures(failures[2]), .done(done[2]));
  tb_mult_env #(.N(8), .NOPS(200), .SEED(14)) e8 (.checks(checks[3]), .failures(failures[3]), .done(done[3]));

  function automatic int total(int v [4]);
    return v[0] + v[1] + v[2] + v[3];
  endfunction

  initial begin
    wait (done[0] && done[1] && done[2] && done[3]);
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures));
    $finish;
  end

  // watchdog
  initial begin
    #200000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures) + 1);
    $finish;
  end
endmodule

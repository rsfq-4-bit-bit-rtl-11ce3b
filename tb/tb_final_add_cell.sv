// Stream test of the final addition cell: three random numbers of L slices
// enter as carry-save slices, least significant first, with start_in on
// slice 0, then two zero slices; the product-slice output, one clock behind
// its input slice, must form the sum of the three numbers modulo 16^(L+2).
// Operations follow each other without a gap, so a carry left over by one
// must be dropped at the next start.
module tb_final_add_cell;
  import bsm_pkg::*;
  localparam int L = 6;
  localparam int T = L + 2;

  logic   clk, rst, start_in;
  csa3_t  s_in;
  slice_t z_out;
  int checks = 0, failures = 0;

  final_add_cell dut (.clk, .rst, .start_in, .s_in, .z_out);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    longint unsigned v0, v1, v2, got, want;
    rst = 1'b1; start_in = 1'b0; s_in = '0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    for (int op = 0; op < 300; op++) begin
      v0 = {$urandom, $urandom} & ((64'd1 << (4*T)) - 1);
      v1 = {$urandom, $urandom} & ((64'd1 << (4*T)) - 1);
      v2 = {$urandom, $urandom} & ((64'd1 << (4*T)) - 1);
      want = (v0 + v1 + v2) & ((64'd1 << (4*T)) - 1);
      got = 0;
      for (int s = 0; s < T; s++) begin
        start_in = (s == 0);
        s_in = '{s0: slice_t'(v0 >> (4*s)), s1: slice_t'(v1 >> (4*s)), s2: slice_t'(v2 >> (4*s))};
        @(negedge clk);
        got |= longint'(z_out) << (4*s);
      end
      checks++;
      if (got != want) begin
        failures++;
        $display("FAIL op %0d: got %h expected %h", op, got, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

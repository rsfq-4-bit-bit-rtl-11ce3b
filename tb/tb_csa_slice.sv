// Stream test of the 4-bit bit-slice carry-save adder. Each operation feeds
// three random numbers of L slices, least significant first, with clr on
// slice 0, followed by two zero slices; the numbers represented by the sum
// and carry streams must add up to the sum of the three inputs. The held
// carry of the previous operation is made nonzero on purpose and must be
// dropped by clr. Per-clock, sum must equal a ^ b ^ c.
module tb_csa_slice;
  import bsm_pkg::*;
  localparam int L = 6;      // data slices per operation
  localparam int T = L + 2;  // slices per operation incl. flush

  logic   clk, rst, clr;
  slice_t a, b, c, sum, carry;
  int checks = 0, failures = 0;
  int dropped = 0;

  csa_slice dut (.clk, .rst, .clr, .a, .b, .c, .sum, .carry);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    longint unsigned va, vb, vc, got;
    rst = 1'b1; clr = 1'b0; a = '0; b = '0; c = '0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    for (int op = 0; op < 300; op++) begin
      va = {$urandom, $urandom} & ((64'd1 << (4*L)) - 1);
      vb = {$urandom, $urandom} & ((64'd1 << (4*L)) - 1);
      vc = {$urandom, $urandom} & ((64'd1 << (4*L)) - 1);
      got = 0;
      for (int s = 0; s < T; s++) begin
        clr = (s == 0);
        a = slice_t'(va >> (4*s)); b = slice_t'(vb >> (4*s)); c = slice_t'(vc >> (4*s));
        if (s >= L) begin a = '0; b = '0; c = '0; end
        #1;
        checks++;
        if (sum != (a ^ b ^ c)) begin
          failures++;
          $display("FAIL op %0d slice %0d: sum %h", op, s, sum);
        end
        got += (longint'(sum) + longint'(carry)) << (4*s);
        @(negedge clk);
      end
      checks++;
      if (got != va + vb + vc) begin
        failures++;
        $display("FAIL op %0d: %h + %h + %h gave %h", op, va, vb, vc, got);
      end
      // put a carry into the flip-flop, then start the next operation
      clr = 1'b0; a = 4'hF; b = 4'hF; c = 4'hF;
      @(negedge clk);
      if (dut.held_q) dropped++;
    end
    checks++;
    if (dropped == 0) begin failures++; $display("FAIL: carry drop never exercised"); end
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

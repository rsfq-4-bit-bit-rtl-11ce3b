// Stream test of the 4-bit bit-slice adder: two random numbers of L slices,
// least significant first with clr on slice 0, plus one zero slice; the
// registered result slices, one clock later each, must form a + b. Between
// operations the carry flip-flop is loaded with a one, which clr must drop.
module tb_bitslice_adder;
  import bsm_pkg::*;
  localparam int L = 8;

  logic   clk, rst, clr;
  slice_t a, b, sum;
  int checks = 0, failures = 0;
  int carries = 0;

  bitslice_adder dut (.clk, .rst, .clr, .a, .b, .sum);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    longint unsigned va, vb, got;
    rst = 1'b1; clr = 1'b0; a = '0; b = '0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    for (int op = 0; op < 300; op++) begin
      va = {$urandom, $urandom} & ((64'd1 << (4*L)) - 1);
      vb = {$urandom, $urandom} & ((64'd1 << (4*L)) - 1);
      if (op == 0) begin va = (64'd1 << (4*L)) - 1; vb = 1; end
      got = 0;
      for (int s = 0; s <= L; s++) begin
        clr = (s == 0);
        a = (s < L) ? slice_t'(va >> (4*s)) : '0;
        b = (s < L) ? slice_t'(vb >> (4*s)) : '0;
        @(negedge clk);
        // sum now holds the result of slice s
        got |= longint'(sum) << (4*s);
        if (dut.carry_q) carries++;
      end
      checks++;
      if (got != va + vb) begin
        failures++;
        $display("FAIL op %0d: %h + %h gave %h", op, va, vb, got);
      end
      clr = 1'b0; a = 4'hF; b = 4'hF;
      @(negedge clk);
    end
    checks++;
    if (carries == 0) failures++;
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

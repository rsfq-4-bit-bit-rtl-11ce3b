// Stream test of the 4-4 accumulator. Each operation presents four
// partial-product numbers and three incoming carry-save numbers of L slices,
// least significant slice first with clr on slice 0, then four zero slices
// to flush the held carries. The three output streams, read as numbers, must
// add up to the sum of the seven inputs. Between operations the held carries
// are loaded with ones, which clr must discard.
module tb_acc44;
  import bsm_pkg::*;
  localparam int L = 6;
  localparam int T = L + 4;

  logic   clk, rst, clr;
  slice_t pp [SLICE_W];
  csa3_t  s_in, s_out;
  int checks = 0, failures = 0;

  acc44 dut (.clk, .rst, .clr, .pp, .s_in, .s_out);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    longint unsigned v [7];
    longint unsigned want, got;
    slice_t sl [7];
    rst = 1'b1; clr = 1'b0; pp = '{default: '0}; s_in = '0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    for (int op = 0; op < 300; op++) begin
      want = 0;
      for (int q = 0; q < 7; q++) begin
        v[q] = {$urandom, $urandom} & ((64'd1 << (4*L)) - 1);
        want += v[q];
      end
      got = 0;
      for (int s = 0; s < T; s++) begin
        for (int q = 0; q < 7; q++) sl[q] = (s < L) ? slice_t'(v[q] >> (4*s)) : '0;
        clr = (s == 0);
        pp[0] = sl[0]; pp[1] = sl[1]; pp[2] = sl[2]; pp[3] = sl[3];
        s_in = '{s0: sl[4], s1: sl[5], s2: sl[6]};
        #1;
        got += (longint'(s_out.s0) + longint'(s_out.s1) + longint'(s_out.s2)) << (4*s);
        @(negedge clk);
      end
      checks++;
      if (got != want) begin
        failures++;
        $display("FAIL op %0d: got %h expected %h", op, got, want);
      end
      clr = 1'b0; pp = '{default: 4'hF}; s_in = '1;
      @(negedge clk);
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

// Test of the main systolic cell in two settings, operations back to back.
//
// A: a cell that is both the least and the most significant one (n = 1, a
//    4 x 4-bit multiplier without its final adder). Per operation Start,
//    X_0 (valid, sign-tagged if signed), Y_0 and the direct Sign arrive
//    together, with a random carry-save input stream. The two output slices,
//    read as the sum of the three carry-save numbers, must equal
//    X*Y + (input numbers) modulo 2^8, signed or unsigned.
// B: a middle cell at position i = 1 of an n = 2 (8 x 8-bit) multiplier.
//    Start marks slice 0; X_0 and X_1 arrive one and two clocks later. Its
//    contribution over four slices must be Y_1 * X * 16 for an unsigned
//    operation and, for a signed one, the same with the four products of
//    x_7 complemented (the cell holds no sign bit of Y).
// Also checked: Start leaves one clock later, X two clocks later.
module tb_main_cell;
  import bsm_pkg::*;

  logic clk, rst;
  initial clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---------------- A
  logic    a_start, a_start_out, a_sign;
  slice_t  a_y;
  xslice_t a_x, a_xo;
  csa3_t   a_si, a_so;

  main_cell #(.MSB_CELL(1'b1), .LSB_CELL(1'b1)) dut_a (
    .clk, .rst, .start_in(a_start), .start_out(a_start_out), .y_in(a_y),
    .sign_direct(a_sign), .x_in(a_x), .x_out(a_xo), .s_in(a_si), .s_out(a_so));

  // ---------------- B
  logic    b_start, b_start_out;
  slice_t  b_y;
  xslice_t b_x, b_xo;
  csa3_t   b_si, b_so;

  main_cell dut_b (
    .clk, .rst, .start_in(b_start), .start_out(b_start_out), .y_in(b_y),
    .sign_direct(1'b0), .x_in(b_x), .x_out(b_xo), .s_in(b_si), .s_out(b_so));

  function automatic int sum3(csa3_t v);
    return int'(v.s0) + int'(v.s1) + int'(v.s2);
  endfunction

  initial begin : run_a
    int xv, yv, want, got, inv;
    bit sg;
    rst = 1'b1;
    a_start = 0; a_sign = 0; a_y = '0; a_x = '0; a_si = '0;
    b_start = 0; b_y = '0; b_x = '0; b_si = '0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    fork
      // ---- A: period 2 clocks
      for (int op = 0; op < 400; op++) begin
        xv = int'($urandom_range(0, 15)); yv = int'($urandom_range(0, 15)); sg = 1'($urandom_range(0, 1));
        want = sg ? (((xv ^ 8) - 8) * ((yv ^ 8) - 8)) : xv * yv;
        got = 0;
        for (int s = 0; s < 2; s++) begin
          a_start = (s == 0);
          a_x     = (s == 0) ? '{valid: 1'b1, sign: 1'(sg), x: slice_t'(xv)} : xslice_t'({2'b00, 4'($urandom)});
          a_y     = (s == 0) ? slice_t'(yv) : slice_t'($urandom);
          a_sign  = (s == 0) ? 1'(sg) : 1'b0;
          a_si    = csa3_t'($urandom);
          want   += sum3(a_si) << (4*s);
          @(negedge clk);
          if (s == 0) begin
            checks++;
            if (!a_start_out) begin failures++; $display("FAIL A: start_out"); end
          end
          got += sum3(a_so) << (4*s);
          if (s == 1) begin
            checks++;
            if (a_xo.x != slice_t'(xv) || a_xo.sign != 1'(sg) || !a_xo.valid) begin
              failures++; $display("FAIL A: x_out");
            end
          end
        end
        checks++;
        if ((got & 255) != (want & 255)) begin
          failures++;
          $display("FAIL A op %0d: %s %h x %h: got %h expected %h", op, sg ? "s" : "u", xv, yv, got & 255, want & 255);
        end
      end
      // ---- B: period 4 clocks
      for (int op = 0; op < 400; op++) begin : b_ops
        int bx, by, bw, bg;
        bit bs;
        bx = int'($urandom_range(0, 255)); by = int'($urandom_range(0, 15)); bs = 1'($urandom_range(0, 1));
        if (!bs) bw = bx * by * 16;
        else begin
          inv = (~(((bx >> 7) & 1) * by)) & 15;    // complemented x_7 * y_k, k = 0..3
          bw = (bx & 127) * by * 16 + inv * (1 << 11);
        end
        bg = 0;
        for (int s = 0; s < 4; s++) begin
          b_start = (s == 0);
          b_y     = (s == 0) ? slice_t'(by) : slice_t'($urandom);
          if (s == 1)      b_x = '{valid: 1'b1, sign: 1'b0, x: slice_t'(bx)};
          else if (s == 2) b_x = '{valid: 1'b1, sign: 1'(bs), x: slice_t'(bx >> 4)};
          else             b_x = '{valid: 1'b0, sign: 1'b0, x: slice_t'($urandom)};
          b_si    = csa3_t'($urandom);
          bw     += sum3(b_si) << (4*s);
          @(negedge clk);
          bg += sum3(b_so) << (4*s);
          if (s == 0) begin
            checks++;
            if (!b_start_out) begin failures++; $display("FAIL B: start_out"); end
          end
          if (s == 3) begin
            checks++;
            if (b_xo.x != slice_t'(bx >> 4) || b_xo.sign != bs || !b_xo.valid) begin
              failures++; $display("FAIL B: x_out");
            end
          end
        end
        checks++;
        if ((bg & 32'hFFFF) != (bw & 32'hFFFF)) begin
          failures++;
          $display("FAIL B op %0d: %s %h x %h: got %h expected %h", op, bs ? "s" : "u", bx, by, bg & 32'hFFFF, bw & 32'hFFFF);
        end
      end
    join
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

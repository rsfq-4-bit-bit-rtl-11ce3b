// Test of the partial-product generator in all four variants (plain, least
// significant cell, most significant cell, and both, which is the n = 1
// case), with random slices, tags and multiplier slices.
//
// The reference places the two X slices side by side as an 8-bit window
// {X_j, X_{j-1}}; row r, bit k reads window bit 4+k-r. A bit is the AND of
// that window bit (zero if its slice is not valid) with y[r], complemented
// when exactly one of its factors is a sign bit (window bit 7 of a
// sign-tagged X_j or bit 3 of a sign-tagged X_{j-1}; y[3] in the most
// significant cell of a signed operation) and the X bit exists. Correction
// ones: row 0 bit 0 (least significant cell) and row 3 bit 3 (most
// significant cell) when X_{j-1} is sign-tagged.
module tb_ppg;
  import bsm_pkg::*;
  xslice_t xj, xj1;
  slice_t  y;
  logic    ysign;
  slice_t  pp [4][SLICE_W];
  int checks = 0, failures = 0;

  ppg #(.MSB_CELL(1'b0), .LSB_CELL(1'b0)) d0 (.xj, .xj1, .y, .ysign, .pp(pp[0]));
  ppg #(.MSB_CELL(1'b0), .LSB_CELL(1'b1)) d1 (.xj, .xj1, .y, .ysign, .pp(pp[1]));
  ppg #(.MSB_CELL(1'b1), .LSB_CELL(1'b0)) d2 (.xj, .xj1, .y, .ysign, .pp(pp[2]));
  ppg #(.MSB_CELL(1'b1), .LSB_CELL(1'b1)) d3 (.xj, .xj1, .y, .ysign, .pp(pp[3]));

  function automatic logic ref_bit(bit [1:0] v, int r, int k);
    logic [7:0] win;
    logic [1:0] val, sgn;
    int  p;
    logic xbit, ex, xsg, ysg, b;
    bit msb, lsb;
    msb = v[1]; lsb = v[0];
    win = {xj.x, xj1.x};
    val = {xj.valid, xj1.valid};
    sgn = {xj.sign, xj1.sign};
    p = 4 + k - r;
    ex   = val[p / 4];
    xbit = win[p] & ex;
    xsg  = (p == 7 && sgn[1]) || (p == 3 && sgn[0]);
    ysg  = msb && r == 3 && ysign;
    b = (xbit & y[r]) ^ (ex & (xsg ^ ysg));
    if (lsb && r == 0 && k == 0 && sgn[0]) b = 1'b1;
    if (msb && r == 3 && k == 3 && sgn[0]) b = 1'b1;
    return b;
  endfunction

  int inverted = 0, constants = 0;

  initial begin
    for (int t = 0; t < 4000; t++) begin
      xj  = xslice_t'($urandom);
      xj1 = xslice_t'($urandom);
      y   = slice_t'($urandom);
      ysign = 1'($urandom);
      // sign tags only ever sit on a valid slice, and on one of the two
      if (xj.sign)  xj.valid = 1'b1;
      if (xj1.sign) begin xj1.valid = 1'b1; xj.sign = 1'b0; xj.valid = 1'b0; end
      #1;
      for (int v = 0; v < 4; v++)
        for (int r = 0; r < 4; r++)
          for (int k = 0; k < 4; k++) begin
            checks++;
            if (pp[v][r][k] != ref_bit(2'(v), r, k)) begin
              failures++;
              if (failures < 10)
                $display("FAIL variant %0d row %0d bit %0d: got %b", v, r, k, pp[v][r][k]);
            end
          end
      if (xj.sign || xj1.sign || ysign) inverted++;
      if (xj1.sign) constants++;
    end
    checks++;
    if (inverted == 0 || constants == 0) failures++;
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

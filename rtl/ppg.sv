// Partial-product generator (PPG) of one main cell.
//
// At each clock the cell works on one 4-bit column slice s of the product.
// The PPG of cell i forms the 16 partial-product bits of that slice that use
// the multiplier slice Y_i held in the cell: row r (0..3) is multiplier bit
// y_{4i+r} times the multiplicand bits x_{4j+k-r}, k = 0..3, where X_j is the
// slice now entering the cell and X_{j-1} the one before it (bits with
// k - r < 0 come from X_{j-1}). Output bit pp[r][k] has the weight of product
// column 4s + k. This is a row of 16 AND gates, as in the original design.
//
// Signed operation (two's complement, Baugh-Wooley form):
//   Z = -2^{8n-1} + x_{4n-1}y_{4n-1}2^{8n-2}
//       + sum_k ~(x_{4n-1}y_k)2^{4n+k-1} + sum_l ~(y_{4n-1}x_l)2^{4n+l-1}
//       + sum_{l,k<4n-1} x_l y_k 2^{l+k} + 2^{4n}.
// A bit is complemented when exactly one of its two factors is a sign bit and
// it exists. x_{4n-1} is bit 3 of the slice tagged `sign`; y_{4n-1} is bit 3
// of Y in the most significant cell (MSB_CELL) when `ysign` is set. Existence
// of an X bit is the slice's `valid` tag; bits of a slice that is not valid
// are treated as zero, so the X input need not be held at zero between
// operations. The two constants are inserted in
// slots that are known to be empty when X_{j-1} is the sign-tagged slice
// (j = n, the cell's last slice, where X_j does not exist): 2^{4n} as row 0,
// bit 0 in the least significant cell (LSB_CELL, which is then at slice n),
// and 2^{8n-1} (= -2^{8n-1} modulo 2^{8n}) as row 3, bit 3 in the most
// significant cell (then at slice 2n-1). Where the constants go and how
// existence is tracked is this design's choice; of the original design it
// is known only that the most significant cell's PPG differs from the others
// and that Sign drives the complementing and the correction terms.
//
// Purely combinational.
module ppg
  import bsm_pkg::*;
#(
  parameter bit MSB_CELL = 1'b0,  // cell n-1: holds the multiplier sign bit
  parameter bit LSB_CELL = 1'b0   // cell 0: adds the 2^{4n} correction
) (
  input  xslice_t xj,             // X_j, the slice entering the cell
  input  xslice_t xj1,            // X_{j-1}, the previous slice
  input  slice_t  y,              // Y_i
  input  logic    ysign,          // signed operation (used in MSB_CELL only)
  output slice_t  pp [SLICE_W]    // pp[r] = row r, aligned to the slice
);
  always_comb begin
    for (int r = 0; r < SLICE_W; r++) begin
      for (int k = 0; k < SLICE_W; k++) begin
        logic xb, ex, xs, ys;
        if (k >= r) begin
          xb = xj.x[k-r];
          ex = xj.valid;
          xs = xj.sign && (k - r == SLICE_W - 1);
        end else begin
          xb = xj1.x[SLICE_W+k-r];
          ex = xj1.valid;
          xs = xj1.sign && (SLICE_W + k - r == SLICE_W - 1);
        end
        ys = MSB_CELL && (r == SLICE_W - 1) && ysign;
        pp[r][k] = (xb & ex & y[r]) ^ (ex & (xs ^ ys));
      end
    end
    if (LSB_CELL) pp[0][0] = pp[0][0] | xj1.sign;
    if (MSB_CELL) pp[SLICE_W-1][SLICE_W-1] = pp[SLICE_W-1][SLICE_W-1] | xj1.sign;
  end
endmodule

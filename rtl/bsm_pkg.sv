// Shared types and constants of the 4-bit bit-slice multiplier.
//
// Every datapath word in the design is one 4-bit slice. Operand slices of
// the multiplicand X travel through the chain of main cells together with a
// two-bit tag: `valid` marks the n real slices X_0..X_{n-1} of an operation
// and `sign` marks the most significant one, X_{n-1}, of a signed operation.
// The slice width of four follows the original design; the tag is this design's own
// way of telling the partial-product generator which X bits exist.
package bsm_pkg;

  localparam int unsigned SLICE_W = 4;

  typedef logic [SLICE_W-1:0] slice_t;

  // One multiplicand slice on its way through the cell chain.
  typedef struct packed {
    logic   valid;  // slice belongs to the current operation
    logic   sign;   // slice is X_{n-1} of a signed operation
    slice_t x;      // the slice bits, x[0] least significant
  } xslice_t;

  // The three carry-save slices passed from one main cell to the next.
  typedef struct packed {
    slice_t s2;
    slice_t s1;
    slice_t s0;
  } csa3_t;

endpackage

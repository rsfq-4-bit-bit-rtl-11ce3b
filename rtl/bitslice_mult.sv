// 4n x 4n-bit bit-slice integer multiplier, signed or unsigned.
//
// Both operands enter as n 4-bit slices, least significant first, one pair
// per clock, and the 8n-bit product leaves as 2n 4-bit slices, least
// significant first, one per clock. The work is spread over a chain of n
// main systolic cells (cell i keeps multiplier slice Y_i and adds its partial
// products into a carry-save sum that moves one cell per clock) and a final
// addition cell that resolves the carry-save sum. Hardware grows linearly
// with n: each cell holds 16 AND gates and 16 full adders.
//
// Interface and timing, for an operation started in cycle t0:
//   start      high in cycle t0 only
//   x, y       slices X_j, Y_j in cycle t0 + j, j = 0 .. n-1
//   sign       in cycle t0 + n-1 (with the last slices): 1 = two's complement
//   z, z_valid product slice Z_s in cycle t0 + n + 1 + s, s = 0 .. 2n-1
// One operation lasts 3n + 1 clocks (cycles t0 .. t0 + 3n) and a new one may
// start every 2n clocks. These are the counts of the algorithm's "logical
// cycles". The original RSFQ circuit pipelines each logical cycle further
// (2n + 17 gate stages, first product slice 2n + 17 clocks after the first
// operand slice); this design keeps one clock per logical cycle.
//
// Following the original design: cell structure, the slice schedule, Start moving
// one cell per clock, X and Sign moving one cell per two clocks, Sign also
// sent straight to the most significant cell. This design's own additions:
// a counter that tags the n operand slices as valid and marks the last one
// for Sign, so inputs outside those cycles are ignored; the z_valid output;
// synchronous reset; an assertion on the start spacing.
module bitslice_mult
  import bsm_pkg::*;
#(
  parameter int unsigned N_SLICES = 2   // n: operand width is 4n bits
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  input  slice_t x,
  input  slice_t y,
  input  logic   sign,
  output slice_t z,
  output logic   z_valid
);
  localparam int unsigned N = N_SLICES;
  localparam int unsigned CW = $clog2(2*N + 2);

  // ---- operand-slice tagging --------------------------------------------
  logic [CW-1:0] in_cnt;     // slice index of the operand now on x/y
  logic          in_busy;    // slices 1 .. n-1 still to come
  logic          in_valid, in_last;

  always_comb begin
    in_valid = start || in_busy;
    in_last  = in_valid && ((start ? '0 : in_cnt) == CW'(N - 1));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      in_cnt  <= '0;
      in_busy <= 1'b0;
    end else if (start) begin
      in_cnt  <= CW'(1);
      in_busy <= (N > 1);
    end else if (in_busy) begin
      in_cnt  <= in_cnt + 1'b1;
      in_busy <= (in_cnt != CW'(N - 1));
    end
  end

  // ---- cell chain ---------------------------------------------------------
  logic    st   [N+1];
  xslice_t xs   [N+1];
  csa3_t   sv   [N+1];
  logic    sign_last;

  assign sign_last = sign && in_last;
  assign st[0]     = start;
  assign xs[0]     = '{valid: in_valid, sign: sign_last, x: x};
  assign sv[0]     = '0;

  for (genvar i = 0; i < N; i++) begin : g_cell
    main_cell #(
      .MSB_CELL(i == N - 1),
      .LSB_CELL(i == 0)
    ) u_cell (
      .clk, .rst,
      .start_in(st[i]), .start_out(st[i+1]),
      .y_in(y), .sign_direct(sign_last),
      .x_in(xs[i]), .x_out(xs[i+1]),
      .s_in(sv[i]), .s_out(sv[i+1])
    );
  end

  final_add_cell u_final (
    .clk, .rst, .start_in(st[N]), .s_in(sv[N]), .z_out(z)
  );

  // ---- product-slice valid flag -------------------------------------------
  logic [CW-1:0] out_cnt;
  logic          out_first;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_first <= 1'b0;
      out_cnt   <= '0;
    end else begin
      out_first <= st[N];
      if (out_first)            out_cnt <= CW'(2*N - 1);
      else if (out_cnt != '0)   out_cnt <= out_cnt - 1'b1;
    end
  end

  assign z_valid = out_first || (out_cnt != '0);

  // ---- interface rule -----------------------------------------------------
  // A new operation may start only when the previous one has left cell 0's
  // window: at least 2n clocks after the previous start.
  logic [CW-1:0] since_start;
  always_ff @(posedge clk) begin
    if (rst)                          since_start <= CW'(2*N);
    else if (start)                   since_start <= CW'(1);
    else if (since_start != CW'(2*N)) since_start <= since_start + 1'b1;
  end

  a_start_spacing: assert property (@(posedge clk) disable iff (rst)
    start |-> since_start == CW'(2*N))
    else $error("start less than 2n clocks after the previous start");
endmodule

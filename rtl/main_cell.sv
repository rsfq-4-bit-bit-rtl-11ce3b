// Main systolic cell of the bit-slice multiplier (cell i of n).
//
// The cell holds the multiplier slice Y_i and, one product slice per clock,
// adds its 16 partial-product bits into the running carry-save sum that flows
// from cell i-1 to cell i+1 as three 4-bit slices. With `start_in` in cycle
// t0 + i (operation started at t0), the cell works on product slice s in
// cycle t0 + i + s, s = 0 .. 2n-1.
//
// Inside (as in the original design): the PPG, the 4-4 accumulator, the Y register
// (loaded by Start and kept), two multiplicand registers and the flip-flops
// that pass Start, X and Sign on. Start goes to the next cell after one
// clock, X (with its valid and sign tag) after two, so slice X_j meets cell i
// in cycle t0 + 2i + j, when the cell works on product slice i + j. The PPG
// takes X_j from the cell's X input (the value being loaded into the first X
// register) and X_{j-1} from the first X register; the second X register
// drives x_out. The carry-save outputs are registered, one clock per cell.
// The most significant cell (MSB_CELL) also latches the operation's Sign,
// sent to it directly, with Start.
//
// This design's choices: Y and Sign are used in the very clock Start loads
// them (a bypass, which cell 0 needs because its first partial products are
// due in that clock); the held carries of the accumulator are cleared by
// Start; registers reset synchronously with `rst`.
module main_cell
  import bsm_pkg::*;
#(
  parameter bit MSB_CELL = 1'b0,
  parameter bit LSB_CELL = 1'b0
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    start_in,
  output logic    start_out,
  input  slice_t  y_in,        // multiplier slice bus, shared by all cells
  input  logic    sign_direct, // Sign, sent straight to the most significant cell
  input  xslice_t x_in,        // multiplicand slice with its valid/sign tag
  output xslice_t x_out,
  input  csa3_t   s_in,
  output csa3_t   s_out
);
  slice_t  reg_y;
  logic    reg_sign;
  xslice_t reg_x2, reg_x1;
  slice_t  y_eff;
  logic    sign_eff;
  slice_t  pp [SLICE_W];
  csa3_t   acc_out;

  always_comb begin
    y_eff    = start_in ? y_in : reg_y;
    sign_eff = start_in ? sign_direct : reg_sign;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      reg_y     <= '0;
      reg_sign  <= 1'b0;
      reg_x2    <= '0;
      reg_x1    <= '0;
      start_out <= 1'b0;
      s_out     <= '0;
    end else begin
      reg_y     <= y_eff;
      reg_sign  <= MSB_CELL ? sign_eff : 1'b0;
      reg_x2    <= x_in;
      reg_x1    <= reg_x2;
      start_out <= start_in;
      s_out     <= acc_out;
    end
  end

  assign x_out = reg_x1;

  ppg #(.MSB_CELL(MSB_CELL), .LSB_CELL(LSB_CELL)) u_ppg (
    .xj(x_in), .xj1(reg_x2), .y(y_eff), .ysign(sign_eff), .pp(pp)
  );

  acc44 u_acc (
    .clk, .rst, .clr(start_in), .pp(pp), .s_in(s_in), .s_out(acc_out)
  );
endmodule

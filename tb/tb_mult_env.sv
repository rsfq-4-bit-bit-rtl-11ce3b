// Self-checking environment for the bit-slice multiplier, used by the
// end-to-end testbenches at one operand size each.
//
// It runs NOPS operations: a few directed ones (0xA5 x 0x5A, the extreme
// signed and unsigned values, zero) followed by random signed and unsigned
// ones, started either back to back (exactly 2n clocks apart) or with a
// random gap. Outside each operation's input cycles x, y and sign carry
// random values, which the multiplier must ignore. Each product is assembled
// from the 2n output slices and compared with X*Y computed here in 64-bit
// arithmetic; the first slice must appear n+1 clocks after start and the 2n
// slices on consecutive clocks. The environment also counts how often each
// mechanism occurred (signed and unsigned operations, back-to-back and gapped
// starts, a carry passed between result slices, a leftover carry dropped at
// the start of the next operation) and counts a failure for one that never
// did. USE_DEFAULT instantiates the multiplier with no parameter override.
module tb_mult_env #(
  parameter int unsigned N           = 2,
  parameter bit          USE_DEFAULT = 1'b0,
  parameter int unsigned NOPS        = 200,
  parameter int unsigned SEED        = 1
) (
  output int  checks,
  output int  failures,
  output bit  done
);
  import bsm_pkg::*;

  localparam int unsigned W = 4 * N;
  localparam int unsigned MAXCYC = NOPS * (2 * N + 4) + 8 * N + 40;

  logic   clk;
  logic   rst;
  logic   start, sign;
  slice_t x, y, z;
  logic   z_valid;

  if (USE_DEFAULT) begin : g_dut
    bitslice_mult dut (.clk, .rst, .start, .x, .y, .sign, .z, .z_valid);
  end else begin : g_dut
    bitslice_mult #(.N_SLICES(N)) dut (.clk, .rst, .start, .x, .y, .sign, .z, .z_valid);
  end

  initial clk = 1'b0;
  always #5 clk = ~clk;

  longint unsigned opx  [NOPS];
  longint unsigned opy  [NOPS];
  bit              ops  [NOPS];
  int              t0   [NOPS];

  function automatic longint unsigned mask(int unsigned bits);
    return (bits >= 64) ? '1 : ((64'd1 << bits) - 1);
  endfunction

  function automatic longint unsigned ref_product(longint unsigned a, longint unsigned b, bit sg);
    longint sa, sb;
    if (!sg) return (a * b) & mask(2 * W);
    sa = longint'(a << (64 - W)) >>> (64 - W);
    sb = longint'(b << (64 - W)) >>> (64 - W);
    return longint'(sa * sb) & mask(2 * W);
  endfunction

  int n_signed, n_unsigned, n_b2b, n_gap, n_carry_fwd, n_carry_drop;

  initial begin : run
    int c, nxt, k, opi, slice_i;
    longint unsigned acc;
    longint unsigned a, b;
    checks = 0; failures = 0; done = 1'b0;
    n_signed = 0; n_unsigned = 0; n_b2b = 0; n_gap = 0;
    n_carry_fwd = 0; n_carry_drop = 0;
    void'($urandom(SEED));

    // operation list
    nxt = 3;
    for (int i = 0; i < NOPS; i++) begin
      case (i)
        0: begin a = 64'hA5; b = 64'h5A; ops[i] = 1'b0; end
        1: begin a = mask(W); b = mask(W); ops[i] = 1'b0; end
        2: begin a = mask(W); b = mask(W); ops[i] = 1'b1; end
        3: begin a = 64'd1 << (W-1); b = 64'd1 << (W-1); ops[i] = 1'b1; end
        4: begin a = 64'd1 << (W-1); b = mask(W); ops[i] = 1'b1; end
        5: begin a = 0; b = mask(W); ops[i] = 1'b1; end
        6: begin a = mask(W) >> 1; b = 64'd1 << (W-1); ops[i] = 1'b1; end
        default: begin
          a = {$urandom, $urandom};
          b = {$urandom, $urandom};
          ops[i] = 1'($urandom_range(0, 1));
        end
      endcase
      opx[i] = a & mask(W);
      opy[i] = b & mask(W);
      t0[i]  = nxt;
      if (i > 0) begin
        if (t0[i] - t0[i-1] == 2 * N) n_b2b++; else n_gap++;
      end
      if (ops[i]) n_signed++; else n_unsigned++;
      nxt = nxt + 2 * N + (($urandom_range(0, 2) == 0) ? $urandom_range(1, 3) : 0);
    end

    rst = 1'b1; start = 1'b0; sign = 1'b0; x = '0; y = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;

    opi = 0; slice_i = 0; acc = 0;
    for (c = 0; c < MAXCYC && opi < NOPS; c++) begin
      @(negedge clk);
      // ---- outputs belonging to cycle c
      if (z_valid) begin
        if (slice_i == 0) begin
          checks++;
          if (c != t0[opi] + N + 1) begin
            failures++;
            $display("FAIL op %0d: first slice in cycle %0d, expected %0d", opi, c, t0[opi] + N + 1);
          end
        end
        acc = acc | (longint'(z) << (4 * slice_i));
        slice_i++;
        if (slice_i == 2 * N) begin
          checks++;
          if (acc != ref_product(opx[opi], opy[opi], ops[opi])) begin
            failures++;
            $display("FAIL op %0d: %s %h x %h = %h, expected %h", opi, ops[opi] ? "signed" : "unsigned",
                     opx[opi], opy[opi], acc, ref_product(opx[opi], opy[opi], ops[opi]));
          end
          opi++; slice_i = 0; acc = 0;
        end
      end else if (slice_i != 0) begin
        checks++; failures++;
        $display("FAIL op %0d: gap in output slices at cycle %0d", opi, c);
        opi++; slice_i = 0; acc = 0;
      end
      // ---- mechanism probes
      if (g_dut.dut.u_final.u_add.carry_q && !g_dut.dut.u_final.start_in) n_carry_fwd++;
      if (g_dut.dut.u_final.u_add.carry_q &&  g_dut.dut.u_final.start_in) n_carry_drop++;
      // ---- inputs for cycle c
      start = 1'b0; x = slice_t'($urandom); y = slice_t'($urandom); sign = 1'($urandom);
      for (k = 0; k < NOPS; k++) begin
        if (c >= t0[k] && c < t0[k] + N) begin
          start = (c == t0[k]);
          x     = slice_t'(opx[k] >> (4 * (c - t0[k])));
          y     = slice_t'(opy[k] >> (4 * (c - t0[k])));
          sign  = (c == t0[k] + N - 1) ? ops[k] : 1'($urandom);
        end
      end
    end

    if (opi != NOPS) begin
      failures++;
      $display("FAIL: only %0d of %0d products seen", opi, NOPS);
    end
    $display("n=%0d mechanisms: signed=%0d unsigned=%0d back_to_back=%0d gapped=%0d carry_between_slices=%0d carry_dropped_at_start=%0d",
             N, n_signed, n_unsigned, n_b2b, n_gap, n_carry_fwd, n_carry_drop);
    checks += 6;
    if (n_signed == 0)     begin failures++; $display("FAIL: no signed operation"); end
    if (n_unsigned == 0)   begin failures++; $display("FAIL: no unsigned operation"); end
    if (n_b2b == 0)        begin failures++; $display("FAIL: no back-to-back start"); end
    if (n_gap == 0)        begin failures++; $display("FAIL: no gapped start"); end
    if (n_carry_fwd == 0)  begin failures++; $display("FAIL: no carry between slices"); end
    if (n_carry_drop == 0) begin failures++; $display("FAIL: no carry dropped at start"); end
    done = 1'b1;
  end
endmodule

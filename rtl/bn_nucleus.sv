// bn_nucleus: one copy of the butterfly nucleus B_n inside the USN.
//
// B_n has 2^n rows and columns 0..n. Column 0 is the nucleus' input (the
// network inputs for block 0, the swap-link nodes for later blocks); it holds
// data and computes nothing. A node in row p of column c (1..n) is linked to
// rows p and p^(1<<(c-1)) of column c-1 and computes u + w*v (bfly_node),
// with u taken from the row whose bit c-1 is clear. So column c carries out
// one radix-2 stage on row bit c-1, and the nucleus as a whole takes n
// clocks, one per column.
//
// Which stage of the emulated 2^M-point FFT a column performs, and so which
// twiddle each node needs, depends on where the copy sits: BLK is its block
// (position along the column axis, 0-based) and PREFIX the upper M-n bits of
// its rows. The twiddles are constants worked out at elaboration by usn_pkg.
// With LEVELS = 1 and DEPTH = 1 the nucleus is a complete 2^n-point FFT with
// its inputs in bit-reversed row order. With MIX_A > 0 the copy belongs
// instead to the two-stage network of unequal modules (usn_mixed_fft), whose
// first modules have MIX_A row bits and second modules MIX_B row bits.
//
// Ports: x_* is column 0 (row p at index p), y_* is column n, valid n clocks
// after x. The butterfly structure follows the butterfly network definition;
// the node arithmetic is described in bfly_node.
module bn_nucleus #(
  parameter int unsigned N_BF    = 2,
  parameter int unsigned LEVELS  = 2,
  parameter int unsigned DEPTH   = 1,
  parameter int unsigned LEVELS_VEC = 0,
  parameter int unsigned BLK     = 0,
  parameter int unsigned PREFIX  = 0,
  parameter int unsigned DATA_W  = 16,
  parameter int unsigned TW_W    = 16,
  // Twiddle fraction bits: 1.0 is 2**14, so 16 bits hold [-1, 1].
  parameter int unsigned TW_FRAC = 14,
  parameter int unsigned MIX_A   = 0,
  parameter int unsigned MIX_B   = 0
) (
  input  logic                     clk,
  input  logic signed [DATA_W-1:0] x_re [2**N_BF],
  input  logic signed [DATA_W-1:0] x_im [2**N_BF],
  output logic signed [DATA_W-1:0] y_re [2**N_BF],
  output logic signed [DATA_W-1:0] y_im [2**N_BF]
);

  localparam int unsigned R = 2 ** N_BF;
  localparam int unsigned LV = usn_pkg::levels_vec(LEVELS, DEPTH, LEVELS_VEC);
  localparam int unsigned M  = usn_pkg::net_bits(N_BF, LEVELS, DEPTH, LEVELS_VEC, MIX_A, MIX_B);

  // col_*[c][p]: value held by the node in row p, column c.
  logic signed [DATA_W-1:0] col_re [N_BF+1][R];
  logic signed [DATA_W-1:0] col_im [N_BF+1][R];

  assign col_re[0] = x_re;
  assign col_im[0] = x_im;

  for (genvar c = 1; c <= N_BF; c++) begin : g_col
    for (genvar p = 0; p < R; p++) begin : g_row
      localparam int unsigned PU  = p & ~(1 << (c - 1));
      localparam int unsigned PV  = p | (1 << (c - 1));
      localparam int unsigned EXP = (MIX_A > 0)
          ? usn_pkg::mix_tw_exp(PREFIX * R + p, c, MIX_A, MIX_B, BLK)
          : usn_pkg::tw_exp(PREFIX * R + p, c, N_BF, LV, M, BLK);
      bfly_node #(
        .DATA_W (DATA_W),
        .TW_W   (TW_W),
        .TW_FRAC(TW_FRAC),
        .TW_RE  (usn_pkg::tw_re(EXP, M, TW_FRAC)),
        .TW_IM  (usn_pkg::tw_im(EXP, M, TW_FRAC))
      ) u_node (
        .clk (clk),
        .u_re(col_re[c-1][PU]),
        .u_im(col_im[c-1][PU]),
        .v_re(col_re[c-1][PV]),
        .v_im(col_im[c-1][PV]),
        .y_re(col_re[c][p]),
        .y_im(col_im[c][p])
      );
    end
  end

  assign y_re = col_re[N_BF];
  assign y_im = col_im[N_BF];

endmodule

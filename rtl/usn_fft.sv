// usn_fft: a pipelined 2^M-point FFT network built as an unfolded swapped
// network URHSN(l_r, ..., l_1, B_n) (r = DEPTH levels of unfolding) with the
// n-dimensional butterfly B_n (n = N_BF) as nucleus. Every l_d is LEVELS
// unless LEVELS_VEC gives depth d its own factor in bits [4d-1:4d-4]
// (e.g. LEVELS_VEC = 'h32 with DEPTH = 2 is URHSN(3, 2, B_n)).
//
// Structure. Rows carry M = N_BF * l_1 * ... * l_r bits. Along the column
// axis the network is a chain of l_1 * ... * l_r blocks; each block is a
// column of 2^(M-N_BF) nucleus copies (bn_nucleus), each working on the low
// N_BF row bits of its own 2^N_BF rows. Consecutive blocks are joined by swap links
// (swap_stage) that exchange the lowest row digit with a higher one, so every
// row bit in turn becomes the low digit a nucleus works on. With DEPTH = 1
// this is UHSN(LEVELS, B_n); with LEVELS = 2 it is the recursive URSN(DEPTH,
// B_n). The defaults build URSN(1, B_2) = UHSN(2, B_2): 16 rows, 6 columns.
//
// FFT mapping. Each nucleus column is one radix-2 stage of an M-stage
// decimation-in-time FFT; the swaps keep the stages in order, and the
// twiddle of every node is derived from the butterfly row it emulates
// (usn_pkg). The input nodes take the samples in bit-reversed order and the
// results leave the last column in the network's own (scrambled) order; both
// permutations are plain wiring here, so x_* and z_* are in natural order:
// z_k = sum_i x_i * exp(-j 2 pi i k / 2^M) for the network's arithmetic.
//
// Timing. One column per clock: the result of the samples presented with
// in_valid appears LATENCY = l_1*...*l_r * (N_BF+1) - 1 clocks later (the
// number of columns minus one) with out_valid. A new FFT can start every
// clock; there is no stall. Only the valid pipeline is reset (rst_n, active
// low, synchronous). Number format and headroom: see bfly_node.
//
// The topology, the FFT mapping and the one-column-per-clock timing follow
// the USN architecture; the valid pipeline, the port-side reordering to
// natural order and the number format are this design's own choices.
module usn_fft #(
  parameter int unsigned N_BF       = 2,
  parameter int unsigned LEVELS     = 2,
  parameter int unsigned DEPTH      = 1,
  parameter int unsigned LEVELS_VEC = 0,
  parameter int unsigned DATA_W     = 16,
  parameter int unsigned TW_W       = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x_re [2**usn_pkg::net_bits(N_BF, LEVELS, DEPTH, LEVELS_VEC, 0, 0)],
  input  logic signed [DATA_W-1:0] x_im [2**usn_pkg::net_bits(N_BF, LEVELS, DEPTH, LEVELS_VEC, 0, 0)],
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] z_re [2**usn_pkg::net_bits(N_BF, LEVELS, DEPTH, LEVELS_VEC, 0, 0)],
  output logic signed [DATA_W-1:0] z_im [2**usn_pkg::net_bits(N_BF, LEVELS, DEPTH, LEVELS_VEC, 0, 0)]
);

  localparam int unsigned LV      = usn_pkg::levels_vec(LEVELS, DEPTH, LEVELS_VEC);
  localparam int unsigned M       = usn_pkg::row_bits(N_BF, LV, DEPTH);
  localparam int unsigned ROWS    = 2 ** M;
  localparam int unsigned NR      = 2 ** N_BF;             // rows of a nucleus
  localparam int unsigned NCOPY   = ROWS / NR;             // nuclei per block
  localparam int unsigned NBLK    = usn_pkg::num_blocks(LV, DEPTH);
  localparam int unsigned LATENCY = NBLK * (N_BF + 1) - 1;

  // blk_in_*[k]: column 0 of block k; blk_out_*[k]: its last column.
  logic signed [DATA_W-1:0] blk_in_re  [NBLK][ROWS];
  logic signed [DATA_W-1:0] blk_in_im  [NBLK][ROWS];
  logic signed [DATA_W-1:0] blk_out_re [NBLK][ROWS];
  logic signed [DATA_W-1:0] blk_out_im [NBLK][ROWS];

  // Input nodes: row p holds sample bitrev(p).
  for (genvar p = 0; p < ROWS; p++) begin : g_in
    localparam int unsigned SRC = usn_pkg::bitrev(p, M);
    assign blk_in_re[0][p] = x_re[SRC];
    assign blk_in_im[0][p] = x_im[SRC];
  end

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    for (genvar g = 0; g < NCOPY; g++) begin : g_nuc
      logic signed [DATA_W-1:0] nx_re [NR];
      logic signed [DATA_W-1:0] nx_im [NR];
      logic signed [DATA_W-1:0] ny_re [NR];
      logic signed [DATA_W-1:0] ny_im [NR];
      for (genvar p = 0; p < NR; p++) begin : g_map
        assign nx_re[p] = blk_in_re[k][g*NR + p];
        assign nx_im[p] = blk_in_im[k][g*NR + p];
        assign blk_out_re[k][g*NR + p] = ny_re[p];
        assign blk_out_im[k][g*NR + p] = ny_im[p];
      end
      bn_nucleus #(
        .N_BF  (N_BF),
        .LEVELS(LEVELS),
        .DEPTH (DEPTH),
        .LEVELS_VEC(LEVELS_VEC),
        .BLK   (k),
        .PREFIX(g),
        .DATA_W(DATA_W),
        .TW_W  (TW_W)
      ) u_nuc (
        .clk (clk),
        .x_re(nx_re),
        .x_im(nx_im),
        .y_re(ny_re),
        .y_im(ny_im)
      );
    end
    if (k + 1 < NBLK) begin : g_swap
      swap_stage #(
        .N_BF    (N_BF),
        .LEVELS  (LEVELS),
        .DEPTH   (DEPTH),
        .LEVELS_VEC(LEVELS_VEC),
        .BOUNDARY(k),
        .DATA_W  (DATA_W)
      ) u_swap (
        .clk (clk),
        .x_re(blk_out_re[k]),
        .x_im(blk_out_im[k]),
        .y_re(blk_in_re[k+1]),
        .y_im(blk_in_im[k+1])
      );
    end
  end

  // Output nodes: physical row p of the last block carries z_{out_index(p)}.
  for (genvar p = 0; p < ROWS; p++) begin : g_out
    localparam int unsigned DST = usn_pkg::out_index(p, N_BF, LV, DEPTH);
    assign z_re[DST] = blk_out_re[NBLK-1][p];
    assign z_im[DST] = blk_out_im[NBLK-1][p];
  end

  // Valid pipeline, one stage per column transfer.
  logic [LATENCY-1:0] vld;
  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= LATENCY'({vld, in_valid});
  end
  assign out_valid = vld[LATENCY-1];

endmodule

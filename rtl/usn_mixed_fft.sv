// usn_mixed_fft: a 2^(A+B)-point FFT network put together from smaller FFT
// modules of two different sizes, the general (non-uniform) member of the
// unfolded swapped network family. Defaults: 32 points from four 8-input
// modules followed by eight 4-input modules.
//
// Structure. Rows carry A+B bits. Block 0 is 2^B butterfly modules B_A, each
// on the low A bits of its own 2^A rows; block 1 is 2^A modules B_B. Between
// them every first-stage module sends one output to every second-stage
// module: output j of module i goes to input i of module j (swap_stage in
// its unequal-module form), which brings the high B row bits down to where
// the B_B modules work. Every module is a bn_nucleus; its node twiddles are
// those of the radix-2 stage it emulates, so the first modules do FFT stages
// 1..A and the second ones stages A+1..A+B.
//
// As in usn_fft the samples enter the input nodes in bit-reversed order and
// the results leave in a scrambled order; both are wired at the ports, so
// x_* and z_* are in natural order. Timing: one column per clock, results
// LATENCY = (A+1)+(B+1)-1 clocks after in_valid (6 for the defaults), a new
// frame every clock. Only the valid pipeline is reset (synchronous, low).
// The exact wiring of the link column and the use of butterfly networks as
// the modules are this design's reading of the construction; number format
// as in bfly_node.
module usn_mixed_fft #(
  parameter int unsigned A      = 3,
  parameter int unsigned B      = 2,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned TW_W   = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x_re [2**(A+B)],
  input  logic signed [DATA_W-1:0] x_im [2**(A+B)],
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] z_re [2**(A+B)],
  output logic signed [DATA_W-1:0] z_im [2**(A+B)]
);

  localparam int unsigned M       = A + B;
  localparam int unsigned ROWS    = 2 ** M;
  localparam int unsigned LATENCY = A + B + 1;

  logic signed [DATA_W-1:0] in0_re  [ROWS];
  logic signed [DATA_W-1:0] in0_im  [ROWS];
  logic signed [DATA_W-1:0] out0_re [ROWS];
  logic signed [DATA_W-1:0] out0_im [ROWS];
  logic signed [DATA_W-1:0] in1_re  [ROWS];
  logic signed [DATA_W-1:0] in1_im  [ROWS];
  logic signed [DATA_W-1:0] out1_re [ROWS];
  logic signed [DATA_W-1:0] out1_im [ROWS];

  for (genvar p = 0; p < ROWS; p++) begin : g_in
    localparam int unsigned SRC = usn_pkg::bitrev(p, M);
    assign in0_re[p] = x_re[SRC];
    assign in0_im[p] = x_im[SRC];
  end

  // Block 0: 2^B modules of 2^A rows.
  for (genvar g = 0; g < 2 ** B; g++) begin : g_mod0
    logic signed [DATA_W-1:0] nx_re [2**A];
    logic signed [DATA_W-1:0] nx_im [2**A];
    logic signed [DATA_W-1:0] ny_re [2**A];
    logic signed [DATA_W-1:0] ny_im [2**A];
    for (genvar p = 0; p < 2 ** A; p++) begin : g_map
      assign nx_re[p] = in0_re[g * (2**A) + p];
      assign nx_im[p] = in0_im[g * (2**A) + p];
      assign out0_re[g * (2**A) + p] = ny_re[p];
      assign out0_im[g * (2**A) + p] = ny_im[p];
    end
    bn_nucleus #(
      .N_BF(A), .LEVELS(1), .DEPTH(1), .BLK(0), .PREFIX(g),
      .DATA_W(DATA_W), .TW_W(TW_W), .MIX_A(A), .MIX_B(B)
    ) u_mod (
      .clk(clk), .x_re(nx_re), .x_im(nx_im), .y_re(ny_re), .y_im(ny_im)
    );
  end

  // Link column between the two module sizes.
  swap_stage #(
    .N_BF(A), .LEVELS(1), .DEPTH(1), .BOUNDARY(0), .DATA_W(DATA_W), .MIX_A(A), .MIX_B(B)
  ) u_link (
    .clk(clk), .x_re(out0_re), .x_im(out0_im), .y_re(in1_re), .y_im(in1_im)
  );

  // Block 1: 2^A modules of 2^B rows.
  for (genvar g = 0; g < 2 ** A; g++) begin : g_mod1
    logic signed [DATA_W-1:0] nx_re [2**B];
    logic signed [DATA_W-1:0] nx_im [2**B];
    logic signed [DATA_W-1:0] ny_re [2**B];
    logic signed [DATA_W-1:0] ny_im [2**B];
    for (genvar p = 0; p < 2 ** B; p++) begin : g_map
      assign nx_re[p] = in1_re[g * (2**B) + p];
      assign nx_im[p] = in1_im[g * (2**B) + p];
      assign out1_re[g * (2**B) + p] = ny_re[p];
      assign out1_im[g * (2**B) + p] = ny_im[p];
    end
    bn_nucleus #(
      .N_BF(B), .LEVELS(1), .DEPTH(1), .BLK(1), .PREFIX(g),
      .DATA_W(DATA_W), .TW_W(TW_W), .MIX_A(A), .MIX_B(B)
    ) u_mod (
      .clk(clk), .x_re(nx_re), .x_im(nx_im), .y_re(ny_re), .y_im(ny_im)
    );
  end

  // Block-1 row p emulates butterfly row mix_src_row(p), which is z's index.
  for (genvar p = 0; p < ROWS; p++) begin : g_out
    localparam int unsigned DST = usn_pkg::mix_src_row(p, A, B);
    assign z_re[DST] = out1_re[p];
    assign z_im[DST] = out1_im[p];
  end

  logic [LATENCY-1:0] vld;
  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= LATENCY'({vld, in_valid});
  end
  assign out_valid = vld[LATENCY-1];

endmodule

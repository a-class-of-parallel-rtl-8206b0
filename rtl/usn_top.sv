// usn_top: the two FFT networks of this design side by side, each with its
// own ports; they share only clock and reset.
//
//   usn_*  - usn_fft at its defaults: the unfolded recursive swapped network
//            URSN(1, B_2) = UHSN(2, B_2), a 16-point FFT on 16 rows and 6
//            columns, results 5 clocks after the samples.
//   mix_*  - usn_mixed_fft at its defaults: a 32-point FFT from four 8-input
//            and eight 4-input butterfly modules, results 6 clocks after the
//            samples.
//
// Both take a new frame every clock. Samples and results are complex,
// 16-bit real and imaginary parts, in natural order; *_in_valid marks a
// frame, *_out_valid its result. rst_n (synchronous, active low) clears the
// valid pipelines.
module usn_top (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               usn_in_valid,
  input  logic signed [15:0] usn_x_re [16],
  input  logic signed [15:0] usn_x_im [16],
  output logic               usn_out_valid,
  output logic signed [15:0] usn_z_re [16],
  output logic signed [15:0] usn_z_im [16],
  input  logic               mix_in_valid,
  input  logic signed [15:0] mix_x_re [32],
  input  logic signed [15:0] mix_x_im [32],
  output logic               mix_out_valid,
  output logic signed [15:0] mix_z_re [32],
  output logic signed [15:0] mix_z_im [32]
);

  usn_fft u_usn (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (usn_in_valid),
    .x_re     (usn_x_re),
    .x_im     (usn_x_im),
    .out_valid(usn_out_valid),
    .z_re     (usn_z_re),
    .z_im     (usn_z_im)
  );

  usn_mixed_fft u_mix (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (mix_in_valid),
    .x_re     (mix_x_re),
    .x_im     (mix_x_im),
    .out_valid(mix_out_valid),
    .z_re     (mix_z_re),
    .z_im     (mix_z_im)
  );

endmodule

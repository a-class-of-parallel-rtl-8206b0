// tb_usn_fft: end-to-end test of usn_fft at its default size, URSN(1, B_2):
// a 16-point FFT on 16 rows and 6 columns, latency 5 clocks. Frames are
// generated and checked by usn_fft_checker against a directly computed DFT,
// including the latency and back-to-back (fully pipelined) operation.
module tb_usn_fft;
  localparam int N = 16;
  localparam int DATA_W = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, in_valid, out_valid, done;
  logic signed [DATA_W-1:0] x_re [N];
  logic signed [DATA_W-1:0] x_im [N];
  logic signed [DATA_W-1:0] z_re [N];
  logic signed [DATA_W-1:0] z_im [N];
  int checks, failures;

  usn_fft dut (
    .clk, .rst_n, .in_valid, .x_re, .x_im, .out_valid, .z_re, .z_im
  );

  usn_fft_checker #(.N_BF(2), .LEVELS(2), .DEPTH(1), .DATA_W(DATA_W), .NFRAMES(60), .TOL(6))
    u_chk (.clk, .rst_n, .in_valid, .x_re, .x_im, .out_valid, .z_re, .z_im,
           .done, .checks, .failures);

  // Swap-link traffic: every frame crosses the one swap boundary of the
  // default network; count the frames seen leaving it.
  int swaps_seen = 0;
  int extra_fail = 0;
  logic vld_mid;
  assign vld_mid = dut.vld[2];
  always @(posedge clk) if (rst_n && vld_mid) swaps_seen++;

  initial begin
    @(posedge clk);  // the checkers clear done at time 0
    wait (done);
    if (swaps_seen == 0) begin
      $display("no frame crossed the swap links");
      extra_fail++;
    end
    $display("swap boundary crossings=%0d", swaps_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + extra_fail);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule

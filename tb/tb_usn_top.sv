// tb_usn_top: end-to-end test of the whole design at its default sizes.
// Both networks run at once with independent random traffic: the 16-point
// URSN(1, B_2) and the 32-point network of 8- and 4-input modules. Each is
// checked by usn_fft_checker against a directly computed DFT, with its
// latency (5 and 6 clocks). The test counts how often each mechanism of the
// design was exercised and fails if one never was: back-to-back frames and
// idle gaps in each pipeline (counted by the checkers), frames crossing the
// swap links of the URSN, and frames crossing the link column between the
// two module sizes.
module tb_usn_top;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, rst_n_mix;  // rst_n_mix: the second checker's reset output, not needed
  logic usn_in_valid, usn_out_valid, mix_in_valid, mix_out_valid;
  logic signed [15:0] usn_x_re [16], usn_x_im [16], usn_z_re [16], usn_z_im [16];
  logic signed [15:0] mix_x_re [32], mix_x_im [32], mix_z_re [32], mix_z_im [32];
  logic usn_done, mix_done;
  int usn_checks, usn_fail, mix_checks, mix_fail;

  usn_top dut (.*);

  usn_fft_checker #(.N_BF(2), .LEVELS(2), .DEPTH(1), .DATA_W(16), .NFRAMES(80), .TOL(6)) chk_usn (
    .clk, .rst_n(rst_n), .in_valid(usn_in_valid), .x_re(usn_x_re), .x_im(usn_x_im),
    .out_valid(usn_out_valid), .z_re(usn_z_re), .z_im(usn_z_im), .done(usn_done),
    .checks(usn_checks), .failures(usn_fail));

  usn_fft_checker #(.DATA_W(16), .NFRAMES(80), .TOL(6), .M(5), .LATENCY(6)) chk_mix (
    .clk, .rst_n(rst_n_mix), .in_valid(mix_in_valid), .x_re(mix_x_re), .x_im(mix_x_im),
    .out_valid(mix_out_valid), .z_re(mix_z_re), .z_im(mix_z_im), .done(mix_done),
    .checks(mix_checks), .failures(mix_fail));

  // Mechanism counters: frames leaving a link column (valid bit one stage
  // past the column of link-receiving nodes).
  int swap_crossings = 0, mix_crossings = 0, extra_fail = 0;
  always @(posedge clk) begin
    if (rst_n && dut.u_usn.vld[2]) swap_crossings++;
    if (rst_n && dut.u_mix.vld[3]) mix_crossings++;
  end

  initial begin
    @(posedge clk);  // the checkers clear done at time 0
    wait (usn_done && mix_done);
    $display("URSN(1,B_2): checks=%0d failures=%0d swap-link crossings=%0d",
             usn_checks, usn_fail, swap_crossings);
    $display("8x4 modules: checks=%0d failures=%0d link crossings=%0d",
             mix_checks, mix_fail, mix_crossings);
    if (swap_crossings == 0) begin $display("no swap-link crossing"); extra_fail++; end
    if (mix_crossings == 0)  begin $display("no module-link crossing"); extra_fail++; end
    $display("TB_RESULT checks=%0d failures=%0d", usn_checks + mix_checks + 2,
             usn_fail + mix_fail + extra_fail);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", usn_checks + mix_checks + 2,
             usn_fail + mix_fail + extra_fail + 1);
    $finish;
  end
endmodule

// tb_usn_fft_configs: usn_fft in the network shapes that define the USN
// family (uniform, recursive and mixed unfolding), each run end to end
// against a directly computed DFT by usn_fft_checker:
//   * UHSN(3, B_1): 8-point FFT, 8 rows, 6 columns, latency 5. For this one
//     the emulated-row labels of columns 2 and 4, the twiddle of every node
//     and the scrambled output order z0 z4 z1 z5 z2 z6 z3 z7 of the last
//     column are also checked against the reference 8-point mapping of the
//     architecture (the constants REF_* below).
//   * URSN(2, B_1) = UHSN(2, UHSN(2, B_1)): 16-point FFT, 8 columns, two
//     depths of swap links, latency 7.
//   * URSN(2, B_2): 256-point FFT, 12 columns, latency 11.
//   * UHSN(2, B_3): 64-point FFT, 8 columns, latency 7.
//   * URHSN(3, 2, B_1) and URHSN(2, 3, B_1): unequal unfolding factors per
//     depth, 64-point FFTs, 12 columns, latency 11.
module tb_usn_fft_configs;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int extra_checks = 0, extra_fail = 0;

  // ---------------------------------------------------------------- UHSN(3,B_1)
  logic a_rst_n, a_iv, a_ov, a_done;
  logic signed [15:0] a_xr [8], a_xi [8], a_zr [8], a_zi [8];
  int a_checks, a_fail;
  usn_fft #(.N_BF(1), .LEVELS(3), .DEPTH(1), .DATA_W(16)) dut_a (
    .clk, .rst_n(a_rst_n), .in_valid(a_iv), .x_re(a_xr), .x_im(a_xi),
    .out_valid(a_ov), .z_re(a_zr), .z_im(a_zi));
  usn_fft_checker #(.N_BF(1), .LEVELS(3), .DEPTH(1), .DATA_W(16), .NFRAMES(40), .TOL(4)) chk_a (
    .clk, .rst_n(a_rst_n), .in_valid(a_iv), .x_re(a_xr), .x_im(a_xi),
    .out_valid(a_ov), .z_re(a_zr), .z_im(a_zi), .done(a_done), .checks(a_checks),
    .failures(a_fail));

  // Reference 8-point mapping: emulated-row labels, output order and
  // twiddle powers (of w_8) of every row, for UHSN(3, B_1).
  localparam int REF_COL2 [8] = '{0, 2, 1, 3, 4, 6, 5, 7};   // emulated rows, column 2
  localparam int REF_COL4 [8] = '{0, 4, 1, 5, 2, 6, 3, 7};   // emulated rows, column 4
  localparam int REF_ZOUT [8] = '{0, 4, 1, 5, 2, 6, 3, 7};   // z index per row
  localparam int REF_TW1  [8] = '{0, 4, 0, 4, 0, 4, 0, 4};   // powers of w_8
  localparam int REF_TW3  [8] = '{0, 4, 2, 6, 0, 4, 2, 6};
  localparam int REF_TW5  [8] = '{0, 4, 1, 5, 2, 6, 3, 7};

  task automatic chk(input bit ok, input string what);
    extra_checks++;
    if (!ok) begin
      extra_fail++;
      $display("mismatch: %s", what);
    end
  endtask

  initial begin
    for (int p = 0; p < 8; p++) begin
      chk(usn_pkg::emu_row(p, 1, 3, 1) == REF_COL2[p], $sformatf("column 2 label row %0d", p));
      chk(usn_pkg::emu_row(p, 1, 3, 2) == REF_COL4[p], $sformatf("column 4 label row %0d", p));
      chk(usn_pkg::out_index(p, 1, 3, 1) == REF_ZOUT[p], $sformatf("output order row %0d", p));
      chk(usn_pkg::tw_exp(p, 1, 1, 3, 3, 0) == REF_TW1[p], $sformatf("twiddle col 1 row %0d", p));
      chk(usn_pkg::tw_exp(p, 1, 1, 3, 3, 1) == REF_TW3[p], $sformatf("twiddle col 3 row %0d", p));
      chk(usn_pkg::tw_exp(p, 1, 1, 3, 3, 2) == REF_TW5[p], $sformatf("twiddle col 5 row %0d", p));
    end
  end

  // The last column's rows must carry z in the printed order.
  always @(posedge clk) begin
    if (a_rst_n && a_ov) begin
      for (int p = 0; p < 8; p++) begin
        chk(dut_a.blk_out_re[2][p] == a_zr[REF_ZOUT[p]] &&
            dut_a.blk_out_im[2][p] == a_zi[REF_ZOUT[p]], $sformatf("row %0d output", p));
      end
    end
  end

  // ---------------------------------------------------------------- URSN(2,B_1)
  logic b_rst_n, b_iv, b_ov, b_done;
  logic signed [15:0] b_xr [16], b_xi [16], b_zr [16], b_zi [16];
  int b_checks, b_fail;
  usn_fft #(.N_BF(1), .LEVELS(2), .DEPTH(2), .DATA_W(16)) dut_b (
    .clk, .rst_n(b_rst_n), .in_valid(b_iv), .x_re(b_xr), .x_im(b_xi),
    .out_valid(b_ov), .z_re(b_zr), .z_im(b_zi));
  usn_fft_checker #(.N_BF(1), .LEVELS(2), .DEPTH(2), .DATA_W(16), .NFRAMES(40), .TOL(6)) chk_b (
    .clk, .rst_n(b_rst_n), .in_valid(b_iv), .x_re(b_xr), .x_im(b_xi),
    .out_valid(b_ov), .z_re(b_zr), .z_im(b_zi), .done(b_done), .checks(b_checks),
    .failures(b_fail));

  // ---------------------------------------------------------------- URSN(2,B_2)
  logic c_rst_n, c_iv, c_ov, c_done;
  logic signed [19:0] c_xr [256], c_xi [256], c_zr [256], c_zi [256];
  int c_checks, c_fail;
  usn_fft #(.N_BF(2), .LEVELS(2), .DEPTH(2), .DATA_W(20)) dut_c (
    .clk, .rst_n(c_rst_n), .in_valid(c_iv), .x_re(c_xr), .x_im(c_xi),
    .out_valid(c_ov), .z_re(c_zr), .z_im(c_zi));
  usn_fft_checker #(.N_BF(2), .LEVELS(2), .DEPTH(2), .DATA_W(20), .NFRAMES(16), .TOL(12)) chk_c (
    .clk, .rst_n(c_rst_n), .in_valid(c_iv), .x_re(c_xr), .x_im(c_xi),
    .out_valid(c_ov), .z_re(c_zr), .z_im(c_zi), .done(c_done), .checks(c_checks),
    .failures(c_fail));

  // ---------------------------------------------------------------- UHSN(2,B_3)
  logic d_rst_n, d_iv, d_ov, d_done;
  logic signed [17:0] d_xr [64], d_xi [64], d_zr [64], d_zi [64];
  int d_checks, d_fail;
  usn_fft #(.N_BF(3), .LEVELS(2), .DEPTH(1), .DATA_W(18)) dut_d (
    .clk, .rst_n(d_rst_n), .in_valid(d_iv), .x_re(d_xr), .x_im(d_xi),
    .out_valid(d_ov), .z_re(d_zr), .z_im(d_zi));
  usn_fft_checker #(.N_BF(3), .LEVELS(2), .DEPTH(1), .DATA_W(18), .NFRAMES(24), .TOL(10)) chk_d (
    .clk, .rst_n(d_rst_n), .in_valid(d_iv), .x_re(d_xr), .x_im(d_xi),
    .out_valid(d_ov), .z_re(d_zr), .z_im(d_zi), .done(d_done), .checks(d_checks),
    .failures(d_fail));

  // ------------------------------------------------- URHSN(3,2,B_1), URHSN(2,3,B_1)
  // Unequal unfolding per depth: 64 points, 6 blocks, 12 columns, latency 11.
  logic e_rst_n, e_iv, e_ov, e_done, f_rst_n, f_iv, f_ov, f_done;
  logic signed [17:0] e_xr [64], e_xi [64], e_zr [64], e_zi [64];
  logic signed [17:0] f_xr [64], f_xi [64], f_zr [64], f_zi [64];
  int e_checks, e_fail, f_checks, f_fail;
  usn_fft #(.N_BF(1), .LEVELS(2), .DEPTH(2), .LEVELS_VEC('h32), .DATA_W(18)) dut_e (
    .clk, .rst_n(e_rst_n), .in_valid(e_iv), .x_re(e_xr), .x_im(e_xi),
    .out_valid(e_ov), .z_re(e_zr), .z_im(e_zi));
  usn_fft_checker #(.DATA_W(18), .NFRAMES(24), .TOL(10), .M(6), .LATENCY(11)) chk_e (
    .clk, .rst_n(e_rst_n), .in_valid(e_iv), .x_re(e_xr), .x_im(e_xi),
    .out_valid(e_ov), .z_re(e_zr), .z_im(e_zi), .done(e_done), .checks(e_checks),
    .failures(e_fail));
  usn_fft #(.N_BF(1), .LEVELS(2), .DEPTH(2), .LEVELS_VEC('h23), .DATA_W(18)) dut_f (
    .clk, .rst_n(f_rst_n), .in_valid(f_iv), .x_re(f_xr), .x_im(f_xi),
    .out_valid(f_ov), .z_re(f_zr), .z_im(f_zi));
  usn_fft_checker #(.DATA_W(18), .NFRAMES(24), .TOL(10), .M(6), .LATENCY(11)) chk_f (
    .clk, .rst_n(f_rst_n), .in_valid(f_iv), .x_re(f_xr), .x_im(f_xi),
    .out_valid(f_ov), .z_re(f_zr), .z_im(f_zi), .done(f_done), .checks(f_checks),
    .failures(f_fail));

  initial begin
    @(posedge clk);  // the checkers clear done at time 0
    wait (a_done && b_done && c_done && d_done && e_done && f_done);
    $display("UHSN(3,B_1): checks=%0d failures=%0d", a_checks, a_fail);
    $display("URSN(2,B_1): checks=%0d failures=%0d", b_checks, b_fail);
    $display("URSN(2,B_2): checks=%0d failures=%0d", c_checks, c_fail);
    $display("UHSN(2,B_3): checks=%0d failures=%0d", d_checks, d_fail);
    $display("URHSN(3,2,B_1): checks=%0d failures=%0d", e_checks, e_fail);
    $display("URHSN(2,3,B_1): checks=%0d failures=%0d", f_checks, f_fail);
    $display("TB_RESULT checks=%0d failures=%0d",
             a_checks + b_checks + c_checks + d_checks + e_checks + f_checks + extra_checks,
             a_fail + b_fail + c_fail + d_fail + e_fail + f_fail + extra_fail);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d",
             a_checks + b_checks + c_checks + d_checks + e_checks + f_checks + extra_checks,
             a_fail + b_fail + c_fail + d_fail + e_fail + f_fail + extra_fail + 1);
    $finish;
  end
endmodule

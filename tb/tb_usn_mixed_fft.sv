// tb_usn_mixed_fft: the 32-point network of four 8-input and eight 4-input
// butterfly modules (defaults), and the mirrored 32-point network of eight
// 4-input and four 8-input modules, each run end to end against a directly
// computed DFT with usn_fft_checker, including the 6-clock latency
// (7 columns) and back-to-back frames. It also checks that every
// first-stage module feeds every second-stage module exactly once.
module tb_usn_mixed_fft;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic a_rst_n, a_iv, a_ov, a_done;
  logic signed [15:0] a_xr [32], a_xi [32], a_zr [32], a_zi [32];
  int a_checks, a_fail;
  usn_mixed_fft dut_a (
    .clk, .rst_n(a_rst_n), .in_valid(a_iv), .x_re(a_xr), .x_im(a_xi),
    .out_valid(a_ov), .z_re(a_zr), .z_im(a_zi));
  usn_fft_checker #(.DATA_W(16), .NFRAMES(40), .TOL(6), .M(5), .LATENCY(6)) chk_a (
    .clk, .rst_n(a_rst_n), .in_valid(a_iv), .x_re(a_xr), .x_im(a_xi),
    .out_valid(a_ov), .z_re(a_zr), .z_im(a_zi), .done(a_done), .checks(a_checks),
    .failures(a_fail));

  logic b_rst_n, b_iv, b_ov, b_done;
  logic signed [15:0] b_xr [32], b_xi [32], b_zr [32], b_zi [32];
  int b_checks, b_fail;
  usn_mixed_fft #(.A(2), .B(3)) dut_b (
    .clk, .rst_n(b_rst_n), .in_valid(b_iv), .x_re(b_xr), .x_im(b_xi),
    .out_valid(b_ov), .z_re(b_zr), .z_im(b_zi));
  usn_fft_checker #(.DATA_W(16), .NFRAMES(40), .TOL(6), .M(5), .LATENCY(6)) chk_b (
    .clk, .rst_n(b_rst_n), .in_valid(b_iv), .x_re(b_xr), .x_im(b_xi),
    .out_valid(b_ov), .z_re(b_zr), .z_im(b_zi), .done(b_done), .checks(b_checks),
    .failures(b_fail));

  // Link pattern of the default network: a (module, module) pair table.
  int link_checks = 0, link_fail = 0;
  initial begin
    int seen [4][8];
    for (int i = 0; i < 4; i++) for (int j = 0; j < 8; j++) seen[i][j] = 0;
    for (int p = 0; p < 32; p++) begin
      int src;
      src = int'(usn_pkg::mix_src_row(p, 3, 2));
      // destination module p/4 (4-input), source module src/8 (8-input)
      seen[src / 8][p / 4]++;
      link_checks++;
      if (src % 8 != p / 4 || p % 4 != src / 8) link_fail++;
    end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 8; j++) begin
        link_checks++;
        if (seen[i][j] != 1) link_fail++;
      end
  end

  initial begin
    @(posedge clk);  // the checkers clear done at time 0
    wait (a_done && b_done);
    $display("8x4 modules: checks=%0d failures=%0d", a_checks, a_fail);
    $display("4x8 modules: checks=%0d failures=%0d", b_checks, b_fail);
    $display("TB_RESULT checks=%0d failures=%0d", a_checks + b_checks + link_checks,
             a_fail + b_fail + link_fail);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", a_checks + b_checks + link_checks,
             a_fail + b_fail + link_fail + 1);
    $finish;
  end
endmodule

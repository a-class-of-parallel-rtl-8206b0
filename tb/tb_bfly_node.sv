// tb_bfly_node: checks y = u + w*v of bfly_node for four fixed twiddles
// (1, -j, w_8 = (1-j)/sqrt2 and an arbitrary value) on random operands,
// and that the result appears exactly one clock after the operands.
// Expected values are computed in double precision: the product w*v is
// rounded to the nearest integer (ties up) and added to u, wrapping to 16 bits.
module tb_bfly_node;
  localparam int NT = 4;
  localparam int TWR [NT] = '{16384, 0, 11585, -9000};
  localparam int TWI [NT] = '{0, -16384, -11585, 12345};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [15:0] u_re, u_im, v_re, v_im;
  logic signed [15:0] y_re [NT];
  logic signed [15:0] y_im [NT];
  int checks = 0, failures = 0;

  for (genvar t = 0; t < NT; t++) begin : g_dut
    bfly_node #(.DATA_W(16), .TW_W(16), .TW_FRAC(14), .TW_RE(TWR[t]), .TW_IM(TWI[t])) dut (
      .clk, .u_re, .u_im, .v_re, .v_im, .y_re(y_re[t]), .y_im(y_im[t]));
  end

  function automatic logic signed [15:0] model(int u, int a, int b, int c, int d);
    // u + round((a*b - c*d) / 2^14)
    real pr = (real'(a) * real'(b) - real'(c) * real'(d)) / 16384.0;
    return 16'(u + int'($floor(pr + 0.5)));
  endfunction

  initial begin
    logic signed [15:0] er [NT];
    logic signed [15:0] ei [NT];
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      if (it < 4) begin
        // corner operands
        u_re = (it[0]) ? 16'sh3fff : -16'sh4000;
        u_im = -u_re;
        v_re = (it[1]) ? 16'sh3fff : -16'sh4000;
        v_im = 16'sh1234;
      end else begin
        u_re = 16'($urandom_range(32767) - 16384);
        u_im = 16'($urandom_range(32767) - 16384);
        v_re = 16'($urandom_range(32767) - 16384);
        v_im = 16'($urandom_range(32767) - 16384);
      end
      for (int t = 0; t < NT; t++) begin
        er[t] = model(int'(u_re), TWR[t], int'(v_re), TWI[t], int'(v_im));
        ei[t] = model(int'(u_im), TWR[t], int'(v_im), -TWI[t], int'(v_re));
      end
      @(posedge clk);
      #1;
      for (int t = 0; t < NT; t++) begin
        checks++;
        if (y_re[t] !== er[t] || y_im[t] !== ei[t]) begin
          failures++;
          if (failures < 10)
            $display("tw %0d: u=(%0d,%0d) v=(%0d,%0d) got (%0d,%0d) expected (%0d,%0d)",
                     t, u_re, u_im, v_re, v_im, y_re[t], y_im[t], er[t], ei[t]);
        end
      end
    end
    // Latency: hold new operands, the output must not change before the clock.
    @(negedge clk);
    u_re = 16'sd100; u_im = 16'sd0; v_re = 16'sd0; v_im = 16'sd0;
    #2;
    checks++;
    if (y_re[0] == 16'sd100 && y_im[0] == 16'sd0) failures++;
    @(posedge clk);
    #1;
    checks++;
    if (y_re[0] != 16'sd100 || y_im[0] != 16'sd0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

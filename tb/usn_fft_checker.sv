// usn_fft_checker: stimulus and scoreboard for usn_fft, shared by the
// end-to-end testbenches.
//
// It sends NFRAMES FFT frames: an impulse, a constant, single complex tones
// and random samples, with a random mix of back-to-back frames and idle
// gaps. For every frame it works out the DFT directly (double precision,
// z_k = sum_i x_i e^{-j 2 pi i k / N}) and queues it with the issue cycle.
// When out_valid rises it compares every output bin with the reference,
// allowing TOL LSBs of rounding error, and checks that the result came
// exactly LATENCY = (columns - 1) clocks after the samples, by default
// LEVELS^DEPTH * (N_BF + 1) - 1 as for usn_fft. Sample amplitude AMP keeps the FFT's growth inside DATA_W bits.
// It also counts the pipelining cases it produced (back-to-back frames,
// gaps) and reports a failure for a case that never happened.
module usn_fft_checker #(
  parameter int unsigned N_BF    = 2,
  parameter int unsigned LEVELS  = 2,
  parameter int unsigned DEPTH   = 1,
  parameter int unsigned DATA_W  = 16,
  parameter int unsigned NFRAMES = 40,
  parameter int          TOL     = 8,
  // Row bits and latency; the defaults are those of usn_fft.
  parameter int          M       = N_BF * (LEVELS ** DEPTH),
  parameter int          LATENCY = (LEVELS ** DEPTH) * (N_BF + 1) - 1
) (
  input  logic                     clk,
  output logic                     rst_n,
  output logic                     in_valid,
  output logic signed [DATA_W-1:0] x_re [2**M],
  output logic signed [DATA_W-1:0] x_im [2**M],
  input  logic                     out_valid,
  input  logic signed [DATA_W-1:0] z_re [2**M],
  input  logic signed [DATA_W-1:0] z_im [2**M],
  output logic                     done,
  output int                       checks,
  output int                       failures
);

  localparam int N       = 2 ** M;
  localparam int AMP     = (2 ** (DATA_W - 1)) / (2 * N);
  localparam real PI     = 3.14159265358979323846;

  real    exp_re [NFRAMES][N];
  real    exp_im [NFRAMES][N];
  longint exp_t  [NFRAMES];
  longint cycle = 0;
  int     sent = 0, received = 0, back_to_back = 0, gaps = 0;
  logic   prev_valid = 1'b0;

  always_ff @(posedge clk) cycle <= cycle + 1;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic make_frame(input int f);
    real rr [N];
    real ri [N];
    real er [N];
    real ei [N];
    int  tone;
    for (int i = 0; i < N; i++) begin
      case (f % 4)
        0: begin rr[i] = (i == 0) ? real'(AMP) : 0.0; ri[i] = 0.0; end
        1: begin rr[i] = real'(AMP / 2); ri[i] = -real'(AMP / 4); end
        2: begin
          tone  = (f / 4) % N;
          rr[i] = $floor(real'(AMP) * $cos(2.0 * PI * tone * i / N));
          ri[i] = $floor(real'(AMP) * $sin(2.0 * PI * tone * i / N));
        end
        default: begin
          rr[i] = real'(int'($urandom_range(2 * AMP)) - AMP);
          ri[i] = real'(int'($urandom_range(2 * AMP)) - AMP);
        end
      endcase
      x_re[i] = DATA_W'(int'(rr[i]));
      x_im[i] = DATA_W'(int'(ri[i]));
    end
    for (int k = 0; k < N; k++) begin
      er[k] = 0.0;
      ei[k] = 0.0;
      for (int i = 0; i < N; i++) begin
        real c, s;
        c = $cos(2.0 * PI * ((i * k) % N) / N);
        s = -$sin(2.0 * PI * ((i * k) % N) / N);
        er[k] += rr[i] * c - ri[i] * s;
        ei[k] += rr[i] * s + ri[i] * c;
      end
    end
    for (int k = 0; k < N; k++) begin
      exp_re[f][k] = er[k];
      exp_im[f][k] = ei[k];
    end
  endtask

  // Driver: data and in_valid change on the falling edge.
  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    done     = 1'b0;
    checks   = 0;
    failures = 0;
    for (int i = 0; i < N; i++) begin x_re[i] = '0; x_im[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (sent < NFRAMES) begin
      @(negedge clk);
      // Frames 0..7 back to back, then a random mix.
      if (sent < 8 || $urandom_range(2) != 0) begin
        make_frame(sent);
        exp_t[sent] = cycle;
        in_valid = 1'b1;
        sent++;
      end else begin
        in_valid = 1'b0;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LATENCY + 4) @(negedge clk);
    if (received != NFRAMES) begin
      $display("checker: received %0d of %0d frames", received, NFRAMES);
      failures++;
    end
    checks++;
    $display("checker: frames=%0d back_to_back=%0d gaps=%0d latency=%0d",
             received, back_to_back, gaps, LATENCY);
    if (back_to_back == 0) begin $display("checker: no back-to-back frames"); failures++; end
    if (gaps == 0)         begin $display("checker: no idle gaps"); failures++; end
    checks += 2;
    done = 1'b1;
  end

  // Count pipelining cases at the input.
  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && prev_valid) back_to_back++;
      if (!in_valid && prev_valid && sent < NFRAMES) gaps++;
      prev_valid <= in_valid;
    end
  end

  // Scoreboard.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (received >= sent) begin
        $display("checker: unexpected out_valid at cycle %0d", cycle);
        failures++;
        checks++;
      end else begin
        longint t;
        t = exp_t[received];
        checks++;
        if (cycle - t != longint'(LATENCY)) begin
          $display("checker: frame %0d latency %0d, expected %0d", received, cycle - t, LATENCY);
          failures++;
        end
        for (int k = 0; k < N; k++) begin
          checks++;
          if (rabs(real'(z_re[k]) - exp_re[received][k]) > TOL ||
              rabs(real'(z_im[k]) - exp_im[received][k]) > TOL) begin
            failures++;
            if (failures < 10)
              $display("checker: frame %0d bin %0d got (%0d,%0d) expected (%0.2f,%0.2f)",
                       received, k, z_re[k], z_im[k], exp_re[received][k],
                       exp_im[received][k]);
          end
        end
        received++;
      end
    end
  end

endmodule

// tb_bn_nucleus: a single nucleus B_3 (LEVELS = DEPTH = 1) is a complete
// 8-point FFT with its inputs in bit-reversed row order and its outputs in
// natural order. Random frames are sent one per clock; every output is
// compared with a directly computed DFT (tolerance 3 LSB) exactly 3 clocks
// (one per butterfly column) after its inputs.
module tb_bn_nucleus;
  localparam int NB = 3;
  localparam int N  = 8;
  localparam int LAT = NB;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [15:0] x_re [N], x_im [N], y_re [N], y_im [N];
  int checks = 0, failures = 0;

  bn_nucleus #(.N_BF(NB), .LEVELS(1), .DEPTH(1), .BLK(0), .PREFIX(0), .DATA_W(16), .TW_W(16))
    dut (.clk, .x_re, .x_im, .y_re, .y_im);

  localparam int NF = 50;
  real er [NF][N];
  real ei [NF][N];

  function automatic int brev3(int v);
    return ((v & 1) << 2) | (v & 2) | ((v >> 2) & 1);
  endfunction

  initial begin
    int sr [N];
    int si [N];
    for (int f = 0; f < NF + LAT; f++) begin
      @(negedge clk);
      if (f < NF) begin
        for (int i = 0; i < N; i++) begin
          sr[i] = int'($urandom_range(2000)) - 1000;
          si[i] = int'($urandom_range(2000)) - 1000;
          if (f == 0) begin sr[i] = (i == 1) ? 1000 : 0; si[i] = 0; end
          x_re[brev3(i)] = 16'(sr[i]);
          x_im[brev3(i)] = 16'(si[i]);
        end
        for (int k = 0; k < N; k++) begin
          er[f][k] = 0.0;
          ei[f][k] = 0.0;
          for (int i = 0; i < N; i++) begin
            real c, s;
            c = $cos(2.0 * PI * ((i * k) % N) / N);
            s = -$sin(2.0 * PI * ((i * k) % N) / N);
            er[f][k] += sr[i] * c - si[i] * s;
            ei[f][k] += sr[i] * s + si[i] * c;
          end
        end
      end
      // Outputs now showing belong to the frame sent LAT clocks ago.
      if (f >= LAT) begin
        for (int k = 0; k < N; k++) begin
          real dr, di;
          dr = real'(y_re[k]) - er[f-LAT][k];
          di = real'(y_im[k]) - ei[f-LAT][k];
          checks++;
          if (dr > 3.0 || dr < -3.0 || di > 3.0 || di < -3.0) begin
            failures++;
            if (failures < 10)
              $display("frame %0d bin %0d got (%0d,%0d) expected (%0.1f,%0.1f)",
                       f - LAT, k, y_re[k], y_im[k], er[f-LAT][k], ei[f-LAT][k]);
          end
        end
      end
    end
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

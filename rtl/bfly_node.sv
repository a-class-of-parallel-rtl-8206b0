// bfly_node: one computing node of a butterfly column.
//
// A node in column c of a butterfly nucleus takes two values from column c-1,
// u from the row whose bit c-1 is clear and v from the row whose bit c-1 is
// set, and computes the radix-2 FFT step
//     y = u + w * v
// with a complex twiddle w that is fixed by the node's place in the network
// (parameters TW_RE, TW_IM). Each column of the network takes one unit of
// time, so y is registered: it appears one clock after u and v.
//
// Number format (a choice of this design; the structure is format-free):
// every value is complex, two's-complement real and imaginary parts of
// DATA_W bits. The twiddle has TW_W bits with TW_FRAC fraction bits. The
// product w*v is rounded to nearest (half up) and brought back to DATA_W
// bits; the sum u + w*v is not scaled, so values grow by up to a factor of
// about 2.4 per column and the caller must leave that headroom (roughly
// log2(N)+1 guard bits for an N-point FFT). Sums wrap on overflow.
// The data registers have no reset: the network's valid pipeline says
// when they hold a result.
module bfly_node #(
  parameter int unsigned DATA_W  = 16,
  parameter int unsigned TW_W    = 16,
  parameter int unsigned TW_FRAC = 14,
  parameter int          TW_RE   = 1 << 14,
  parameter int          TW_IM   = 0
) (
  input  logic                     clk,
  input  logic signed [DATA_W-1:0] u_re,
  input  logic signed [DATA_W-1:0] u_im,
  input  logic signed [DATA_W-1:0] v_re,
  input  logic signed [DATA_W-1:0] v_im,
  output logic signed [DATA_W-1:0] y_re,
  output logic signed [DATA_W-1:0] y_im
);

  localparam int unsigned PW = DATA_W + TW_W + 1;

  localparam logic signed [TW_W-1:0] WR = TW_W'(TW_RE);
  localparam logic signed [TW_W-1:0] WI = TW_W'(TW_IM);
  localparam logic signed [PW-1:0]   RND = PW'(1) <<< (TW_FRAC - 1);

  logic signed [PW-1:0] p_re, p_im;
  logic signed [DATA_W-1:0] wv_re, wv_im;

  always_comb begin
    p_re  = PW'(WR * v_re) - PW'(WI * v_im) + RND;
    p_im  = PW'(WR * v_im) + PW'(WI * v_re) + RND;
    wv_re = DATA_W'(p_re >>> TW_FRAC);
    wv_im = DATA_W'(p_im >>> TW_FRAC);
  end

  always_ff @(posedge clk) begin
    y_re <= u_re + wv_re;
    y_im <= u_im + wv_im;
  end

endmodule

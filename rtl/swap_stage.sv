// swap_stage: the swap links at one block boundary of the USN, together with
// the column of nodes they feed.
//
// Between block k and block k+1 every row of the network's last column of
// block k is linked to one node of the first column of block k+1: node
// (row q) receives from row swap(q), where swap exchanges the lowest row digit
// with digit i+1 and leaves the other digits alone. The digit width and i
// follow from k (usn_pkg::swap_row): at the innermost boundaries a digit is
// n bits, at a boundary of recursion depth d it is n*l_1*...*l_(d-1) bits
// (l_d = LEVELS unless LEVELS_VEC gives the depth its own factor, see usn_fft). The
// receiving nodes compute nothing; they hold the value for one clock, as a
// link transfer takes one unit of time.
//
// With MIX_A > 0 the stage is instead the link column of the two-stage
// network of unequal modules (usn_mixed_fft): output j of first-stage module
// i goes to input i of second-stage module j, so the MIX_A low row bits and
// the MIX_B high row bits change places.
//
// The swap rule and the one-clock link transfer are those of the USN
// definition; building the receiving nodes as plain registers without reset
// is this design's choice.
//
// Ports: x_* is the last column of block BOUNDARY, y_* the first column of
// block BOUNDARY+1, one clock later. The data registers have no reset.
module swap_stage #(
  parameter int unsigned N_BF     = 2,
  parameter int unsigned LEVELS   = 2,
  parameter int unsigned DEPTH    = 1,
  parameter int unsigned LEVELS_VEC = 0,
  parameter int unsigned BOUNDARY = 0,
  parameter int unsigned DATA_W   = 16,
  parameter int unsigned MIX_A    = 0,
  parameter int unsigned MIX_B    = 0
) (
  input  logic                     clk,
  input  logic signed [DATA_W-1:0] x_re [2**usn_pkg::net_bits(N_BF, LEVELS, DEPTH, LEVELS_VEC, MIX_A, MIX_B)],
  input  logic signed [DATA_W-1:0] x_im [2**usn_pkg::net_bits(N_BF, LEVELS, DEPTH, LEVELS_VEC, MIX_A, MIX_B)],
  output logic signed [DATA_W-1:0] y_re [2**usn_pkg::net_bits(N_BF, LEVELS, DEPTH, LEVELS_VEC, MIX_A, MIX_B)],
  output logic signed [DATA_W-1:0] y_im [2**usn_pkg::net_bits(N_BF, LEVELS, DEPTH, LEVELS_VEC, MIX_A, MIX_B)]
);

  localparam int unsigned LV   = usn_pkg::levels_vec(LEVELS, DEPTH, LEVELS_VEC);
  localparam int unsigned ROWS = 2 ** usn_pkg::net_bits(N_BF, LEVELS, DEPTH, LEVELS_VEC, MIX_A, MIX_B);

  for (genvar q = 0; q < ROWS; q++) begin : g_row
    localparam int unsigned SRC = (MIX_A > 0) ? usn_pkg::mix_src_row(q, MIX_A, MIX_B)
                                              : usn_pkg::swap_row(q, N_BF, LV, BOUNDARY);
    always_ff @(posedge clk) begin
      y_re[q] <= x_re[SRC];
      y_im[q] <= x_im[SRC];
    end
  end

endmodule

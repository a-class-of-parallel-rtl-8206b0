// tb_swap_stage: checks the swap links of four block boundaries. For each,
// the expected source row of every node is built here by explicit bit
// slicing: UHSN(2,B_2) boundary 0 exchanges row bits [1:0] and [3:2];
// UHSN(3,B_1) boundary 1 exchanges bits 0 and 2; URSN(2,B_1) boundary 0
// exchanges bits 0 and 1 and boundary 1 exchanges bits [1:0] and [3:2].
// Random columns are applied every clock and must appear permuted one
// clock later.
module tb_swap_stage;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic signed [15:0] a_xr [16], a_xi [16], a_yr [16], a_yi [16];
  logic signed [15:0] b_xr [8],  b_xi [8],  b_yr [8],  b_yi [8];
  logic signed [15:0] c_xr [16], c_xi [16], c_yr [16], c_yi [16];
  logic signed [15:0] d_xr [16], d_xi [16], d_yr [16], d_yi [16];

  swap_stage dut_a (.clk, .x_re(a_xr), .x_im(a_xi), .y_re(a_yr), .y_im(a_yi));
  swap_stage #(.N_BF(1), .LEVELS(3), .DEPTH(1), .BOUNDARY(1)) dut_b (
    .clk, .x_re(b_xr), .x_im(b_xi), .y_re(b_yr), .y_im(b_yi));
  swap_stage #(.N_BF(1), .LEVELS(2), .DEPTH(2), .BOUNDARY(0)) dut_c (
    .clk, .x_re(c_xr), .x_im(c_xi), .y_re(c_yr), .y_im(c_yi));
  swap_stage #(.N_BF(1), .LEVELS(2), .DEPTH(2), .BOUNDARY(1)) dut_d (
    .clk, .x_re(d_xr), .x_im(d_xi), .y_re(d_yr), .y_im(d_yi));

  function automatic int src_a(int q);  // bits [1:0] <-> [3:2]
    logic [3:0] b = 4'(q);
    return int'({b[1:0], b[3:2]});
  endfunction
  function automatic int src_b(int q);  // bit 0 <-> bit 2
    logic [2:0] b = 3'(q);
    return int'({b[0], b[1], b[2]});
  endfunction
  function automatic int src_c(int q);  // bit 0 <-> bit 1
    logic [3:0] b = 4'(q);
    return int'({b[3:2], b[0], b[1]});
  endfunction

  initial begin
    logic signed [15:0] pa_r [16], pa_i [16], pb_r [8], pb_i [8];
    logic signed [15:0] pc_r [16], pc_i [16], pd_r [16], pd_i [16];
    for (int it = 0; it < 100; it++) begin
      @(negedge clk);
      for (int q = 0; q < 16; q++) begin
        a_xr[q] = 16'($urandom); a_xi[q] = 16'($urandom);
        c_xr[q] = 16'($urandom); c_xi[q] = 16'($urandom);
        d_xr[q] = 16'($urandom); d_xi[q] = 16'($urandom);
        if (q < 8) begin b_xr[q] = 16'($urandom); b_xi[q] = 16'($urandom); end
      end
      pa_r = a_xr; pa_i = a_xi; pb_r = b_xr; pb_i = b_xi;
      pc_r = c_xr; pc_i = c_xi; pd_r = d_xr; pd_i = d_xi;
      @(posedge clk);
      #1;
      for (int q = 0; q < 16; q++) begin
        checks += 3;
        if (a_yr[q] != pa_r[src_a(q)] || a_yi[q] != pa_i[src_a(q)]) failures++;
        if (c_yr[q] != pc_r[src_c(q)] || c_yi[q] != pc_i[src_c(q)]) failures++;
        if (d_yr[q] != pd_r[src_a(q)] || d_yi[q] != pd_i[src_a(q)]) failures++;
        if (q < 8) begin
          checks++;
          if (b_yr[q] != pb_r[src_b(q)] || b_yi[q] != pb_i[src_b(q)]) failures++;
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

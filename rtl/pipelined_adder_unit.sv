// pipelined_adder_unit: adds the MCM product terms into the filter outputs.
//
// Block k's outputs are y_blk[i] = y(kL - i), i = 0 .. L-1. Writing the filter
// as y_k = sum_m S_{k-m}^0 c_m, the unit works in two steps:
//   1. For every coefficient group m and row i, a pipelined adder tree adds
//      the L products of that row: r_k^m[i] = sum_j prod[m][i][j]. This is
//      the row of S_k^0 times c_m, formed from the current block's samples.
//   2. A transposed delay line across the groups adds r^m of block k-m:
//        acc[M-1] <= r^{M-1}_k,   acc[m] <= r^m_k + acc[m+1],   y = acc[0].
//      Because S_{k-m}^0 c_m = (S^0 c_m) computed m blocks ago, every MCM
//      unit can work on the same current samples, which is what lets one
//      sample be shared by all the constants it is multiplied with.
// Each register stage loads only on a valid block, so gaps in the stream
// are skipped over and the delay line counts blocks, not clocks. A reset
// clears the delay line (all-zero filter history).
//
// Timing: y_blk/y_valid appear $clog2(L) + 1 clocks after prod/p_valid.
// All sums are carried at OUT_W bits, enough for N = M*L products.
//
// The unit's place in the structure (between the MCM units and the output,
// pipelined) follows the reference; the two-step split, the transposed
// delay line and the register placement are this design's choices.
module pipelined_adder_unit #(
  parameter int unsigned L      = fir_mcm_pkg::BLOCK_L,
  parameter int unsigned M      = fir_mcm_pkg::N_TAPS / fir_mcm_pkg::BLOCK_L,
  parameter int unsigned P_W    = fir_mcm_pkg::prod_width(fir_mcm_pkg::IN_W, fir_mcm_pkg::COEF_W),
  parameter int unsigned OUT_W  = P_W + $clog2(M*L)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    p_valid,
  input  logic signed [P_W-1:0]   prod  [M][L][L],
  output logic                    y_valid,
  output logic signed [OUT_W-1:0] y_blk [L]
);

  // Step 1: row sums per group.
  logic signed [OUT_W-1:0] r      [M][L];
  logic                    r_vld  [M][L];
  logic                    rv;

  for (genvar m = 0; m < M; m++) begin : g_group
    for (genvar i = 0; i < L; i++) begin : g_row
      logic signed [OUT_W-1:0] ops [L];
      always_comb
        for (int j = 0; j < L; j++) ops[j] = OUT_W'(prod[m][i][j]);

      adder_tree_pipe #(.N_IN(L), .W(OUT_W)) u_tree (
        .clk       (clk),
        .rst       (rst),
        .in_valid  (p_valid),
        .op        (ops),
        .sum_valid (r_vld[m][i]),
        .sum       (r[m][i])
      );

      // Every tree has the same depth and the same valid input.
      a_lockstep: assert property (@(posedge clk) disable iff (rst) r_vld[m][i] == rv);
    end
  end

  // All trees run in lock step; group 0, row 0 carries the valid bit.
  assign rv = r_vld[0][0];

  // Step 2: transposed delay line across the groups.
  logic signed [OUT_W-1:0] acc [M][L];

  always_ff @(posedge clk) begin
    if (rst) begin
      y_valid <= 1'b0;
      for (int m = 0; m < M; m++)
        for (int i = 0; i < L; i++) acc[m][i] <= '0;
    end else begin
      y_valid <= rv;
      if (rv) begin
        for (int i = 0; i < L; i++) begin
          acc[M-1][i] <= r[M-1][i];
          for (int m = 0; m < M-1; m++) acc[m][i] <= r[m][i] + acc[m+1][i];
        end
      end
    end
  end

  always_comb
    for (int i = 0; i < L; i++) y_blk[i] = acc[0][i];

endmodule

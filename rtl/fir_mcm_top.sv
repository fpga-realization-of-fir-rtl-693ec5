// fir_mcm_top: block FIR filter built from multiple constant multiplication.
//
// An N-tap FIR filter that takes a block of L input samples and returns a
// block of L output samples every clock:
//   y(n) = sum_{t=0}^{N-1} h(t) x(n-t).
// Block k carries x_blk[i] = x(kL - i) and returns y_blk[i] = y(kL - i), index
// 0 being the newest sample in both. With M = N/L coefficient groups
// c_m = { h(mL) .. h(mL+L-1) } the block output is y_k = sum_m S_{k-m}^0 c_m,
// where S_k^0 is the L x L matrix of samples x(kL-i-j).
//
// Structure (reference block diagram):
//   register_unit         takes x_blk, presents the 2L-1 samples of S_k^0
//   mcm_unit  x M         unit m multiplies them by group c_m with shifts,
//                         additions and subtractions (no multipliers)
//   pipelined_adder_unit  row sums per group, then a transposed delay line
//                         across the groups gives y_k
// The coefficients enter through the coef port, coef[t] = h(t). For the
// fixed-coefficient filter this design is meant for, the instantiating design
// ties coef to constants and synthesis folds each MCM unit into its fixed
// shift-and-add network; coef must not change while the filter runs.
//
// Timing: one block per clock when in_valid stays high. y_blk/out_valid
// follow the block's x_blk/in_valid by LATENCY = 3 + $clog2(L) clocks
// (5 for L = 4). A clock with in_valid low is a gap: nothing is taken,
// the filter history is kept, and one clock later out_valid is low for one
// clock. A synchronous reset clears the history; the first outputs then
// treat earlier samples as zero. Outputs are full precision, OUT_W =
// IN_W + COEF_W + $clog2(N) bits.
//
// The sizes (N = 16, L = 4), the four units and their connection follow the
// reference design; sample and coefficient widths are read from its
// waveform; the valid signal, the reset and the full-precision output are
// this design's choices.
module fir_mcm_top #(
  parameter int unsigned N      = fir_mcm_pkg::N_TAPS,
  parameter int unsigned L      = fir_mcm_pkg::BLOCK_L,
  parameter int unsigned IN_W   = fir_mcm_pkg::IN_W,
  parameter int unsigned COEF_W = fir_mcm_pkg::COEF_W,
  parameter int unsigned OUT_W  = fir_mcm_pkg::sum_width(IN_W, COEF_W, N)
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [COEF_W-1:0] coef  [N],
  input  logic                     in_valid,
  input  logic signed [IN_W-1:0]   x_blk [L],
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  y_blk [L]
);

  localparam int unsigned M   = N / L;
  localparam int unsigned P_W = fir_mcm_pkg::prod_width(IN_W, COEF_W);

  // The block structure needs whole coefficient groups.
  if (N % L != 0) begin : g_bad_size
    $error("fir_mcm_top: N (%0d) must be a multiple of L (%0d)", N, L);
  end

  logic                   s_valid;
  logic signed [IN_W-1:0] s [2*L-1];

  register_unit #(.L(L), .IN_W(IN_W)) u_ru (
    .clk      (clk),
    .rst      (rst),
    .in_valid (in_valid),
    .x_blk    (x_blk),
    .s_valid  (s_valid),
    .s        (s)
  );

  logic                  p_valid [M];
  logic signed [P_W-1:0] prod    [M][L][L];

  for (genvar m = 0; m < M; m++) begin : g_mcm
    logic signed [COEF_W-1:0] c_m [L];
    always_comb
      for (int j = 0; j < L; j++) c_m[j] = coef[m*L + j];

    mcm_unit #(.L(L), .IN_W(IN_W), .COEF_W(COEF_W), .P_W(P_W)) u_mcm (
      .clk     (clk),
      .rst     (rst),
      .s_valid (s_valid),
      .s       (s),
      .coef    (c_m),
      .p_valid (p_valid[m]),
      .prod    (prod[m])
    );

    // All MCM units see the same valid input.
    a_lockstep: assert property (@(posedge clk) disable iff (rst) p_valid[m] == p_valid[0]);
  end

  pipelined_adder_unit #(.L(L), .M(M), .P_W(P_W), .OUT_W(OUT_W)) u_pau (
    .clk     (clk),
    .rst     (rst),
    .p_valid (p_valid[0]),
    .prod    (prod),
    .y_valid (out_valid),
    .y_blk   (y_blk)
  );

endmodule

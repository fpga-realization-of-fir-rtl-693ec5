// mcm_unit: multiple constant multiplication for one coefficient group.
//
// MCM unit m multiplies the samples of the input matrix S_k^0 by the
// coefficient group c_m = { h(mL), h(mL+1), ..., h(mL+L-1) } and delivers the
// L x L product terms of that group:
//   prod[i][j] = s[i+j] * c[j]  =  x(kL-i-j) * h(mL+j),   i, j = 0 .. L-1.
// Sample s[d] is therefore multiplied by the coefficients c[j] with
// 0 <= d-j <= L-1 only: the newest and the oldest sample by one coefficient,
// the middle sample by all L. Over the M units this is the sample-to-
// coefficient-group assignment of the reference design's MCM table.
//
// No multiplier is used. Each coefficient is recoded once into canonical
// signed digits (shared by every sample it multiplies), and each sample is
// negated once (shared by every coefficient it meets). A product is the sum
// of the shifted sample or shifted negated sample selected by the non-zero
// digits, so it costs one adder per non-zero digit. With the coefficients
// tied to constants, synthesis reduces each product to its fixed
// shift-and-add network. Products are exact at IN_W+COEF_W bits.
//
// Timing: prod and p_valid are registered, one clock after s/s_valid.
// The registers load only on s_valid.
//
// Following the reference: one unit per coefficient group, fed with L
// coefficients and with the samples of the register unit, built from
// shifts, additions and subtractions. This design's own choices: the
// signed-digit recoding, the sharing described above, and the output
// register. A common-subexpression search over the particular coefficient
// values is left to synthesis.
module mcm_unit #(
  parameter int unsigned L      = fir_mcm_pkg::BLOCK_L,
  parameter int unsigned IN_W   = fir_mcm_pkg::IN_W,
  parameter int unsigned COEF_W = fir_mcm_pkg::COEF_W,
  parameter int unsigned P_W    = fir_mcm_pkg::prod_width(IN_W, COEF_W)
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     s_valid,
  input  logic signed [IN_W-1:0]   s    [2*L-1],
  input  logic signed [COEF_W-1:0] coef [L],
  output logic                     p_valid,
  output logic signed [P_W-1:0]    prod [L][L]
);

  // Signed-digit form of each coefficient of the group.
  logic [COEF_W:0] pos [L];
  logic [COEF_W:0] neg [L];

  for (genvar j = 0; j < L; j++) begin : g_recode
    csd_recode #(.COEF_W(COEF_W)) u_recode (
      .c   (coef[j]),
      .pos (pos[j]),
      .neg (neg[j])
    );
  end

  // Each sample and its negation, at product width.
  logic signed [P_W-1:0] sx  [2*L-1];
  logic signed [P_W-1:0] nsx [2*L-1];

  always_comb begin
    for (int d = 0; d < 2*L-1; d++) begin
      sx[d]  = P_W'(s[d]);
      nsx[d] = -sx[d];
    end
  end

  // Shift-and-add products.
  logic signed [P_W-1:0] prod_c [L][L];

  always_comb begin
    for (int i = 0; i < L; i++) begin
      for (int j = 0; j < L; j++) begin
        prod_c[i][j] = '0;
        for (int b = 0; b <= COEF_W; b++) begin
          if (pos[j][b])      prod_c[i][j] = prod_c[i][j] + (sx[i+j]  <<< b);
          else if (neg[j][b]) prod_c[i][j] = prod_c[i][j] + (nsx[i+j] <<< b);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      p_valid <= 1'b0;
      for (int i = 0; i < L; i++)
        for (int j = 0; j < L; j++) prod[i][j] <= '0;
    end else begin
      p_valid <= s_valid;
      if (s_valid) prod <= prod_c;
    end
  end

endmodule

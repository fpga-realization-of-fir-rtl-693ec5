// register_unit: input register of the block FIR filter.
//
// Each valid clock the unit takes one block of L new samples,
// x_blk[i] = x(kL - i) (index 0 is the newest sample), and presents the
// 2L-1 distinct samples of the input matrix S_k^0 of that block:
//   s[d] = x(kL - d),  d = 0 .. 2L-2.
// Samples s[0..L-1] are the block just taken; s[L..2L-2] are the L-1 newest
// samples of the block before it, kept in a history register. Row i, column
// j of S_k^0 is s[i+j]; the MCM units read it in that form.
//
// Timing: s and s_valid appear one clock after x_blk/in_valid. When in_valid
// is low the unit holds its contents and s_valid falls, so a gap in the
// input stream does not disturb the sample history. A synchronous reset
// clears the history, which gives the filter an all-zero initial state.
//
// The unit's role (take x(k) each cycle, deliver L rows of S_k^0 in
// parallel) follows the reference structure; the register arrangement,
// the valid signal and the reset are this design's choices.
module register_unit #(
  parameter int unsigned L    = fir_mcm_pkg::BLOCK_L,
  parameter int unsigned IN_W = fir_mcm_pkg::IN_W
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] x_blk [L],
  output logic                   s_valid,
  output logic signed [IN_W-1:0] s     [2*L-1]
);

  always_ff @(posedge clk) begin
    if (rst) begin
      s_valid <= 1'b0;
      for (int d = 0; d < 2*L-1; d++) s[d] <= '0;
    end else begin
      s_valid <= in_valid;
      if (in_valid) begin
        // The newest L-1 samples of the current contents become history.
        for (int d = L; d < 2*L-1; d++) s[d] <= s[d-L];
        for (int i = 0; i < L; i++)     s[i] <= x_blk[i];
      end
    end
  end

endmodule

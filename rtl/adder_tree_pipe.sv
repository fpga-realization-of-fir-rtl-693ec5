// adder_tree_pipe: pipelined binary adder tree.
//
// Adds N_IN signed W-bit operands. The operands are padded with zeros to the
// next power of two and summed pairwise, one tree level per clock, so the sum
// appears $clog2(N_IN) clocks after the operands (at once, without a
// register, when N_IN is 1). Every level register loads only when the valid
// bit travelling with it is set; sum_valid marks the clock on which sum holds
// a new result. The caller sizes W so the sum cannot overflow.
module adder_tree_pipe #(
  parameter int unsigned N_IN = fir_mcm_pkg::BLOCK_L,
  parameter int unsigned W    = 20
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] op [N_IN],
  output logic                sum_valid,
  output logic signed [W-1:0] sum
);

  localparam int unsigned LEVELS = $clog2(N_IN);
  localparam int unsigned WIDTH0 = 2**LEVELS;

  // lvl[k] holds WIDTH0 >> k partial sums; lvl[0] is the padded input.
  logic signed [W-1:0] lvl [LEVELS+1][WIDTH0];
  logic                vld [LEVELS+1];

  always_comb begin
    for (int n = 0; n < WIDTH0; n++) lvl[0][n] = (n < N_IN) ? op[n] : '0;
    vld[0] = in_valid;
  end

  for (genvar k = 0; k < LEVELS; k++) begin : g_level
    always_ff @(posedge clk) begin
      if (rst) begin
        vld[k+1] <= 1'b0;
        for (int n = 0; n < WIDTH0; n++) lvl[k+1][n] <= '0;
      end else begin
        vld[k+1] <= vld[k];
        if (vld[k]) begin
          for (int n = 0; n < (WIDTH0 >> (k+1)); n++)
            lvl[k+1][n] <= lvl[k][2*n] + lvl[k][2*n+1];
        end
      end
    end
  end

  assign sum       = lvl[LEVELS][0];
  assign sum_valid = vld[LEVELS];

endmodule

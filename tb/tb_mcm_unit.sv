// tb_mcm_unit: self-checking test of mcm_unit.
//
// Drives random samples and coefficient groups, including the extreme
// two's-complement values, and compares every registered product with the
// ordinary product s[i+j] * c[j] worked out in the testbench. Checks the
// one-clock latency and that the products hold when s_valid is low.
module tb_mcm_unit;
  localparam int unsigned L      = 4;
  localparam int unsigned IN_W   = 8;
  localparam int unsigned COEF_W = 8;
  localparam int unsigned P_W    = IN_W + COEF_W;
  localparam int unsigned NVEC   = 2000;

  logic clk = 1'b0;
  logic rst;
  logic s_valid;
  logic signed [IN_W-1:0]   s    [2*L-1];
  logic signed [COEF_W-1:0] coef [L];
  logic p_valid;
  logic signed [P_W-1:0]    prod [L][L];

  int checks = 0, failures = 0;

  mcm_unit #(.L(L), .IN_W(IN_W), .COEF_W(COEF_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [IN_W-1:0] pick_sample();
    case ($urandom_range(0, 7))
      0: return {1'b1, {(IN_W-1){1'b0}}};   // most negative
      1: return {1'b0, {(IN_W-1){1'b1}}};   // most positive
      2: return '1;                         // -1
      default: return IN_W'($urandom);
    endcase
  endfunction

  function automatic logic signed [COEF_W-1:0] pick_coef();
    case ($urandom_range(0, 7))
      0: return {1'b1, {(COEF_W-1){1'b0}}};
      1: return {1'b0, {(COEF_W-1){1'b1}}};
      2: return '0;
      3: return COEF_W'(8'h55);              // alternating bits
      default: return COEF_W'($urandom);
    endcase
  endfunction

  logic signed [P_W-1:0] expect_p [L][L];
  logic signed [P_W-1:0] held     [L][L];

  initial begin
    rst = 1'b1; s_valid = 1'b0;
    foreach (s[d]) s[d] = '0;
    foreach (coef[j]) coef[j] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < NVEC; n++) begin
      bit v;
      v = ($urandom_range(0, 9) < 8);
      foreach (s[d]) s[d] = pick_sample();
      foreach (coef[j]) coef[j] = pick_coef();
      s_valid = v;
      for (int i = 0; i < L; i++)
        for (int j = 0; j < L; j++)
          expect_p[i][j] = P_W'(s[i+j]) * P_W'(coef[j]);
      held = prod;
      @(posedge clk); #1;
      checks++;
      if (p_valid !== v) begin failures++; $display("p_valid=%0b expected %0b", p_valid, v); end
      for (int i = 0; i < L; i++)
        for (int j = 0; j < L; j++) begin
          checks++;
          if (prod[i][j] !== (v ? expect_p[i][j] : held[i][j])) begin
            failures++;
            if (failures < 10)
              $display("prod[%0d][%0d]=%0d expected %0d (s=%0d c=%0d)", i, j, prod[i][j],
                       v ? expect_p[i][j] : held[i][j], s[i+j], coef[j]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_csd_recode: exhaustive self-checking test of csd_recode.
//
// For every COEF_W-bit coefficient it checks that the signed digits add back
// up to the coefficient, that no position holds both a +1 and a -1, and that
// no two adjacent positions are non-zero (the canonical form, which has the
// fewest non-zero digits and so the fewest adders per product).
module tb_csd_recode;
  localparam int unsigned COEF_W = 8;

  logic signed [COEF_W-1:0] c;
  logic        [COEF_W:0]   pos, neg;

  int checks = 0, failures = 0;

  csd_recode #(.COEF_W(COEF_W)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int value;
    logic [COEF_W:0] nz;
    for (int k = 0; k < (1 << COEF_W); k++) begin
      c = COEF_W'(k);
      #1;
      value = 0;
      for (int b = 0; b <= COEF_W; b++) value += (int'(pos[b]) - int'(neg[b])) * (1 << b);
      nz = pos | neg;
      checks++;
      if (value != int'(c)) begin
        failures++;
        $display("c=%0d: digits give %0d", c, value);
      end
      checks++;
      if ((pos & neg) != '0) begin failures++; $display("c=%0d: +1 and -1 in one position", c); end
      checks++;
      if ((nz & (nz >> 1)) != '0) begin failures++; $display("c=%0d: adjacent non-zero digits", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

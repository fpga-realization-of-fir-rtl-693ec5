// csd_recode: canonical signed-digit (non-adjacent form) recoding of one
// coefficient.
//
// The coefficient c (two's complement, COEF_W bits) is rewritten as
//   c = sum_b ( pos[b] - neg[b] ) * 2^b,  b = 0 .. COEF_W,
// with no two adjacent non-zero digits. A product x*c then needs one adder or
// subtracter per non-zero digit, and the MCM unit forms it from left shifts
// of x and -x only. The recoding runs bit-serially from the least
// significant end: an odd remainder gives digit +1 when it is 1 mod 4 and
// -1 when it is 3 mod 4, and the remainder is corrected and halved.
//
// The module is combinational. For a fixed filter the coefficient is a
// constant and the whole recoder folds away, leaving the digit pattern
// that selects which shifted terms the MCM unit adds or subtracts. The
// recoding itself is this design's choice of how to turn a coefficient
// into shifts, additions and subtractions.
module csd_recode #(
  parameter int unsigned COEF_W = fir_mcm_pkg::COEF_W
) (
  input  logic signed [COEF_W-1:0] c,
  output logic        [COEF_W:0]   pos,
  output logic        [COEF_W:0]   neg
);

  always_comb begin
    logic signed [COEF_W+1:0] v;
    v   = (COEF_W+2)'(c);
    pos = '0;
    neg = '0;
    for (int b = 0; b <= COEF_W; b++) begin
      if (v[0]) begin
        if (v[1]) begin
          neg[b] = 1'b1;
          v      = v + (COEF_W+2)'(1);
        end else begin
          pos[b] = 1'b1;
          v      = v - (COEF_W+2)'(1);
        end
      end
      v = v >>> 1;
    end
  end

endmodule

// tb_register_unit: self-checking test of register_unit.
//
// Feeds random sample blocks with random gaps (in_valid low) and compares the
// 2L-1 presented samples, one clock after each block, with a reference
// history of every sample taken so far (zero before the first one). Also
// checks that s_valid follows in_valid by exactly one clock and that a gap
// leaves the outputs unchanged.
module tb_register_unit;
  localparam int unsigned L    = 4;
  localparam int unsigned IN_W = 8;
  localparam int unsigned NBLK = 400;

  logic clk = 1'b0;
  logic rst;
  logic in_valid;
  logic signed [IN_W-1:0] x_blk [L];
  logic s_valid;
  logic signed [IN_W-1:0] s [2*L-1];

  int checks = 0, failures = 0, gaps = 0;

  register_unit #(.L(L), .IN_W(IN_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference history, newest sample first; starts as zeros.
  logic signed [IN_W-1:0] hist [2*L-1];
  logic signed [IN_W-1:0] held [2*L-1];

  task automatic check_s(string what);
    for (int d = 0; d < 2*L-1; d++) begin
      checks++;
      if (s[d] !== hist[d]) begin
        failures++;
        if (failures < 10) $display("%s: s[%0d]=%0d expected %0d", what, d, s[d], hist[d]);
      end
    end
  endtask

  initial begin
    rst = 1'b1; in_valid = 1'b0;
    foreach (x_blk[i]) x_blk[i] = '0;
    foreach (hist[d]) hist[d] = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    checks++; if (s_valid !== 1'b0) failures++;
    check_s("after reset");
    for (int b = 0; b < NBLK; b++) begin
      bit v;
      v = ($urandom_range(0, 9) < 7);
      in_valid = v;
      foreach (x_blk[i]) x_blk[i] = IN_W'($urandom);
      if (!v) held = s;
      @(posedge clk); #1;
      checks++;
      if (s_valid !== v) begin failures++; $display("s_valid=%0b expected %0b", s_valid, v); end
      if (v) begin
        for (int d = 2*L-2; d >= L; d--) hist[d] = hist[d-L];
        for (int i = 0; i < L; i++) hist[i] = x_blk[i];
        check_s("block");
      end else begin
        gaps++;
        for (int d = 0; d < 2*L-1; d++) begin
          checks++;
          if (s[d] !== held[d]) failures++;
        end
      end
    end
    if (gaps == 0) begin failures++; $display("no gap exercised"); end
    $display("gaps=%0d", gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

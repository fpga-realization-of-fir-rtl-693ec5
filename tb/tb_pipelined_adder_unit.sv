// tb_pipelined_adder_unit: self-checking test of pipelined_adder_unit.
//
// Drives random product terms for M coefficient groups, with random gaps.
// The reference forms each group's row sums r^m for every valid block and
// adds r^m of the block m valid blocks back (zero before the first block),
// which is the block FIR output the delay line must produce. The output is
// checked $clog2(L)+1 clocks after its input, on every clock, valid or not.
module tb_pipelined_adder_unit;
  localparam int unsigned L     = 4;
  localparam int unsigned M     = 4;
  localparam int unsigned P_W   = 16;
  localparam int unsigned OUT_W = 20;
  localparam int unsigned LAT   = $clog2(L) + 1;
  localparam int unsigned NCYC  = 1500;

  logic clk = 1'b0;
  logic rst;
  logic p_valid;
  logic signed [P_W-1:0]   prod  [M][L][L];
  logic y_valid;
  logic signed [OUT_W-1:0] y_blk [L];

  int checks = 0, failures = 0, gaps = 0;

  pipelined_adder_unit #(.L(L), .M(M), .P_W(P_W), .OUT_W(OUT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Row sums of the last M valid blocks: rh[0] is the newest.
  longint rh [M][M][L];
  bit      exp_v [NCYC + LAT];
  longint  exp_y [NCYC + LAT][L];

  initial begin
    bit v;
    int e;
    rst = 1'b1; p_valid = 1'b0;
    foreach (prod[m, i, j]) prod[m][i][j] = '0;
    foreach (rh[a, m, i]) rh[a][m][i] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int c = 0; c < NCYC + LAT; c++) begin
      v = (c < NCYC) && ($urandom_range(0, 9) < 7);
      if (c < NCYC && !v) gaps++;
      p_valid = v;
      foreach (prod[m, i, j]) prod[m][i][j] = P_W'($urandom);
      exp_v[c] = v;
      if (v) begin
        for (int a = M-1; a > 0; a--) rh[a] = rh[a-1];
        for (int m = 0; m < M; m++)
          for (int i = 0; i < L; i++) begin
            rh[0][m][i] = 0;
            for (int j = 0; j < L; j++) rh[0][m][i] += longint'(prod[m][i][j]);
          end
        for (int i = 0; i < L; i++) begin
          exp_y[c][i] = 0;
          for (int m = 0; m < M; m++) exp_y[c][i] += rh[m][m][i];
        end
      end
      @(posedge clk); #1;
      if (c + 1 >= LAT) begin
        e = c + 1 - LAT;
        checks++;
        if (y_valid !== exp_v[e]) begin
          failures++;
          $display("cycle %0d: y_valid=%0b expected %0b", e, y_valid, exp_v[e]);
        end
        if (exp_v[e])
          for (int i = 0; i < L; i++) begin
            checks++;
            if (longint'(y_blk[i]) != exp_y[e][i]) begin
              failures++;
              if (failures < 10) $display("cycle %0d: y[%0d]=%0d expected %0d", e, i, y_blk[i], exp_y[e][i]);
            end
          end
      end
    end
    if (gaps == 0) begin failures++; $display("no gap exercised"); end
    $display("gaps=%0d", gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

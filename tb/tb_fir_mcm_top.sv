// tb_fir_mcm_top: end-to-end test of the block FIR filter at its default
// size (16 taps, 4 samples per clock, 8-bit samples and coefficients).
//
// Each run resets the filter, fixes a coefficient set and streams random
// sample blocks, with random gaps, through it. The reference is the direct
// convolution y(n) = sum_t h(t) x(n-t) over the samples taken since the reset.
// Every clock the outputs are compared with the block that went in LATENCY
// clocks earlier. The runs cover:
//   - the figure coefficient set (h9..h15 from the reference waveform,
//     h0..h8 chosen here), random sets and an all-extreme set that drives
//     the output to its full-scale value;
//   - gaps in the input (in_valid low) and long back-to-back stretches,
//     where one output block must appear on every clock;
//   - a reset between runs, after which the history must read as zero.
// Each of these is counted, and one that never happens is a failure.
module tb_fir_mcm_top;
  localparam int unsigned N       = fir_mcm_pkg::N_TAPS;
  localparam int unsigned L       = fir_mcm_pkg::BLOCK_L;
  localparam int unsigned IN_W    = fir_mcm_pkg::IN_W;
  localparam int unsigned COEF_W  = fir_mcm_pkg::COEF_W;
  localparam int unsigned OUT_W   = fir_mcm_pkg::sum_width(IN_W, COEF_W, N);
  localparam int unsigned LATENCY = 3 + $clog2(L);
  localparam int unsigned NRUNS   = 6;
  localparam int unsigned NCYC    = 400;   // clocks per run
  localparam int unsigned MAXS    = NCYC * L;

  logic clk = 1'b0;
  logic rst;
  logic signed [COEF_W-1:0] coef  [N];
  logic in_valid;
  logic signed [IN_W-1:0]   x_blk [L];
  logic out_valid;
  logic signed [OUT_W-1:0]  y_blk [L];

  int checks = 0, failures = 0;
  int n_gaps = 0, n_resets = 0, n_full_scale = 0, longest_burst = 0, n_fig_runs = 0;

  fir_mcm_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NRUNS * (NCYC + 50) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // h9..h15 as printed (hexadecimal) on the reference waveform.
  localparam logic [7:0] FIG_H9_15 [7] = '{8'h10, 8'h11, 8'h14, 8'h15, 8'h20, 8'h12, 8'h22};

  int     h   [N];
  int     xs  [MAXS];          // samples taken since reset, oldest first
  int     nx;                  // how many
  bit     exp_v [NCYC + LATENCY];
  longint exp_y [NCYC + LATENCY][L];

  function automatic longint ref_y(int n);
    longint acc = 0;
    for (int t = 0; t < N; t++)
      if (n - t >= 0) acc += longint'(h[t]) * longint'(xs[n - t]);
    return acc;
  endfunction

  task automatic run(int kind);
    bit v;
    int e, burst, sample;
    // Coefficient set.
    for (int t = 0; t < N; t++) begin
      case (kind)
        0: h[t] = (t >= 9) ? int'(FIG_H9_15[t-9]) : 2*t + 1;
        1: h[t] = -(1 << (COEF_W-1));
        default: h[t] = int'($signed(COEF_W'($urandom)));
      endcase
      coef[t] = COEF_W'(h[t]);
    end
    if (kind == 0) n_fig_runs++;
    // Reset clears the history.
    rst = 1'b1; in_valid = 1'b0;
    @(posedge clk); #1;
    rst = 1'b0;
    n_resets++;
    nx = 0; burst = 0;
    for (int c = 0; c < NCYC + LATENCY; c++) begin
      // Bursts of valid blocks with occasional gaps; the second half of the
      // run is gap-free.
      v = (c < NCYC) && ((c >= NCYC/2) || ($urandom_range(0, 9) < 7));
      in_valid = v;
      exp_v[c] = v;
      if (v) begin
        // Samples enter oldest first: x_blk[L-1] is the oldest of the block.
        for (int i = L-1; i >= 0; i--) begin
          sample = (kind == 1) ? -(1 << (IN_W-1)) : int'($signed(IN_W'($urandom)));
          x_blk[i] = IN_W'(sample);
          xs[nx] = sample;
          nx++;
        end
        for (int i = 0; i < L; i++) exp_y[c][i] = ref_y(nx - 1 - i);
        burst++;
        if (burst > longest_burst) longest_burst = burst;
      end else begin
        foreach (x_blk[i]) x_blk[i] = IN_W'($urandom);
        if (c < NCYC) n_gaps++;
        burst = 0;
      end
      @(posedge clk); #1;
      if (c + 1 >= LATENCY) begin
        e = c + 1 - LATENCY;
        checks++;
        if (out_valid !== exp_v[e]) begin
          failures++;
          $display("run %0d clock %0d: out_valid=%0b expected %0b", kind, e, out_valid, exp_v[e]);
        end
        if (exp_v[e])
          for (int i = 0; i < L; i++) begin
            checks++;
            if (longint'(y_blk[i]) != exp_y[e][i]) begin
              failures++;
              if (failures < 10)
                $display("run %0d clock %0d: y[%0d]=%0d expected %0d", kind, e, i, y_blk[i], exp_y[e][i]);
            end
            if (exp_y[e][i] == longint'(N) << (IN_W + COEF_W - 2)) n_full_scale++;
          end
      end
    end
  endtask

  initial begin
    rst = 1'b1; in_valid = 1'b0;
    foreach (x_blk[i]) x_blk[i] = '0;
    foreach (coef[t]) coef[t] = '0;
    repeat (2) @(posedge clk);
    run(0);
    run(1);
    for (int r = 2; r < NRUNS; r++) run(r);
    $display("runs=%0d resets=%0d gaps=%0d longest_burst=%0d full_scale_outputs=%0d",
             NRUNS, n_resets, n_gaps, longest_burst, n_full_scale);
    if (n_fig_runs == 0)           begin failures++; $display("figure coefficients never used"); end
    if (n_gaps == 0)               begin failures++; $display("no input gap"); end
    if (n_resets < 2)              begin failures++; $display("no reset between runs"); end
    if (longest_burst < NCYC/2)    begin failures++; $display("no back-to-back stretch"); end
    if (n_full_scale == 0)         begin failures++; $display("full-scale output never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

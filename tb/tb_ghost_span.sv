// tb_ghost_span: the deghosting filter at its full size against the widest
// echo span it is meant to cancel. The channel adds to the main signal a
// precursor echo of 0.1 arriving 88 samples early (6.15 us at 14.318 MHz),
// a post echo of 0.25 arriving 420 samples late (29.3 us) and a post echo of
// 0.5 (-6 dB) arriving 596 samples late (41.6 us).
// Section plan: the main path is delayed by 88; FIR section 0 at delay 0
// covers the 88 samples ahead of the main signal. The last section is split
// into two floating 36-tap halves: the lower half at delay 560 covers
// 562..597 samples behind the output (the 596 echo), the upper half at delay
// 400 covers 402..437 (the 420 echo). IIR sections 5 (delay 300) and 6
// (delay 474) cover the cross terms of the precursor with the two post echoes
// (332 and 508 samples late). The filter adapts against the echo-free signal (binary random video
// of +/-120) with the threshold/accumulation update. Checks: the FIR tap at
// the precursor settles near -0.1 (-13/128), the IIR tap at the long echo
// near -0.5 (-64/128), the one at the 420 echo near -0.25 (-32/128), the
// mean |error| falls by at least a factor of 10, and at the end the mean
// |error| is below 2 % of the main amplitude (-34 dB; the run reaches about
// -37 dB). Adaptation runs first with a
// short accumulator limit (Fast) and then with the longest (Slow), which
// reduces the one-LSB dither of coefficients that should be zero.
// The stimulus, the reference model and the expected values are this
// testbench's own; the block's behaviour under test is described in its
// module header. A watchdog ends the run with a failure if it hangs.
module tb_ghost_span;
  import gc_pkg::*;
  localparam int NS = NSEC, NT = NTAP, ACCW = 8;
  localparam int PRE = 88, MID = 420, POST = 596, N = 120000;
  logic clk = 0, rst_n = 0;
  logic signed [DW-1:0] x, ref_s, y;
  sec_cfg_t sec_cfg [NS];
  logic [DLY_AW-1:0] main_dly, split_dly;
  logic split;
  logic err_en, adapt_en, coef_clr, coef_we, sat;
  logic [DW-1:0] th_e;
  logic [DW-2:0] th_y;
  logic [ACCW-2:0] acc_lim;
  logic [2:0] coef_sec;
  logic [6:0] coef_idx;
  logic signed [CW-1:0] coef_wd, coef_rd;
  logic signed [DW:0] err;
  int checks = 0, failures = 0;

  gc_filter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m [N + PRE];

  function automatic int at(int k);
    return (k >= 0 && k < N + PRE) ? m[k] : 0;
  endfunction

  initial begin
    int e0, e1;
    e0 = 0; e1 = 0;
    split = 1'b1; split_dly = 10'd400;
    x = 0; ref_s = 0; main_dly = DLY_AW'(PRE); err_en = 0; adapt_en = 0; coef_clr = 0;
    coef_we = 0; th_e = 10'd6; th_y = 9'd8; acc_lim = 7'd12; coef_sec = 0; coef_idx = 0; coef_wd = 0;
    for (int q = 0; q < NS; q++) sec_cfg[q] = '{en: 1'b0, iir: 1'b0, dly: '0};
    sec_cfg[0] = '{en: 1'b1, iir: 1'b0, dly: 10'd0};
    sec_cfg[5] = '{en: 1'b1, iir: 1'b1, dly: 10'd300};
    sec_cfg[6] = '{en: 1'b1, iir: 1'b1, dly: 10'd474};
    sec_cfg[7] = '{en: 1'b1, iir: 1'b1, dly: 10'd560};
    for (int k = 0; k < N + PRE; k++) m[k] = $urandom_range(0, 1) ? 120 : -120;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); coef_clr = 1;
    @(negedge clk); coef_clr = 0;
    repeat (1100) @(negedge clk);
    err_en = 1;
    for (int i = 0; i < N; i++) begin
      int v;
      if (i == 4000) adapt_en = 1;        // Fast: short accumulator limit
      if (i == N / 2) acc_lim = 7'd127;   // Slow: long limit, less coefficient dither
      v = at(i) + at(i + PRE) / 10 + at(i - MID) / 4 + at(i - POST) / 2;
      x = DW'(v);
      ref_s = DW'(at(i - PRE - 1));
      #1;
      if (i < 4000) e0 += (err < 0 ? -int'(err) : int'(err));
      if (i >= N - 4000) e1 += (err < 0 ? -int'(err) : int'(err));
      @(negedge clk);
    end
    adapt_en = 0; err_en = 0;
    coef_sec = 3'd0; coef_idx = 7'd0; #1;
    $display("precursor tap c0[0] = %0d", coef_rd);
    checks++;
    if (coef_rd > -10 || coef_rd < -16) begin failures++; $display("precursor tap not near -0.1"); end
    // IIR tap j reads y[n-dly-2-j]; the echo is POST-PRE-1 samples behind y's sample
    coef_sec = 3'd7; coef_idx = 7'(POST - 2 - 560); #1;
    $display("post-echo tap c7[%0d] = %0d", POST - 2 - 560, coef_rd);
    checks++;
    if (coef_rd > -56 || coef_rd < -72) begin failures++; $display("post-echo tap not near -0.5"); end
    coef_sec = 3'd7; coef_idx = 7'(NT / 2 + MID - 2 - 400); #1;
    $display("mid-echo tap c7[%0d] = %0d", NT / 2 + MID - 2 - 400, coef_rd);
    checks++;
    if (coef_rd > -26 || coef_rd < -38) begin failures++; $display("mid-echo tap not near -0.25"); end
    $display("sum |e| over 4000 samples: start %0d end %0d", e0, e1);
    checks++;
    if (!(e1 * 10 < e0)) begin failures++; $display("error not reduced by 20 dB"); end
    checks++;
    if (!(e1 * 1000 < 20 * 120 * 4000)) begin failures++; $display("residue above 2 %% of the main signal"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gc_filter: checks the 8 x 72-tap filter against a sample-exact model.
// Phase A: two FIR sections (delays 0 and 72, covering 88 precursor and 56
// postcursor taps around a main path delayed by 88) and two IIR sections
// (delays 20 and 300) with random coefficients; random video; the output is
// compared every clock with the model's recursion, and the model's result
// is also checked to place the main sample main_dly+2 clocks after the
// input. Phase B: coefficients cleared, the input has a 0.5 ghost 40
// samples after the main signal, and LMS adaptation of a precursor FIR section
// and an IIR section against the ghost-free signal must bring the IIR tap
// at the ghost delay to about -0.5 and cut the mean |error| to under a
// quarter of its starting value.
// The stimulus, the reference model and the expected values are this
// testbench's own; the block's behaviour under test is described in its
// module header. A watchdog ends the run with a failure if it hangs.
module tb_gc_filter;
  import gc_pkg::*;
  localparam int NS = 8, NT = 72, ACCW = 8;
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

  gc_filter #(.NS(NS), .NT(NT), .ACCW(ACCW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int H = 8192;
  int xh [H];
  int yh [H];
  int c [NS][NT];
  int n;

  function automatic int clip(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  function automatic int model(int k);
    int tot, s;
    tot = (k - main_dly - 1 >= 0 ? xh[k - main_dly - 1] : 0) * 128;
    for (int q = 0; q < NS; q++) begin
      if (!sec_cfg[q].en) continue;
      s = 0;
      for (int j = 0; j < NT; j++) begin
        int idx, d, jj;
        // a split last section: its upper half has its own delay
        if (split && q == NS - 1 && j >= NT / 2) begin d = int'(split_dly); jj = j - NT / 2; end
        else begin d = int'(sec_cfg[q].dly); jj = j; end
        if (sec_cfg[q].iir) begin
          idx = k - d - 2 - jj;
          s += c[q][j] * (idx >= 0 ? yh[idx] : 0);
        end else begin
          idx = k - d - 1 - jj;
          s += c[q][j] * (idx >= 0 ? xh[idx] : 0);
        end
      end
      tot += clip(s, -131072, 131071);
    end
    tot = clip(tot, -131072, 131071);
    return clip((tot + 64) >>> 7, -512, 511);
  endfunction

  initial begin
    int pos_main;
    x = 0; ref_s = 0; main_dly = 10'd88; err_en = 0; adapt_en = 0; coef_clr = 0;
    coef_we = 0; th_e = 0; th_y = 0; acc_lim = 4; coef_sec = 0; coef_idx = 0; coef_wd = 0;
    for (int q = 0; q < NS; q++) sec_cfg[q] = '{en: 1'b0, iir: 1'b0, dly: '0};
    sec_cfg[0] = '{en: 1'b1, iir: 1'b0, dly: 10'd0};
    sec_cfg[1] = '{en: 1'b1, iir: 1'b0, dly: 10'd72};
    sec_cfg[2] = '{en: 1'b1, iir: 1'b1, dly: 10'd20};
    sec_cfg[5] = '{en: 1'b1, iir: 1'b1, dly: 10'd300};
    // last section split: halves at delays 400 and 650
    sec_cfg[7] = '{en: 1'b1, iir: 1'b1, dly: 10'd400};
    split = 1'b1; split_dly = 10'd650;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (1100) @(posedge clk);
    // load coefficients (small for IIR to stay stable)
    for (int q = 0; q < NS; q++)
      for (int j = 0; j < NT; j++) begin
        @(negedge clk);
        c[q][j] = sec_cfg[q].iir ? int'($urandom_range(0, 6)) - 3 : int'($urandom_range(0, 30)) - 15;
        coef_we = 1; coef_sec = 3'(q); coef_idx = 7'(j); coef_wd = CW'(c[q][j]);
      end
    @(negedge clk); coef_we = 0;
    // coefficient readback
    for (int q = 0; q < NS; q += 3) begin
      coef_sec = 3'(q); coef_idx = 7'd17; #1;
      checks++;
      if (coef_rd !== CW'(c[q][17])) begin failures++; $display("readback %0d", q); end
    end
    // ---- phase A ----
    n = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      xh[n] = int'($urandom_range(0, 400)) - 200;
      if (i == 1500) xh[n] = 300;   // marker
      x = DW'(xh[n]);
      yh[n] = model(n);
      @(posedge clk); #1;
      checks++;
      if (y !== DW'(yh[n])) begin
        failures++;
        if (failures < 10) $display("A n=%0d y=%0d exp=%0d", n, y, yh[n]);
      end
      n++;
    end
    // ---- phase B: adaptation ----
    @(negedge clk); coef_clr = 1; x = 0;
    @(negedge clk); coef_clr = 0;
    for (int q = 0; q < NS; q++) sec_cfg[q].en = 1'b0;
    split = 1'b0;
    sec_cfg[0] = '{en: 1'b1, iir: 1'b0, dly: 10'd0};
    sec_cfg[2] = '{en: 1'b1, iir: 1'b1, dly: 10'd0};
    repeat (1100) @(negedge clk);
    th_e = 10'd20; th_y = 9'd8; acc_lim = 7'd8; adapt_en = 1; err_en = 1;
    begin
      int r [H];
      int e0 = 0, e1 = 0, k = 0;
      for (int i = 0; i < 40000; i++) begin
        int m;
        m = i % H;
        r[m] = (($urandom_range(0, 1)) ? 120 : -120);
        x = DW'(r[m] + (i >= 40 ? r[(i - 40) % H] / 2 : 0));
        // desired: ghost-free signal, aligned with the main path (89 samples)
        ref_s = DW'(i >= 89 ? r[(i - 89) % H] : 0);
        #1;
        if (i >= 130 && i < 1130) e0 += (err < 0 ? -int'(err) : int'(err));
        if (i >= 39000) e1 += (err < 0 ? -int'(err) : int'(err));
        @(negedge clk);
      end
      coef_sec = 3'd2; coef_idx = 7'd38; #1 $display("c2[38]=%0d", coef_rd);
      checks++;
      if (coef_rd > -56 || coef_rd < -72) begin failures++; $display("IIR ghost tap did not reach -0.5"); end
      $display("mean |e| start %0d end %0d (x1000)", e0, e1);
      checks++;
      if (!(e1 * 4 < e0)) begin failures++; $display("adaptation did not converge"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gc_top: end-to-end run of the ghost canceller at its default sizes.
//
// The testbench synthesizes composite video: 910-sample lines, fields of
// 110 lines (three lines of broad vertical pulses, then lines with a
// 67-sample sync and static picture content) and, from field GCR_FROM on, a
// 768-sample pseudo-random reference on line 15 (numbered 19 by the
// canceller) whose polarity follows an 8-field sequence. The channel adds a
// 0.15 precursor echo 10 samples early and a 0.3 echo 20 samples late.
// Sections: FIR at delays 0 and 72 around a main path delayed by 88, IIR at
// delay 0, and the last section split into two floating IIR halves (delays
// 300 and 500), whose use is counted.
// Timeline and checks:
//  - no GCR at first: the detector must report none, the canceller stays
//    bypassed and the output must equal the offset/gain of the delayed
//    input sample for sample;
//  - GCR present: detection (with the two echoes found as the next
//    correlation peaks at +20 and -10 samples), Fast mode, Slow mode; the GCR-line error sum
//    must fall to under a quarter of its first value, and on picture lines
//    the output must be much closer to the echo-free video than the bypass
//    output was;
//  - a forced instability threshold causes a re-initialisation, a channel
//    change returns to bypass and the GCR is found again, force_bypass and
//    the ADC input select are exercised; full-scale picture content makes the
//    filter output saturate.
// Each mechanism is counted and one that never happens is a failure.
// The stimulus, the reference model and the expected values are this
// testbench's own; the block's behaviour under test is described in its
// module header. A watchdog ends the run with a failure if it hangs.
module tb_gc_top;
  import gc_pkg::*;
  localparam int LL = 910, NL = 110, FL = LL * NL;
  localparam int WS = 130, WLEN = 768, GLINE = 15;
  localparam int GCR_FROM = 9;
  localparam int BLANK = 512, SYNC = 226;
  
  bit boost = 0;

  logic clk = 0, rst_n = 0;
  gc_cfg_t cfg;
  logic chan_change;
  logic [DW-1:0] adc_data, dig_in, dout, nco_dout;
  logic ref_we;
  logic [9:0] ref_waddr;
  logic signed [DW-1:0] ref_wdata;
  logic coef_we;
  logic [2:0] coef_sec;
  logic [6:0] coef_idx;
  logic signed [CW-1:0] coef_wd, coef_rd;
  logic [63:0] dac_cells, nco_cells;
  logic [3:0] dac_bin, nco_bin;
  logic clamp, clamp_ref, gcr_present, filt_sat, hs, vs, field, det_busy;
  adapt_mode_e mode;
  logic [30:0] gcr_peak;
  logic [6:0] gcr_peak_lag;
  logic [30:0] gcr_pk_mag [4];
  logic [6:0] gcr_pk_lag [4];
  int n_echo_ok = 0;
  int n_split = 0;   // clocks in which the floating upper half is fed and in use
  always @(negedge clk) if (rst_n && cfg.split && mode != M_BYPASS && dut.u_filt.sec_in2[7] != '0) n_split++;
  logic [7:0] reinit_cnt;
  logic [23:0] line_err;
  logic [9:0] line;

  gc_top dut (.*);

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // ---------------- stimulus model ----------------
  int refw [WLEN];
  bit gcr_on = 0;
  int pol_seq_tb = 8'b0101_1010;

  function automatic int clean(longint k);
    int f, l, s;
    if (k < 0) return BLANK;
    f = int'(k / FL); l = int'((k % FL) / LL); s = int'(k % LL);
    if (l < 3) return ((s < 388) || (s >= 455 && s < 843)) ? SYNC : BLANK;
    if (s < 67) return SYNC;
    if (s < WS) return BLANK;
    if (l == GLINE) begin
      if (gcr_on && f >= GCR_FROM && s > WS && s <= WS + WLEN)
        return BLANK + (pol_seq_tb[(f + 1) % 8] ? refw[s - WS - 1] : -refw[s - WS - 1]);
      return BLANK;
    end
    if (boost) return ((s / 32) % 2) ? 1023 : 300;
    return BLANK + 40 + ((s * 3 + l * 11) % 160) + ((s / 64) % 2) * 120;
  endfunction

  function automatic int ghosted(longint k);
    int v;
    v = clean(k) + (3 * (clean(k + 10) - BLANK)) / 20 + (3 * (clean(k - 20) - BLANK)) / 10;
    return v < 0 ? 0 : (v > 1023 ? 1023 : v);
  endfunction

  longint k = 0;   // sample being driven
  int xin [longint];

  // ---------------- mechanism counters ----------------
  int n_bypass = 0, n_fast = 0, n_slow = 0, n_reinit = 0, n_det_none = 0, n_det_found = 0;
  int n_chan = 0, n_force = 0, n_adc = 0, n_sat = 0, n_clamp = 0, n_nco_edges = 0, n_vs = 0;
  adapt_mode_e last_mode = M_BYPASS;
  logic last_nco = 0;

  always @(negedge clk) if (rst_n) begin
    if (mode != last_mode) begin
      if (mode == M_FAST) n_fast++;
      if (mode == M_SLOW) n_slow++;
      if (mode == M_BYPASS) n_bypass++;
      $display("[field %0d line %0d] mode %s  line_err %0d", k / FL, (k % FL) / LL, mode.name(), line_err);
      last_mode = mode;
    end
    if (filt_sat) n_sat++;
    if (clamp) n_clamp++;
    if (vs) n_vs++;
    if (nco_dout[9] && !last_nco) n_nco_edges++;
    last_nco = nco_dout[9];
  end

  int first_fast_err = -1;
  always @(negedge clk) if (rst_n && dut.e_end && mode == M_FAST && first_fast_err < 0)
    first_fast_err = int'(dut.u_ctrl.esum);

  always @(negedge clk) if (rst_n && dut.det_done) begin
    if (gcr_present) n_det_found++; else n_det_none++;
    $display("[field %0d] detection: present=%0d peak=%0d lag=%0d, next peaks at lags %0d %0d %0d", k / FL,
             gcr_present, gcr_peak, gcr_peak_lag, gcr_pk_lag[1], gcr_pk_lag[2], gcr_pk_lag[3]);
    // the echoes 20 samples late and 10 early give the next two peaks
    if (gcr_present) begin
      checks++;
      if (gcr_pk_lag[1] == gcr_peak_lag + 7'd20 && gcr_pk_lag[2] == gcr_peak_lag - 7'd10) n_echo_ok++;
      else begin failures++; $display("echo peaks not at the echo delays"); end
    end
  end

  initial begin
    repeat (10_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int LAT = 88 + 5;   // input sample to dout: main_dly + 5 clocks

  task automatic run_fields(int nf, int mode_chk);
    // mode_chk: 0 none, 1 bypass exactness, 2 measure deghost error
    for (int i = 0; i < nf * FL; i++) begin
      int v;
      @(negedge clk);
      v = ghosted(k);
      xin[k] = v;
      if (xin.exists(k - LAT - 2)) xin.delete(k - LAT - 2);
      if (cfg.in_sel) begin dig_in = DW'(v); adc_data = DW'(k); end
      else begin adc_data = DW'(v); dig_in = '0; end
      check_out(k);
      k++;
    end
  endtask

  // output checks, sample by sample, called with the sample being driven
  int chk_mode = 0;
  longint err_byp = 0, n_byp = 0, err_flt = 0, n_flt = 0;
  task automatic check_out(longint kk);
    longint src;
    int l, s;
    src = kk - LAT;
    if (src < 2 * FL) return;
    l = int'((src % FL) / LL); s = int'(src % LL);
    if (chk_mode == 1 && xin.exists(src)) begin
      int e;
      e = xin[src] - 500;
      e = e > 511 ? 511 : (e < -512 ? -512 : e);
      e = ((e + 500) * 128 + 64) >>> 7;
      e = e < 0 ? 0 : (e > 1023 ? 1023 : e);
      checks++;
      if (dout !== DW'(e)) begin
        failures++;
        if (failures < 10) $display("bypass out %0d expected %0d at %0d", dout, e, src);
      end
    end
    if (l >= 4 && l != GLINE && s >= WS && s < 880) begin
      int d;
      d = int'(dout) - clean(src);
      d = d < 0 ? -d : d;
      if (chk_mode == 1) begin err_byp += d; n_byp++; end
      if (chk_mode == 2) begin err_flt += d; n_flt++; end
    end
  endtask

  initial begin
    int first_err;
    cfg = '0;
    cfg.in_sel = 1'b1; cfg.in_level = 10'd500; cfg.main_dly = 10'd88;
    cfg.sec[0] = '{en: 1'b1, iir: 1'b0, dly: 10'd0};
    cfg.sec[1] = '{en: 1'b1, iir: 1'b0, dly: 10'd72};
    // one IIR section where the echoes are; the others stay unused
    cfg.sec[2] = '{en: 1'b1, iir: 1'b1, dly: 10'd0};
    for (int q = 3; q < 7; q++) cfg.sec[q] = '{en: 1'b0, iir: 1'b1, dly: 10'(72 * (q - 2))};
    // last section split into two floating halves, where the channel has no echo
    cfg.sec[7] = '{en: 1'b1, iir: 1'b1, dly: 10'd300};
    cfg.split = 1'b1; cfg.split_dly = 10'd500;
    cfg.th_e = 10'd8; cfg.th_y = 9'd20; cfg.acc_fast = 7'd32; cfg.acc_slow = 7'd100;
    cfg.conv_th = 24'd3000; cfg.unstab_th = 24'd200000; cfg.fast_lines = 8'd24;
    cfg.det_th = 31'd1000000; cfg.pol_seq = 8'(pol_seq_tb); cfg.ref_dc = 10'sd12;
    cfg.off_f = 10'sd500; cfg.gain_f = 8'd128; cfg.off_b = 10'sd500; cfg.gain_b = 8'd128;
    cfg.sync_th = 10'd350; cfg.gcr_line = 10'd19; cfg.win_start = 11'(WS);
    cfg.clamp_en = 1'b1; cfg.clamp_pos = 11'd80; cfg.clamp_len = 11'd30; cfg.clamp_sel = 1'b1;
    cfg.nco_freq = 24'd2000000; cfg.nco_k = 4'd6;
    chan_change = 0; ref_we = 0; ref_waddr = 0; ref_wdata = 0;
    coef_we = 0; coef_sec = 0; coef_idx = 0; coef_wd = 0; adc_data = 0; dig_in = 0;
    foreach (refw[i]) refw[i] = ($urandom_range(0, 1)) ? 100 : -100;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < WLEN; i++) begin
      @(negedge clk);
      ref_we = 1; ref_waddr = 10'(i); ref_wdata = DW'(refw[i]);
    end
    @(negedge clk); ref_we = 0;
    gcr_on = 1;
    // ---- no GCR: bypass ----
    run_fields(2, 0);
    chk_mode = 1;
    run_fields(GCR_FROM - 2, 1);
    chk_mode = 0;
    checks++;
    if (mode != M_BYPASS || n_det_none == 0) begin failures++; $display("not bypassed without GCR"); end
    // ---- GCR: detection and adaptation ----
    run_fields(9, 0);
    checks++;
    if (mode == M_BYPASS) begin failures++; $display("GCR not found"); end
    run_fields(40, 0);
    first_err = first_fast_err;
    $display("GCR line error: first %0d now %0d", first_err, line_err);
    checks++;
    if (!(int'(line_err) * 4 < first_err)) begin failures++; $display("no convergence"); end
    chk_mode = 2;
    run_fields(2, 0);
    chk_mode = 0;
    $display("mean |out - clean| bypass %0d/1000  filtered %0d/1000",
             err_byp * 1000 / (n_byp + 1), err_flt * 1000 / (n_flt + 1));
    checks++;
    if (!(err_flt * 3 * n_byp < err_byp * n_flt)) begin failures++; $display("picture not deghosted"); end
    // ---- forced bypass ----
    cfg.force_bypass = 1'b1; n_force++;
    run_fields(1, 0);
    cfg.force_bypass = 1'b0;
    // ---- instability: re-initialisation ----
    cfg.unstab_th = 24'd10;
    run_fields(1, 0);
    cfg.unstab_th = 24'd200000;
    n_reinit = int'(reinit_cnt);
    // ---- ADC input, high gain (saturation) ----
    cfg.in_sel = 1'b0; n_adc++; boost = 1;
    run_fields(1, 0);
    cfg.in_sel = 1'b1; boost = 0;
    // ---- channel change ----
    @(negedge clk); chan_change = 1; n_chan++;
    @(negedge clk); chan_change = 0;
    #1;
    checks++;
    if (mode != M_BYPASS) begin failures++; $display("channel change did not bypass"); end
    run_fields(10, 0);
    checks++;
    if (mode == M_BYPASS) begin failures++; $display("GCR not found after channel change"); end

    $display("mechanisms: bypass %0d fast %0d slow %0d reinit %0d det_none %0d det_found %0d chan %0d force %0d adc %0d sat %0d clamp %0d nco %0d vs %0d",
             n_bypass, n_fast, n_slow, n_reinit, n_det_none, n_det_found, n_chan, n_force, n_adc, n_sat, n_clamp, n_nco_edges, n_vs);
    $display("echo peaks found: %0d, floating half in use: %0d clocks", n_echo_ok, n_split);
    checks++;
    if (n_split < 1) failures++;
    checks += 13;
    if (n_bypass == 0) failures++;
    if (n_fast < 2) failures++;
    if (n_slow == 0) failures++;
    if (n_reinit == 0) failures++;
    if (n_det_none == 0) failures++;
    if (n_det_found < 2) failures++;
    checks++;
    if (n_echo_ok < 1) failures++;
    if (n_chan == 0) failures++;
    if (n_force == 0) failures++;
    if (n_adc == 0) failures++;
    if (n_sat == 0) failures++;
    if (n_clamp == 0) failures++;
    if (n_nco_edges == 0) failures++;
    if (n_vs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// gc_top: digital core of the video ghost canceller.
//
// Video enters either from the ADC or as digital CVBS (cfg.in_sel). The
// sync separator times lines and fields and opens a window on the line
// that carries the ghost cancelling reference (GCR). The input level is
// removed and the samples go to the adaptive deghosting filter and, in
// parallel, to the bypass delay. Each path has its own offset/gain stage;
// the output selector takes the bypass path while no GCR is confirmed
// (or when forced) and the filtered path otherwise. The selected video
// drives the video DAC decoder and the digital CVBS output.
//
// Ghost cancellation runs in three phases:
//  1. the GCR window of each field is averaged over 8 fields with the
//     field's GCR polarity (cfg.pol_seq) and correlated with the stored
//     reference; a strong enough peak confirms the GCR, and the weaker
//     correlation peaks (gcr_pk_lag) give the echo delays for planning the
//     filter sections;
//  2./3. while the GCR passes through the filter, the error against the
//     stored reference (its polarity applied, delayed by the filter's
//     main path) adapts the coefficients, first in Fast then in Slow mode,
//     with re-initialisation if the error grows (adapt_ctrl).
// The NCO, steered by the sync separator's line timing error, produces the
// sine samples for the clock DAC; clamp_ctrl times the analog clamp.
//
// Analog parts (clamp, gain stage, ADC, DAC current arrays, PLL, clock
// filter and squarer) and the DSP processor with its memories are outside
// this core: their signals are ports. The reference GCR and the filter
// coefficients are loaded and read through simple host ports.
// Timing: one sample per clock. Video latency from the input to dout is
// main_dly + 5 clocks on both paths (filter or bypass delay main_dly+2,
// offset/gain 1, DAC decoder 2).
module gc_top
  import gc_pkg::*;
#(
  parameter int LINE_LEN   = 910,
  parameter int VS_HOLDOFF = 100,
  parameter int WIN_LEN    = 768,
  parameter int CORR_LEN   = 256,
  parameter int NLAG       = 128,
  parameter int REF_DEPTH  = 1024
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  gc_cfg_t               cfg,
  input  logic                  chan_change,
  // video in
  input  logic [DW-1:0]         adc_data,
  input  logic [DW-1:0]         dig_in,
  // reference GCR load
  input  logic                  ref_we,
  input  logic [$clog2(REF_DEPTH)-1:0] ref_waddr,
  input  logic signed [DW-1:0]  ref_wdata,
  // coefficient access
  input  logic                  coef_we,
  input  logic [2:0]            coef_sec,
  input  logic [6:0]            coef_idx,
  input  logic signed [CW-1:0]  coef_wd,
  output logic signed [CW-1:0]  coef_rd,
  // video out
  output logic [DW-1:0]         dout,
  output logic [63:0]           dac_cells,
  output logic [3:0]            dac_bin,
  // clock synthesis and clamp
  output logic [63:0]           nco_cells,
  output logic [3:0]            nco_bin,
  output logic                  clamp,
  output logic                  clamp_ref,
  // status
  output adapt_mode_e           mode,
  output logic                  gcr_present,
  output logic [30:0]           gcr_peak,
  output logic [$clog2(NLAG)-1:0] gcr_peak_lag,
  output logic [30:0]           gcr_pk_mag [4],   // main and echo peaks, strongest first
  output logic [$clog2(NLAG)-1:0] gcr_pk_lag [4],
  output logic [7:0]            reinit_cnt,
  output logic [23:0]           line_err,
  output logic                  filt_sat,
  output logic                  hs,
  output logic                  vs,
  output logic                  field,
  output logic [9:0]            line,
  output logic                  det_busy,
  output logic [9:0]            nco_dout
);
  localparam int RAW = $clog2(REF_DEPTH);

  // ---------------- input select and sync ----------------
  logic [DW-1:0] vin;
  assign vin = cfg.in_sel ? dig_in : adc_data;

  logic [10:0]       hpos, gcr_pos;
  logic signed [11:0] terr;
  logic              terr_vld, gcr_win, gcr_end;

  sync_sep #(.LINE_LEN(LINE_LEN), .VS_HOLDOFF(VS_HOLDOFF), .WIN_LEN(WIN_LEN)) u_sync (
    .clk, .rst_n, .video(vin), .sync_th(cfg.sync_th), .gcr_line(cfg.gcr_line),
    .win_start(cfg.win_start), .hs, .vs, .field, .hpos, .line, .terr, .terr_vld,
    .gcr_win, .gcr_pos, .gcr_end);

  clamp_ctrl u_clamp (
    .clk, .rst_n, .en(cfg.clamp_en), .hs, .clamp_pos(cfg.clamp_pos),
    .clamp_len(cfg.clamp_len), .ref_sel(cfg.clamp_sel), .clamp, .clamp_ref);

  logic signed [DW-1:0] xs;
  assign xs = sat_dw(32'(vin) - 32'(cfg.in_level));

  // field position in the 8-field GCR sequence
  logic [2:0] fidx;
  logic       pol;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           fidx <= '0;
    else if (chan_change) fidx <= '0;
    else if (vs)          fidx <= fidx + 1'b1;
  end
  assign pol = cfg.pol_seq[fidx];

  // ---------------- phase 1: average and detect ----------------
  logic                 avg_done;
  logic [RAW-1:0]       avg_raddr, ref_raddr_b, ref_raddr_a;
  logic signed [DW-1:0] avg_rdata, ref_rdata_b, ref_rdata_a;
  logic                 det_done;

  gcr_avg #(.LEN(WIN_LEN), .AW(RAW)) u_avg (
    .clk, .rst_n, .start(chan_change), .win(gcr_win), .pos(RAW'(gcr_pos)),
    .x(xs), .pol, .line_end(gcr_end), .done(avg_done),
    .rd_addr(avg_raddr), .rd_data(avg_rdata));

  gcr_detect #(.CORR_LEN(CORR_LEN), .NLAG(NLAG), .AW(RAW)) u_det (
    .clk, .rst_n, .start(avg_done),
    .avg_addr(avg_raddr), .avg_data(avg_rdata),
    .ref_addr(ref_raddr_b), .ref_data(ref_rdata_b),
    .th(cfg.det_th), .busy(det_busy), .done(det_done), .present(gcr_present),
    .peak(gcr_peak), .peak_lag(gcr_peak_lag),
    .pk_mag(gcr_pk_mag), .pk_lag(gcr_pk_lag));

  gcr_ref_ram #(.DEPTH(REF_DEPTH)) u_ref (
    .clk, .we(ref_we), .waddr(ref_waddr), .wdata(ref_wdata),
    .raddr_a(ref_raddr_a), .rdata_a(ref_rdata_a),
    .raddr_b(ref_raddr_b), .rdata_b(ref_rdata_b));

  // ---------------- phases 2/3: adaptive filter ----------------
  // The GCR window, delayed like the filter's main path, marks where the
  // filter output carries the GCR.
  logic signed [12:0] wdel_in, wdel_out;
  logic               e_win, e_end;
  logic [10:0]        e_pos;
  assign wdel_in = {gcr_end, gcr_win, gcr_pos};
  prog_delay #(.DW(13), .AW(DLY_AW)) u_wdel (
    .clk, .rst_n, .din(wdel_in), .dly(cfg.main_dly), .dout(wdel_out));
  assign e_end = wdel_out[12];
  assign e_win = wdel_out[11];
  assign e_pos = wdel_out[10:0];

  assign ref_raddr_a = RAW'(e_pos);
  logic signed [DW-1:0] ref_s;
  assign ref_s = sat_dw((pol ? 32'(ref_rdata_a) : -32'(ref_rdata_a)) + 32'(cfg.ref_dc));

  sec_cfg_t               sec_cfg [NSEC];
  always_comb for (int s = 0; s < NSEC; s++) sec_cfg[s] = cfg.sec[s];

  logic                 adapt_en, bypass, coef_clr;
  logic [6:0]           acc_lim;
  logic signed [DW-1:0] y;
  logic signed [DW:0]   err;

  gc_filter u_filt (
    .clk, .rst_n, .x(xs), .sec_cfg, .main_dly(cfg.main_dly),
    .split(cfg.split), .split_dly(cfg.split_dly),
    .err_en(e_win), .ref_s, .adapt_en, .th_e(cfg.th_e), .th_y(cfg.th_y),
    .acc_lim, .coef_clr, .coef_we, .coef_sec, .coef_idx, .coef_wd, .coef_rd,
    .y, .err, .sat(filt_sat));

  adapt_ctrl u_ctrl (
    .clk, .rst_n, .chan_change, .det_done, .det_present(gcr_present),
    .err_en(e_win), .err, .line_done(e_end),
    .conv_th(cfg.conv_th), .unstab_th(cfg.unstab_th), .fast_lines(cfg.fast_lines),
    .acc_fast(cfg.acc_fast), .acc_slow(cfg.acc_slow),
    .mode, .adapt_en, .bypass, .acc_lim, .coef_clr, .reinit(reinit_cnt),
    .last_esum(line_err));

  // ---------------- bypass, offset/gain, output ----------------
  logic signed [DW-1:0] xb;
  logic [DW-1:0]        out_f, out_b, out_sel;

  gc_bypass_delay u_byp (.clk, .rst_n, .din(xs), .dly(cfg.main_dly), .dout(xb));

  offset_gain u_og_f (.clk, .rst_n, .din(y),  .offset(cfg.off_f), .gain(cfg.gain_f), .dout(out_f));
  offset_gain u_og_b (.clk, .rst_n, .din(xb), .offset(cfg.off_b), .gain(cfg.gain_b), .dout(out_b));

  logic byp_r;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) byp_r <= 1'b1;
    else        byp_r <= bypass | cfg.force_bypass;
  end
  assign out_sel = byp_r ? out_b : out_f;

  dac_decoder u_vdac (.clk, .rst_n, .code(out_sel), .cells(dac_cells), .bin(dac_bin), .dout);

  // ---------------- clock synthesis ----------------
  logic [9:0]  nco_s;
  logic [23:0] nco_ph;
  nco u_nco (
    .clk, .rst_n, .freq(cfg.nco_freq), .terr, .terr_vld, .kshift(cfg.nco_k),
    .sample(nco_s), .phase(nco_ph));
  dac_decoder u_cdac (.clk, .rst_n, .code(nco_s), .cells(nco_cells), .bin(nco_bin), .dout(nco_dout));
endmodule

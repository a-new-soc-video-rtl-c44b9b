// gc_filter: the 576-tap tap-decimated adaptive deghosting equalizer.
//
// Eight sections of 72 consecutive taps (gc_section) each take their input
// through a programmable delay line (prog_delay). A section is assigned to
// the FIR part (its delay line is fed by the input video x) or to the IIR
// part (fed by the filter output y), and its delay places it anywhere in time.
// A separate unity-gain path, itself delayed by main_dly, carries the main
// signal, so no section is spent on it. The output is
//
//   y[n] = x[n-main_dly-1] + sum over enabled sections of sum_j c_j * s[n-dly-1-j]
//
// with s = x for FIR sections and s = y (one clock older, registered) for IIR
// sections, so an IIR tap is at least two samples behind the output. With
// main_dly = 88, one FIR section at dly 0 and one at dly 72 cover 88 precursor
// and 56 postcursor samples, and IIR sections cover the rest.
// Section FLOAT_SEC (the last one) has a second delay line: with split set,
// its taps 36..71 read s[n-split_dly-1-(j-36)] instead of continuing the
// chain, so the section works as two floating 36-tap blocks placed
// independently, for rare long echoes.
//
// Adaptation (LMS): while err_en is high the error e = ref - y is formed
// against the desired signal ref aligned to the output, reduced to -1/0/+1
// by the threshold th_e, and broadcast to all sections (see gc_section).
// The section structure, the FIR/IIR assignment, the delay lines, the
// unity main path and the two 36-tap floating blocks follow the published
// architecture; making them the two halves of one section is this design's; the alignment rules,
// saturation and the coefficient access port are this design's.
//
// Timing: y is registered (one sample per clock); err is combinational and
// belongs to the sample y takes at the next edge.
module gc_filter
  import gc_pkg::*;
#(
  parameter int NS   = NSEC, // sections
  parameter int NT   = NTAP, // taps per section
  parameter int ACCW = 8,
  parameter int FLOAT_SEC = NS - 1   // the section that can be split in two halves
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [DW-1:0]    x,
  input  sec_cfg_t                sec_cfg [NS],
  input  logic [DLY_AW-1:0]       main_dly,
  input  logic                    split,      // FLOAT_SEC works as two halves
  input  logic [DLY_AW-1:0]       split_dly,  // delay of FLOAT_SEC's second half
  // adaptation
  input  logic                    err_en,
  input  logic signed [DW-1:0]    ref_s,
  input  logic                    adapt_en,
  input  logic [DW-1:0]           th_e,
  input  logic [DW-2:0]           th_y,
  input  logic [ACCW-2:0]         acc_lim,
  input  logic                    coef_clr,
  // coefficient access
  input  logic                    coef_we,
  input  logic [$clog2(NS)-1:0]   coef_sec,
  input  logic [$clog2(NT)-1:0]   coef_idx,
  input  logic signed [CW-1:0]    coef_wd,
  output logic signed [CW-1:0]    coef_rd,
  // outputs
  output logic signed [DW-1:0]    y,
  output logic signed [DW:0]      err,
  output logic                    sat          // output saturated this clock
);
  logic signed [DW-1:0] main_s;
  logic signed [DW-1:0] sec_in  [NS];
  logic signed [DW-1:0] sec_in2 [NS];
  logic signed [IW-1:0] sec_sum [NS];
  logic signed [CW-1:0] sec_crd [NS];
  logic signed [1:0]    e_dir;

  prog_delay #(.DW(DW), .AW(DLY_AW)) u_main (
    .clk, .rst_n, .din(x), .dly(main_dly), .dout(main_s));

  for (genvar s = 0; s < NS; s++) begin : g_sec
    logic signed [DW-1:0] src;
    assign src = sec_cfg[s].iir ? y : x;
    prog_delay #(.DW(DW), .AW(DLY_AW)) u_dly (
      .clk, .rst_n, .din(src), .dly(sec_cfg[s].dly), .dout(sec_in[s]));
    if (s == FLOAT_SEC) begin : g_float
      // second delay line: the upper half of the section, placed on its own
      prog_delay #(.DW(DW), .AW(DLY_AW)) u_dly2 (
        .clk, .rst_n, .din(src), .dly(split_dly), .dout(sec_in2[s]));
    end else begin : g_fixed
      assign sec_in2[s] = '0;
    end
    gc_section #(.NT(NT), .ACCW(ACCW)) u_sec (
      .clk, .rst_n,
      .din      (sec_in[s]),
      .split    (split && s == FLOAT_SEC),
      .din2     (sec_in2[s]),
      .upd_en   (adapt_en & sec_cfg[s].en),
      .e_dir    (e_dir),
      .th_y     (th_y),
      .acc_lim  (acc_lim),
      .coef_clr (coef_clr),
      .coef_we  (coef_we && coef_sec == s),
      .coef_idx (coef_idx),
      .coef_wd  (coef_wd),
      .coef_rd  (sec_crd[s]),
      .sum      (sec_sum[s]));
  end

  assign coef_rd = sec_crd[coef_sec];

  // Sum of main path and sections, saturated to the internal word, then
  // rounded back to the sample scale.
  localparam int TW = IW + 4;
  localparam logic signed [TW-1:0] IMAX = TW'((1 << (IW-1)) - 1);
  localparam logic signed [TW-1:0] IMIN = -TW'(1 << (IW-1));
  logic signed [TW-1:0] tot;
  logic signed [IW-1:0] tot_sat;
  logic signed [IW-CFRAC-1:0] y_wide;
  logic signed [DW-1:0] y_next;
  logic                 y_sat;

  always_comb begin
    tot = TW'(main_s) <<< CFRAC;
    for (int s = 0; s < NS; s++)
      if (sec_cfg[s].en) tot += TW'(sec_sum[s]);
    if (tot > IMAX)      tot_sat = IMAX[IW-1:0];
    else if (tot < IMIN) tot_sat = IMIN[IW-1:0];
    else                 tot_sat = tot[IW-1:0];
    y_wide = (IW-CFRAC)'((tot_sat + IW'(1 << (CFRAC-1))) >>> CFRAC);
    y_sat  = (y_wide > (IW-CFRAC)'(511)) || (y_wide < -(IW-CFRAC)'(512));
    y_next = sat_dw(32'(y_wide));
  end

  // Error against the desired signal and its thresholded sign.
  always_comb begin
    logic [DW:0] mag;
    err   = (DW+1)'(ref_s) - (DW+1)'(y_next);
    mag   = err[DW] ? (DW+1)'(-err) : (DW+1)'(err);
    e_dir = 2'sd0;
    if (err_en && mag > {1'b0, th_e}) e_dir = err[DW] ? -2'sd1 : 2'sd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y   <= '0;
      sat <= 1'b0;
    end else begin
      y   <= y_next;
      sat <= y_sat;
    end
  end
endmodule

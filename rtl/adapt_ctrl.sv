// adapt_ctrl: sequencing of ghost cancellation and coefficient adaptation.
//
// Modes (gc_pkg::adapt_mode_e):
//   M_BYPASS  no GCR has been confirmed: the video takes the bypass path
//             and the coefficients do not adapt.
//   M_FAST    entered when a detection confirms the GCR while bypassed,
//             after clearing the coefficients: adaptation with the short
//             accumulator limit acc_fast, so the filter converges quickly.
//   M_SLOW    entered from M_FAST when a GCR line's summed |error| falls
//             below conv_th, or after fast_lines GCR lines: the long limit
//             acc_slow tracks slow changes of the multipath.
// A channel change clears the coefficients and returns to M_BYPASS. A
// detection that finds no GCR returns to M_BYPASS. The stability monitor
// sums |err| over every GCR line while adapting; a sum above unstab_th
// re-initialises the filter (coefficients cleared, back to M_FAST) and
// counts reinit. The three phases, the Fast/Slow modes and re-initialisation
// on instability follow the document; the error-sum criteria are this
// design's. Timing: mode changes on the clock after the deciding pulse;
// coef_clr is a one-clock pulse.
module adapt_ctrl
  import gc_pkg::*;
#(
  parameter int ACCW = 8,
  parameter int EW   = 24     // error sum width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 chan_change,
  input  logic                 det_done,
  input  logic                 det_present,
  input  logic                 err_en,       // error sample valid
  input  logic signed [DW:0]   err,
  input  logic                 line_done,    // error window closed
  input  logic [EW-1:0]        conv_th,
  input  logic [EW-1:0]        unstab_th,
  input  logic [7:0]           fast_lines,
  input  logic [ACCW-2:0]      acc_fast,
  input  logic [ACCW-2:0]      acc_slow,
  output adapt_mode_e          mode,
  output logic                 adapt_en,
  output logic                 bypass,
  output logic [ACCW-2:0]      acc_lim,
  output logic                 coef_clr,
  output logic [7:0]           reinit,
  output logic [EW-1:0]        last_esum
);
  logic [EW-1:0] esum;
  logic [7:0]    nlines;
  logic [DW:0]   emag;

  assign emag     = err[DW] ? -err : err;
  assign adapt_en = (mode != M_BYPASS);
  assign bypass   = (mode == M_BYPASS);
  assign acc_lim  = (mode == M_SLOW) ? acc_slow : acc_fast;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode      <= M_BYPASS;
      esum      <= '0;
      nlines    <= '0;
      coef_clr  <= 1'b1;
      reinit    <= '0;
      last_esum <= '0;
    end else begin
      coef_clr <= 1'b0;
      if (err_en) esum <= (esum + EW'(emag) < esum) ? '1 : esum + EW'(emag);

      if (chan_change) begin
        mode     <= M_BYPASS;
        coef_clr <= 1'b1;
        esum     <= '0;
      end else if (det_done && !det_present) begin
        mode <= M_BYPASS;
      end else if (det_done && det_present && mode == M_BYPASS) begin
        mode     <= M_FAST;
        coef_clr <= 1'b1;
        nlines   <= '0;
        esum     <= '0;
      end else if (line_done) begin
        esum      <= '0;
        last_esum <= esum;
        if (mode != M_BYPASS) begin
          if (esum > unstab_th) begin
            mode     <= M_FAST;
            coef_clr <= 1'b1;
            nlines   <= '0;
            if (reinit != '1) reinit <= reinit + 1'b1;
          end else if (mode == M_FAST) begin
            if (nlines != '1) nlines <= nlines + 1'b1;
            if (esum < conv_th || nlines + 1'b1 >= fast_lines) mode <= M_SLOW;
          end
        end
      end
    end
  end
endmodule

// sync_sep: sync separator and line timing for the digitized video.
//
// A sample below sync_th is sync. The leading edge of a sync pulse that
// comes at least 3/4 of a nominal line after the previous accepted edge
// starts a new line (equalizing and serration pulses at half-line spacing
// are ignored): hs pulses, hpos restarts at 0 and line counts up. A sync
// pulse that stays low for VS_MIN samples is a broad (vertical) pulse: the
// first one after at least VS_HOLDOFF lines pulses vs, toggles field and
// sets the line count to VS_LINE. The time between accepted edges minus
// LINE_LEN is the timing error handed to the NCO loop (terr, valid with
// terr_vld). The GCR window is open on line gcr_line for WIN_LEN samples
// from hpos = win_start; gcr_pos counts inside it and gcr_end pulses when it
// closes. The document gives the purpose (sync detection, timing error for
// the NCO); the slicing and counting rules and all limits are this design's.
//
// Timing: all outputs are registered; hpos = 0 on the clock after the edge.
module sync_sep #(
  parameter int DW         = 10,
  parameter int LINE_LEN   = 910,   // samples per line at 4 x fsc (NTSC)
  parameter int VS_MIN     = 256,   // samples low that make a broad pulse
  parameter int VS_HOLDOFF = 100,   // lines between vertical syncs, minimum
  parameter int VS_LINE    = 4,     // line number given at a vertical sync
  parameter int WIN_LEN    = 768,   // GCR window length in samples
  parameter int HW         = 11,    // hpos width
  parameter int LW         = 10     // line counter width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [DW-1:0]         video,
  input  logic [DW-1:0]         sync_th,
  input  logic [LW-1:0]         gcr_line,
  input  logic [HW-1:0]         win_start,
  output logic                  hs,
  output logic                  vs,
  output logic                  field,
  output logic [HW-1:0]         hpos,
  output logic [LW-1:0]         line,
  output logic signed [HW:0]    terr,
  output logic                  terr_vld,
  output logic                  gcr_win,
  output logic [HW-1:0]         gcr_pos,
  output logic                  gcr_end
);
  localparam int ACCEPT = (LINE_LEN * 3) / 4;

  logic          sync_c, sync_d;
  logic [HW-1:0] width;
  logic [LW-1:0] since_vs;
  logic          locked;      // one line measured
  logic [HW-1:0] hcnt;
  logic          edge_ok;

  assign sync_c  = video < sync_th;
  assign edge_ok = sync_c && !sync_d && (hcnt >= HW'(ACCEPT - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_d   <= 1'b0;
      width    <= '0;
      since_vs <= '1;   // first vertical sync is accepted at once
      locked   <= 1'b0;
      hcnt     <= '0;
      hs       <= 1'b0;
      vs       <= 1'b0;
      field    <= 1'b0;
      hpos     <= '0;
      line     <= '0;
      terr     <= '0;
      terr_vld <= 1'b0;
      gcr_win  <= 1'b0;
      gcr_pos  <= '0;
      gcr_end  <= 1'b0;
    end else begin
      sync_d   <= sync_c;
      hs       <= 1'b0;
      vs       <= 1'b0;
      terr_vld <= 1'b0;
      gcr_end  <= 1'b0;

      // sample counter within the line
      if (edge_ok) hcnt <= '0;
      else if (hcnt != '1) hcnt <= hcnt + 1'b1;
      hpos <= edge_ok ? '0 : ((hcnt != '1) ? hcnt + 1'b1 : hcnt);

      // sync width
      if (!sync_c) width <= '0;
      else if (width != '1) width <= width + 1'b1;

      if (edge_ok) begin
        hs   <= 1'b1;
        line <= line + 1'b1;
        if (since_vs != '1) since_vs <= since_vs + 1'b1;
        if (locked) begin
          terr     <= (HW+1)'(hcnt) + 1'b1 - (HW+1)'(LINE_LEN);
          terr_vld <= 1'b1;
        end
        locked <= 1'b1;
      end

      if (sync_c && width == HW'(VS_MIN - 1) && since_vs >= LW'(VS_HOLDOFF)) begin
        vs       <= 1'b1;
        field    <= ~field;
        line     <= LW'(VS_LINE);
        since_vs <= '0;
      end

      // GCR window on the input side
      if (!edge_ok && line == gcr_line && hcnt + 1'b1 == win_start) begin
        gcr_win <= 1'b1;
        gcr_pos <= '0;
      end else if (gcr_win) begin
        if (gcr_pos == HW'(WIN_LEN - 1)) begin
          gcr_win <= 1'b0;
          gcr_end <= 1'b1;
        end else begin
          gcr_pos <= gcr_pos + 1'b1;
        end
      end
    end
  end
endmodule

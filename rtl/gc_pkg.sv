// gc_pkg: types and constants shared by the ghost canceller.
//
// The sample format inside the canceller is a signed 10-bit number (video
// code minus a programmable input level). Filter coefficients are signed
// 8-bit numbers with 7 fraction bits, so a coefficient spans -1.0 .. +0.99.
// The 10-bit sample width, the 8-bit coefficient width (10 x 8 multipliers)
// and the 18-bit internal word follow the published figures; the fraction
// position of the coefficient and the configuration record are choices of
// this design.
package gc_pkg;

  localparam int DW      = 10;   // sample width (input resolution)
  localparam int CW      = 8;    // coefficient width (10 x 8 multipliers)
  localparam int IW      = 18;   // internal word length
  localparam int CFRAC   = 7;    // coefficient fraction bits (1.0 = 128)
  localparam int NSEC    = 8;    // filter sections
  localparam int NTAP    = 72;   // taps per section
  localparam int DLY_AW  = 10;   // programmable delay range 0..1023 samples

  // One filter section: enabled, FIR (input video) or IIR (filter output)
  // source, and the delay from that source to its first tap.
  typedef struct packed {
    logic              en;
    logic              iir;
    logic [DLY_AW-1:0] dly;
  } sec_cfg_t;

  // Adaptation state of the canceller.
  typedef enum logic [1:0] {
    M_BYPASS = 2'd0,   // no GCR found: video bypasses the filter
    M_FAST   = 2'd1,   // fast adaptation after a channel change / re-init
    M_SLOW   = 2'd2    // slow tracking of changing multipath
  } adapt_mode_e;


  // Programmable settings of the canceller, written by the host.
  typedef struct packed {
    logic                  in_sel;       // 0: ADC, 1: digital CVBS input
    logic [DW-1:0]         in_level;     // code subtracted at the filter input
    logic [DLY_AW-1:0]     main_dly;     // delay of the unity main path
    sec_cfg_t [NSEC-1:0]   sec;          // section assignment and delays
    logic                  split;        // last section as two 36-tap halves
    logic [DLY_AW-1:0]     split_dly;    // delay of its second half
    logic [DW-1:0]         th_e;         // error threshold
    logic [DW-2:0]         th_y;         // tap-sample threshold
    logic [6:0]            acc_fast;     // accumulator limit, Fast mode
    logic [6:0]            acc_slow;     // accumulator limit, Slow mode
    logic [23:0]           conv_th;      // GCR-line |error| sum: converged
    logic [23:0]           unstab_th;    // GCR-line |error| sum: unstable
    logic [7:0]            fast_lines;   // GCR lines in Fast mode, at most
    logic [30:0]           det_th;       // correlation peak needed for a GCR
    logic [7:0]            pol_seq;      // GCR polarity of fields 0..7
    logic signed [DW-1:0]  ref_dc;       // level added to the reference
    logic                  force_bypass;
    logic signed [DW-1:0]  off_f;        // offset, filtered path
    logic [7:0]            gain_f;       // gain, filtered path (128 = 1.0)
    logic signed [DW-1:0]  off_b;        // offset, bypass path
    logic [7:0]            gain_b;       // gain, bypass path
    logic [DW-1:0]         sync_th;      // sync slicing level
    logic [9:0]            gcr_line;     // line carrying the GCR
    logic [10:0]           win_start;    // GCR window start in the line
    logic                  clamp_en;
    logic [10:0]           clamp_pos;
    logic [10:0]           clamp_len;
    logic                  clamp_sel;    // clamp reference: 0 sync tip, 1 back porch
    logic [23:0]           nco_freq;     // desired NCO frequency word
    logic [3:0]            nco_k;        // timing-error loop gain (shift)
  } gc_cfg_t;

  function automatic logic signed [DW-1:0] sat_dw(input logic signed [31:0] v);
    if (v > 32'sd511)       return 10'sd511;
    else if (v < -32'sd512) return -10'sd512;
    else                    return v[DW-1:0];
  endfunction

endpackage

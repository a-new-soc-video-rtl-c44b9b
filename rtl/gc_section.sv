// gc_section: one 72-tap section of the tap-decimated deghosting filter.
//
// The section input (the output of its programmable delay line) feeds a
// chain of tap registers: tap j holds the input delayed by j clocks. With
// split set, the upper half starts again from a second input (tap NT/2 + k
// holds din2 delayed by k), so the section serves two separately delayed
// blocks of NT/2 taps. Each
// tap has a 10 x 8 multiplier and an 8-bit signed coefficient (7 fraction
// bits); the products are summed and saturated to the 18-bit internal word.
//
// Coefficient adaptation combines the error-threshold and error-accumulation
// methods: the error and the tap sample are each reduced to -1/0/+1 by a
// threshold (small values count as 0), their product is added to a small
// per-tap accumulator, and when the accumulator reaches +acc_lim (or
// -acc_lim) the coefficient is stepped by +1 (or -1) LSB and the accumulator
// restarts from 0. No multiplier is needed for the update. The sign-of-sign
// form of the accumulated term and the symmetric limit are this design's
// reading of the method; acc_lim is how Fast and Slow adaptation differ.
//
// Timing: the sum is combinational from the taps; taps and coefficients
// update on the clock edge. One sample per clock.
module gc_section
  import gc_pkg::*;
#(
  parameter int NT   = NTAP, // taps in the section
  parameter int ACCW = 8     // per-tap error accumulator width
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [DW-1:0]   din,        // first tap
  input  logic                   split,      // second half fed from din2
  input  logic signed [DW-1:0]   din2,       // first tap of the second half
  input  logic                   upd_en,     // adapt coefficients this clock
  input  logic signed [1:0]      e_dir,      // thresholded error: -1, 0, +1
  input  logic [DW-2:0]          th_y,       // tap-sample threshold
  input  logic [ACCW-2:0]        acc_lim,    // accumulator overflow limit
  input  logic                   coef_clr,   // clear coefficients and accumulators
  input  logic                   coef_we,    // direct coefficient write
  input  logic [$clog2(NT)-1:0]  coef_idx,
  input  logic signed [CW-1:0]   coef_wd,
  output logic signed [CW-1:0]   coef_rd,    // coefficient at coef_idx
  output logic signed [IW-1:0]   sum         // saturated section output
);
  logic signed [DW-1:0]   tap  [NT];
  logic signed [DW-1:0]   dly_r[NT-1];
  logic signed [CW-1:0]   coef [NT];
  logic signed [ACCW-1:0] acc  [NT];

  localparam int SW = IW + $clog2(NT) + 1;
  localparam logic signed [SW-1:0] SMAX = SW'((1 << (IW-1)) - 1);
  localparam logic signed [SW-1:0] SMIN = -SW'(1 << (IW-1));

  always_comb begin
    tap[0] = din;
    for (int j = 1; j < NT; j++) tap[j] = (split && j == NT / 2) ? din2 : dly_r[j-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < NT-1; j++) dly_r[j] <= '0;
    end else begin
      for (int j = 0; j < NT-1; j++) dly_r[j] <= tap[j];
    end
  end

  // Multiply-accumulate.
  logic signed [SW-1:0] acc_sum;
  always_comb begin
    acc_sum = '0;
    for (int j = 0; j < NT; j++) acc_sum += SW'(tap[j]) * SW'(coef[j]);
    if (acc_sum > SMAX)      sum = SMAX[IW-1:0];
    else if (acc_sum < SMIN) sum = SMIN[IW-1:0];
    else                     sum = acc_sum[IW-1:0];
  end

  assign coef_rd = coef[coef_idx];

  // Thresholded sign of each tap sample.
  function automatic logic signed [1:0] tsign(input logic signed [DW-1:0] v,
                                              input logic [DW-2:0] th);
    logic [DW-1:0] mag;
    mag = v[DW-1] ? DW'(-v) : DW'(v);
    if (mag <= {1'b0, th}) return 2'sd0;
    return v[DW-1] ? -2'sd1 : 2'sd1;
  endfunction

  localparam logic signed [CW-1:0] CMAX = CW'((1 << (CW-1)) - 1);
  localparam logic signed [CW-1:0] CMIN = -CW'(1 << (CW-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < NT; j++) begin
        coef[j] <= '0;
        acc[j]  <= '0;
      end
    end else if (coef_clr) begin
      for (int j = 0; j < NT; j++) begin
        coef[j] <= '0;
        acc[j]  <= '0;
      end
    end else if (coef_we) begin
      coef[coef_idx] <= coef_wd;
    end else if (upd_en && e_dir != 2'sd0) begin
      for (int j = 0; j < NT; j++) begin
        logic signed [1:0]      d;
        logic signed [ACCW-1:0] a;
        d = e_dir * tsign(tap[j], th_y);
        a = acc[j] + ACCW'(d);
        if (a >= $signed({1'b0, acc_lim})) begin
          acc[j] <= '0;
          if (coef[j] != CMAX) coef[j] <= coef[j] + 1'b1;
        end else if (a <= -$signed({1'b0, acc_lim})) begin
          acc[j] <= '0;
          if (coef[j] != CMIN) coef[j] <= coef[j] - 1'b1;
        end else begin
          acc[j] <= a;
        end
      end
    end
  end
endmodule

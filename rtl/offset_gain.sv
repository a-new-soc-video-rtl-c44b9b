// offset_gain: programmable offset adder followed by a gain scalar.
//
// The canceller works on video with its input level removed, so its output
// has lost the clamp level and gain. This block restores them digitally:
//
//   dout = clip_0..1023( ((din + offset) * gain + 64) >> 7 )
//
// din and offset are signed 10-bit, gain is an unsigned 8-bit number with 7
// fraction bits (128 = unity, up to 255/128). The adder-then-scalar order
// and the 10-bit offset / 8-bit gain widths follow the block diagram; the
// gain scaling, rounding and clipping are this design's choices.
// Timing: one register, latency 1 clock.
module offset_gain
  import gc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] din,
  input  logic signed [DW-1:0] offset,
  input  logic [7:0]           gain,
  output logic [DW-1:0]        dout
);
  logic signed [DW:0]    s;
  logic signed [DW+9:0]  p;
  logic signed [DW+9:0]  q;

  always_comb begin
    s = (DW+1)'(din) + (DW+1)'(offset);
    p = (DW+10)'(s) * $signed({2'b0, gain});
    q = (p + (DW+10)'(64)) >>> 7;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     dout <= '0;
    else if (q < 0)                 dout <= '0;
    else if (q > (DW+10)'(1023))    dout <= '1;
    else                            dout <= q[DW-1:0];
  end
endmodule

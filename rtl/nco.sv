// nco: numerically controlled oscillator for the synthesized master clock.
//
// A PW-bit phase accumulator advances each reference clock by
//
//   inc = freq - (terr <<< kshift)
//
// where freq is the desired frequency word from the controller and terr the
// latest line timing error from the sync separator (positive when a line
// took more samples than nominal, i.e. the synthesized clock runs fast). The
// top 10 phase bits address a sine table stored as a quarter wave of 256
// entries; the output is an offset-binary 10-bit sample (512 + 511 sin) for
// the DAC, whose filtered and squared output becomes the clock. The output
// frequency is freq / 2**PW times the reference clock.
// The document gives the NCO, its sine table, the DAC and the adder of
// desired frequency and timing error; the phase-increment form, the table
// size, the loop gain as a shift and its sign are this design's. The table
// is computed at elaboration with Bhaskara's rational sine approximation
// (error below 0.2 %): sin(x) ~ 16 x (pi - x) / (5 pi^2 - 4 x (pi - x)).
// Timing: sample is registered, one clock after the phase it shows.
module nco #(
  parameter int PW = 24,
  parameter int TW = 12    // timing error width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [PW-1:0]        freq,
  input  logic signed [TW-1:0] terr,
  input  logic                 terr_vld,
  input  logic [3:0]           kshift,
  output logic [9:0]           sample,
  output logic [PW-1:0]        phase
);
  // Quarter-wave sine table, 0..511, index i covers angle (i + 0.5) * pi / 512.
  // Integer form of Bhaskara's formula with x in units of pi/1024:
  //   sin = 16 u (1024 - u) / (5 * 1024^2 - 4 u (1024 - u)), u = 2 i + 1
  function automatic logic [8:0] qsin(input int i);
    longint u, num, den, v;
    u   = 2 * i + 1;
    num = 16 * u * (1024 - u);
    den = 5 * 1024 * 1024 - 4 * u * (1024 - u);
    v   = (511 * num + den / 2) / den;
    return 9'(v);
  endfunction

  logic [8:0] lut [256];
  for (genvar i = 0; i < 256; i++) begin : g_lut
    assign lut[i] = qsin(i);
  end

  logic signed [TW-1:0] terr_r;
  logic [PW-1:0]        inc;
  logic [1:0]           quad;
  logic [7:0]           idx;
  logic [8:0]           mag;

  assign inc  = freq - (PW'(terr_r) << kshift);
  assign quad = phase[PW-1:PW-2];
  assign idx  = quad[0] ? ~phase[PW-3:PW-10] : phase[PW-3:PW-10];
  assign mag  = lut[idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      terr_r <= '0;
      phase  <= '0;
      sample <= 10'd512;
    end else begin
      if (terr_vld) terr_r <= terr;
      phase  <= phase + inc;
      sample <= quad[1] ? 10'd512 - 10'(mag) : 10'd512 + 10'(mag);
    end
  end
endmodule

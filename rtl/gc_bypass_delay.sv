// gc_bypass_delay: delay of the unfiltered video on the bypass path.
//
// When no ghost cancelling reference is found the video is passed around the
// filter. So that switching between the two paths does not shift the
// picture, the bypass video is delayed by exactly the filter's latency from
// x to y: main_dly + 2 clocks (RAM delay line main_dly+1, plus the filter's
// output register). The delay is a RAM with one write and one read port,
// followed by one register. The document names this block; its construction
// is this design's.
module gc_bypass_delay #(
  parameter int DW = 10,
  parameter int AW = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] din,
  input  logic [AW-1:0]        dly,    // the filter's main_dly
  output logic signed [DW-1:0] dout    // din delayed by dly+2 clocks
);
  logic signed [DW-1:0] mem [2**AW];
  logic [AW-1:0]        wp;
  logic signed [DW-1:0] rd;

  always_ff @(posedge clk) mem[wp] <= din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp   <= '0;
      rd   <= '0;
      dout <= '0;
    end else begin
      wp   <= wp + 1'b1;
      rd   <= (dly == '0) ? din : mem[wp - dly];
      dout <= rd;
    end
  end
endmodule

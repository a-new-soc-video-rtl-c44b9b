// gcr_ref_ram: storage for the locally held reference GCR waveform.
//
// Holds DEPTH signed samples of the ghost cancelling reference (GCR) as it
// should appear at the filter output with no ghost. It is written by the
// host over a simple write port and read through two independent read
// ports: one by the LMS error path while the GCR line passes through the
// filter, one by the correlator that checks GCR presence. Reads are
// combinational. The depth and the port arrangement are this design's.
module gcr_ref_ram
  import gc_pkg::*;
#(
  parameter int DEPTH = 1024
) (
  input  logic                      clk,
  input  logic                      we,
  input  logic [$clog2(DEPTH)-1:0]  waddr,
  input  logic signed [DW-1:0]      wdata,
  input  logic [$clog2(DEPTH)-1:0]  raddr_a,
  output logic signed [DW-1:0]      rdata_a,
  input  logic [$clog2(DEPTH)-1:0]  raddr_b,
  output logic signed [DW-1:0]      rdata_b
);
  logic signed [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) if (we) mem[waddr] <= wdata;

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];
endmodule

// gcr_avg: sampling and averaging of the broadcast GCR line.
//
// Over a sequence of 2**NAVG_LOG2 GCR lines, each window sample is added
// into a per-position accumulator with the sign of that line's GCR polarity
// (pol = 1 adds, pol = 0 subtracts). With as many positive as negative
// lines in a sequence the DC level and any picture content that does not
// change from field to field (sync, burst) cancel, and the GCR adds up.
// The first line of a sequence overwrites the accumulators, so no clearing
// pass is needed. After the last line, done pulses and the average
// (sum >>> NAVG_LOG2) can be read at rd_addr (combinational read) until the
// next sequence begins writing. start restarts the sequence count.
// The document states the purpose (averaging removes DC and non-varying
// signals); sign-alternating accumulation over an 8-line sequence is this
// design's way of doing it.
module gcr_avg
  import gc_pkg::*;
#(
  parameter int LEN       = 768,
  parameter int NAVG_LOG2 = 3,
  parameter int AW        = $clog2(LEN)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 win,       // window sample valid
  input  logic [AW-1:0]        pos,       // position in window
  input  logic signed [DW-1:0] x,
  input  logic                 pol,       // polarity of the current GCR line
  input  logic                 line_end,  // window closed
  output logic                 done,
  input  logic [AW-1:0]        rd_addr,
  output logic signed [DW-1:0] rd_data
);
  localparam int SW = DW + NAVG_LOG2;
  logic signed [SW-1:0] acc [LEN];
  logic [NAVG_LOG2-1:0] cnt;
  logic signed [SW-1:0] xs;
  logic signed [SW-1:0] rsum;

  assign xs = pol ? SW'(x) : -SW'(x);

  always_ff @(posedge clk) begin
    if (win) acc[pos] <= (cnt == '0) ? xs : acc[pos] + xs;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) cnt <= '0;
      else if (line_end) begin
        cnt <= cnt + 1'b1;
        if (cnt == '1) done <= 1'b1;
      end
    end
  end

  assign rsum    = acc[rd_addr];
  assign rd_data = DW'(rsum >>> NAVG_LOG2);
endmodule

// prog_delay: programmable delay line on a dual-port RAM.
//
// Each clock one sample is written at the write pointer and one is read
// DLY locations behind it, so the registered output is the input delayed by
// dly+1 clocks (dly = 0 .. 2**AW-1; dly = 0 takes the input directly into the
// output register). The RAM has one write port and one read port, as the
// variable delay lines of the filter sections are built from dual-port RAMs;
// the pointer arithmetic around it is this design's own. The RAM contents are
// not reset: the output is valid once dly+1 samples have been written.
//
// Interface: din is sampled every clock; dout changes on the clock edge.
module prog_delay #(
  parameter int DW = 10,
  parameter int AW = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] din,
  input  logic [AW-1:0]        dly,
  output logic signed [DW-1:0] dout
);
  logic signed [DW-1:0] mem [2**AW];
  logic [AW-1:0] wp;
  logic [AW-1:0] rp;

  assign rp = wp - dly;

  always_ff @(posedge clk) begin
    mem[wp] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp   <= '0;
      dout <= '0;
    end else begin
      wp   <= wp + 1'b1;
      dout <= (dly == '0) ? din : mem[rp];
    end
  end
endmodule

// tb_offset_gain: random samples, offsets and gains; the registered output
// must equal clip(((din + offset) * gain + 64) >> 7) to 0..1023, one clock
// later. Corner cases (unity gain, full-scale clipping both ways) included.
// The stimulus, the reference model and the expected values are this
// testbench's own; the block's behaviour under test is described in its
// module header. A watchdog ends the run with a failure if it hangs.
module tb_offset_gain;
  import gc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic signed [DW-1:0] din, offset;
  logic [7:0] gain;
  logic [DW-1:0] dout;
  int checks = 0, failures = 0, nclip_hi = 0, nclip_lo = 0;

  offset_gain dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 0; offset = 0; gain = 128;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int d, o, g, e;
      @(negedge clk);
      d = int'($urandom_range(0, 1023)) - 512;
      o = int'($urandom_range(0, 1023)) - 512;
      g = (i < 100) ? 128 : int'($urandom_range(0, 255));
      din = DW'(d); offset = DW'(o); gain = 8'(g);
      e = ((d + o) * g + 64) >>> 7;
      if (e < 0) begin e = 0; nclip_lo++; end
      if (e > 1023) begin e = 1023; nclip_hi++; end
      @(posedge clk); #1;
      checks++;
      if (dout !== DW'(e)) begin
        failures++;
        if (failures < 10) $display("d=%0d o=%0d g=%0d out=%0d exp=%0d", d, o, g, dout, e);
      end
    end
    checks++;
    if (nclip_lo == 0 || nclip_hi == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gc_bypass_delay: random samples through the bypass delay for several
// delay settings; after every clock the output must equal the input of
// dly+2 clocks earlier, the filter's latency for the same main_dly.
// The stimulus, the reference model and the expected values are this
// testbench's own; the block's behaviour under test is described in its
// module header. A watchdog ends the run with a failure if it hangs.
module tb_gc_bypass_delay;
  localparam int DW = 10, AW = 10;
  logic clk = 0, rst_n = 0;
  logic signed [DW-1:0] din, dout;
  logic [AW-1:0] dly;
  int checks = 0, failures = 0;
  int hist [0:16383];
  int n = 0;

  gc_bypass_delay #(.DW(DW), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dlys [4] = '{0, 1, 88, 1023};
    din = '0; dly = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (dlys[k]) begin
      dly = AW'(dlys[k]);
      for (int i = 0; i < 2500; i++) begin
        @(negedge clk);
        hist[n] = int'($urandom_range(0, 1023)) - 512;
        din = DW'(hist[n]);
        @(posedge clk); #1;
        if (i > dlys[k] + 2) begin
          checks++;
          if (dout !== DW'(hist[n - dlys[k] - 1])) begin
            failures++;
            if (failures < 10) $display("dly=%0d dout=%0d exp=%0d", dlys[k], dout, hist[n - dlys[k] - 1]);
          end
        end
        n++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

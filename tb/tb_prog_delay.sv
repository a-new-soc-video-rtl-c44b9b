// tb_prog_delay: checks the programmable delay line against a history of
// its inputs. Random samples are written every clock; for a set of delays
// (0, 1, small, mid, the maximum) the output after each clock edge must be
// the input of dly+1 clocks earlier (checked once the line has filled).
// The stimulus, the reference model and the expected values are this
// testbench's own; the block's behaviour under test is described in its
// module header. A watchdog ends the run with a failure if it hangs.
module tb_prog_delay;
  localparam int DW = 10, AW = 6;
  logic clk = 0, rst_n = 0;
  logic signed [DW-1:0] din, dout;
  logic [AW-1:0] dly;
  int checks = 0, failures = 0;
  logic signed [DW-1:0] hist [0:4095];
  int n = 0;

  prog_delay #(.DW(DW), .AW(AW)) dut (.clk, .rst_n, .din, .dly, .dout);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dlys [5] = '{0, 1, 5, 37, 63};
    din = '0; dly = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (dlys[k]) begin
      dly = AW'(dlys[k]);
      for (int i = 0; i < 200; i++) begin
        @(negedge clk);
        din = DW'($urandom);
        @(posedge clk);
        hist[n] = din;
        #1;
        if (i > dlys[k] + 1) begin
          checks++;
          if (dout !== hist[n - dlys[k]]) begin
            failures++;
            if (failures < 10) $display("dly=%0d n=%0d dout=%0d exp=%0d", dlys[k], n, dout, hist[n - dlys[k]]);
          end
        end
        n++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

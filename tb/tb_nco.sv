// tb_nco: runs the oscillator with a fixed frequency word, then with a
// timing error applied at two loop gains. Every clock the phase must advance
// by freq - (terr << kshift), and each output sample must be within 1 LSB of
// 512 + 511 sin(2 pi (p + 0.5) / 1024) for the top 10 phase bits p of the
// phase it was taken from. The number of output periods over a run must
// match the frequency word.
// The stimulus, the reference model and the expected values are this
// testbench's own; the block's behaviour under test is described in its
// module header. A watchdog ends the run with a failure if it hangs.
module tb_nco;
  localparam int PW = 24, TW = 12;
  logic clk = 0, rst_n = 0;
  logic [PW-1:0] freq, phase;
  logic signed [TW-1:0] terr;
  logic terr_vld;
  logic [3:0] kshift;
  logic [9:0] sample;
  int checks = 0, failures = 0;

  nco #(.PW(PW), .TW(TW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int maxdev = 0;
    freq = 24'd300000; terr = 0; terr_vld = 0; kshift = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int step = 0; step < 3; step++) begin
      int periods, cyc;
      longint inc;
      bit prev_hi;
      @(negedge clk);
      if (step == 1) begin terr = 12'sd5;  kshift = 4'd8; terr_vld = 1; end
      if (step == 2) begin terr = -12'sd7; kshift = 4'd10; terr_vld = 1; end
      @(negedge clk); terr_vld = 0;
      inc = longint'(freq) - longint'(terr) * (longint'(1) << kshift);
      periods = 0; cyc = 0; prev_hi = 1;
      for (int i = 0; i < 20000; i++) begin
        logic [PW-1:0] ph0;
        real expv;
        int dev;
        ph0 = phase;
        @(posedge clk); #1;
        checks++;
        if (phase !== PW'(longint'(ph0) + inc)) begin
          failures++;
          if (failures < 10) $display("phase step %0d", phase - ph0);
        end
        expv = 512.0 + 511.0 * $sin(2.0 * 3.14159265358979 * (real'(ph0[PW-1:PW-10]) + 0.5) / 1024.0);
        dev = int'(real'(sample) - expv);
        if (dev < 0) dev = -dev;
        if (dev > maxdev) maxdev = dev;
        checks++;
        if (dev > 1) begin
          failures++;
          if (failures < 10) $display("sample %0d expected %f", sample, expv);
        end
        if (sample >= 512 && !prev_hi) periods++;
        prev_hi = sample >= 512;
        cyc++;
        @(negedge clk);
      end
      checks++;
      begin
        int expp;
        expp = int'((real'(inc) * cyc) / 16777216.0);
        if (periods < expp - 1 || periods > expp + 1) begin
          failures++; $display("periods %0d expected %0d", periods, expp);
        end
      end
    end
    $display("max deviation %0d LSB", maxdev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

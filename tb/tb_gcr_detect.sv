// tb_gcr_detect: the averaged line is the reference moved by a known lag
// plus a weaker echo 30 samples later and noise. The correlator's peak list
// (the NPK strongest local maxima of |c|, sorted, with their lags), the
// presence flag and the time from start to done (NLAG * CORR_LEN + 2 clocks)
// are compared with a direct computation of all NLAG correlations. The two
// strongest peaks must sit at the main signal's and the echo's lags. A
// second run with noise only must report no GCR.
// The stimulus, the reference model and the expected values are this
// testbench's own; the block's behaviour under test is described in its
// module header. A watchdog ends the run with a failure if it hangs.
module tb_gcr_detect;
  import gc_pkg::*;
  localparam int CORR_LEN = 256, NLAG = 128;
  logic clk = 0, rst_n = 0;
  logic start, busy, done, present;
  logic [9:0] avg_addr, ref_addr;
  logic signed [DW-1:0] avg_data, ref_data;
  logic [30:0] th, peak;
  logic [6:0] peak_lag;
  localparam int NPK = 4;
  logic [30:0] pk_mag [NPK];
  logic [6:0] pk_lag [NPK];
  int checks = 0, failures = 0;

  gcr_detect #(.CORR_LEN(CORR_LEN), .NLAG(NLAG)) dut (.*);

  int avg_m [1024];
  int ref_m [1024];
  assign avg_data = DW'(avg_m[avg_addr]);
  assign ref_data = DW'(ref_m[ref_addr]);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; th = 31'd500000;
    foreach (ref_m[i]) begin ref_m[i] = ($urandom_range(0, 1)) ? 100 : -100; avg_m[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      longint best, c;
      longint cm [NLAG];
      longint emag [NPK];
      int elag [NPK];
      int best_lag, cyc, shift;
      best = 0; best_lag = 0; cyc = 0; shift = 19;
      for (int i = 0; i < 1024; i++) begin
        int v;
        v = int'($urandom_range(0, 40)) - 20;
        if (run == 0) begin
          // main signal moved by shift: the peak is at lag NLAG/2 + shift
          if (i - shift >= 0) v += ref_m[i - shift];
          if (i - shift - 30 >= 0) v += (ref_m[i - shift - 30] * 2) / 5;
        end
        avg_m[i] = v;
      end
      for (int l = 0; l < NLAG; l++) begin
        c = 0;
        for (int m = 0; m < CORR_LEN; m++) c += avg_m[m + l] * ref_m[m + NLAG / 2];
        if (c < 0) c = -c;
        cm[l] = c;
        if (c > best) begin best = c; best_lag = l; end
      end
      // local maxima, strongest first (ties keep the lower lag first)
      for (int k = 0; k < NPK; k++) begin emag[k] = 0; elag[k] = 0; end
      for (int l = 0; l < NLAG; l++) begin
        longint left, right;
        left = (l > 0) ? cm[l-1] : 0;
        right = (l < NLAG - 1) ? cm[l+1] : 0;
        if (cm[l] > left && cm[l] >= right) begin
          for (int k = 0; k < NPK; k++)
            if (cm[l] > emag[k]) begin
              for (int j = NPK - 1; j > k; j--) begin emag[j] = emag[j-1]; elag[j] = elag[j-1]; end
              emag[k] = cm[l]; elag[k] = l;
              break;
            end
        end
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks += 4;
      if (cyc != NLAG * CORR_LEN + 2) begin failures++; $display("latency %0d", cyc); end
      if (peak !== 31'(best)) begin failures++; $display("peak %0d exp %0d", peak, best); end
      if (peak_lag !== 7'(best_lag)) begin failures++; $display("lag %0d exp %0d", peak_lag, best_lag); end
      if (present !== (best >= th)) begin failures++; $display("present %0d", present); end
      checks++;
      if (present !== (run == 0)) begin failures++; $display("run %0d present %0d", run, present); end
      for (int k = 0; k < NPK; k++) begin
        checks++;
        if (pk_mag[k] !== 31'(emag[k]) || pk_lag[k] !== 7'(elag[k])) begin
          failures++; $display("peak %0d: %0d@%0d exp %0d@%0d", k, pk_mag[k], pk_lag[k], emag[k], elag[k]);
        end
      end
      if (run == 0) begin
        checks += 2;
        if (peak_lag != 7'(NLAG / 2 + shift)) failures++;
        if (pk_lag[1] != 7'(NLAG / 2 + shift + 30)) begin failures++; $display("echo peak at %0d", pk_lag[1]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

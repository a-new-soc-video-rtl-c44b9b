// tb_adapt_ctrl: walks the controller through every transition: no GCR
// (stays bypassed), GCR found (Fast, coefficients cleared), Fast lines with
// a moderate error until fast_lines is reached (Slow), an error burst in
// Slow (re-initialisation back to Fast, counted), a small error in Fast
// (Slow at once), GCR lost (bypass) and a channel change (bypass, clear).
// The |error| sum of each line is compared with the model's sum.
// The stimulus, the reference model and the expected values are this
// testbench's own; the block's behaviour under test is described in its
// module header. A watchdog ends the run with a failure if it hangs.
module tb_adapt_ctrl;
  import gc_pkg::*;
  localparam int ACCW = 8, EW = 24;
  logic clk = 0, rst_n = 0;
  logic chan_change, det_done, det_present, err_en, line_done;
  logic signed [DW:0] err;
  logic [EW-1:0] conv_th, unstab_th, last_esum;
  logic [7:0] fast_lines, reinit;
  logic [ACCW-2:0] acc_fast, acc_slow, acc_lim;
  adapt_mode_e mode;
  logic adapt_en, bypass, coef_clr;
  int checks = 0, failures = 0, nclr = 0;

  adapt_ctrl #(.ACCW(ACCW), .EW(EW)) dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) if (rst_n && coef_clr) nclr++;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_mode(adapt_mode_e m, string what);
    checks++;
    if (mode !== m || bypass !== (m == M_BYPASS) || adapt_en !== (m != M_BYPASS) ||
        acc_lim !== ((m == M_SLOW) ? acc_slow : acc_fast)) begin
      failures++;
      $display("%s: mode %0d expected %0d", what, mode, m);
    end
  endtask

  task automatic pulse_det(bit present);
    @(negedge clk); det_done = 1; det_present = present;
    @(negedge clk); det_done = 0;
    #1;
  endtask

  // one GCR line of n errors of magnitude mag, then line_done
  task automatic gcr_line(int n, int mag);
    int s = 0;
    for (int i = 0; i < n; i++) begin
      int e;
      @(negedge clk);
      e = (i % 2) ? mag : -mag;
      err_en = 1; err = (DW+1)'(e); s += mag;
    end
    @(negedge clk); err_en = 0; line_done = 1;
    @(negedge clk); line_done = 0;
    #1;
    checks++;
    if (int'(last_esum) != s) begin failures++; $display("esum %0d exp %0d", last_esum, s); end
  endtask

  initial begin
    chan_change = 0; det_done = 0; det_present = 0; err_en = 0; err = 0; line_done = 0;
    conv_th = 24'd1000; unstab_th = 24'd50000; fast_lines = 8'd4; acc_fast = 7'd4; acc_slow = 7'd40;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_mode(M_BYPASS, "reset");
    pulse_det(0);
    expect_mode(M_BYPASS, "no gcr");
    nclr = 0;
    pulse_det(1);
    expect_mode(M_FAST, "gcr found");
    checks++; if (nclr != 1) begin failures++; $display("no clear on start"); end
    for (int l = 0; l < 3; l++) begin
      gcr_line(100, 50);   // 5000: between the thresholds
      expect_mode(M_FAST, "fast line");
    end
    gcr_line(100, 50);
    expect_mode(M_SLOW, "fast_lines reached");
    gcr_line(100, 50);
    expect_mode(M_SLOW, "slow line");
    nclr = 0;
    gcr_line(200, 300);    // 60000: unstable
    expect_mode(M_FAST, "re-init");
    checks++; if (reinit != 8'd1 || nclr != 1) begin failures++; $display("reinit %0d clr %0d", reinit, nclr); end
    gcr_line(100, 5);      // 500: converged
    expect_mode(M_SLOW, "converged");
    pulse_det(0);
    expect_mode(M_BYPASS, "gcr lost");
    gcr_line(100, 300);    // ignored while bypassed
    expect_mode(M_BYPASS, "bypassed line");
    checks++; if (reinit != 8'd1) failures++;
    pulse_det(1);
    expect_mode(M_FAST, "gcr back");
    nclr = 0;
    @(negedge clk); chan_change = 1;
    @(negedge clk); chan_change = 0;
    #1;
    expect_mode(M_BYPASS, "channel change");
    checks++; if (nclr != 1) begin failures++; $display("no clear on channel change"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

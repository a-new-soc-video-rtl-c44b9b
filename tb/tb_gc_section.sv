// tb_gc_section: checks one 72-tap section against a reference model.
// Part 1 loads random coefficients, streams random samples and compares the
// section sum (including saturation to 18 bits with large coefficients)
// every clock, also with the section split (upper 36 taps fed from a second
// input). Part 2 clears the coefficients and adapts with random
// thresholded errors, modelling the per-tap accumulators and the +/-1
// coefficient steps, and compares every coefficient afterwards.
// The stimulus, the reference model and the expected values are this
// testbench's own; the block's behaviour under test is described in its
// module header. A watchdog ends the run with a failure if it hangs.
module tb_gc_section;
  import gc_pkg::*;
  localparam int NT = 72, ACCW = 8;
  logic clk = 0, rst_n = 0;
  logic signed [DW-1:0] din, din2;
  logic split;
  logic upd_en, coef_clr, coef_we;
  logic signed [1:0] e_dir;
  logic [DW-2:0] th_y;
  logic [ACCW-2:0] acc_lim;
  logic [6:0] coef_idx;
  logic signed [CW-1:0] coef_wd, coef_rd;
  logic signed [IW-1:0] sum;
  int checks = 0, failures = 0;

  gc_section #(.NT(NT), .ACCW(ACCW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_coef [NT];
  int m_acc  [NT];
  int m_tap  [NT];
  int nsat = 0;

  function automatic int tsgn(int v, int th);
    if (v > th) return 1;
    if (-v > th) return -1;
    return 0;
  endfunction

  task automatic shift_in(int v);
    for (int j = NT-1; j > 0; j--) m_tap[j] = m_tap[j-1];
    m_tap[0] = v;
  endtask

  initial begin
    longint s;
    din = 0; din2 = 0; split = 0; upd_en = 0; coef_clr = 0; coef_we = 0; e_dir = 0; th_y = 0;
    acc_lim = 4; coef_idx = 0; coef_wd = 0;
    foreach (m_tap[j]) m_tap[j] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- part 1: MAC ----
    // pass 2 splits the section: the upper half takes din2
    for (int pass = 0; pass < 3; pass++) begin
      split = (pass == 2);
      for (int j = 0; j < NT; j++) begin
        @(negedge clk);
        coef_we = 1; coef_idx = 7'(j);
        m_coef[j] = pass != 1 ? int'($urandom_range(0, 255)) - 128 : ((j % 2) ? 127 : -128);
        coef_wd = CW'(m_coef[j]);
      end
      @(negedge clk); coef_we = 0;
      for (int i = 0; i < 300; i++) begin
        @(negedge clk);
        // din is the first tap: compare the combinational sum
        m_tap[0] = pass == 0 ? int'($urandom_range(0, 1023)) - 512 : ((i % 2) ? 511 : -512);
        din = DW'(m_tap[0]);
        if (split) begin
          m_tap[NT/2] = int'($urandom_range(0, 1023)) - 512;
          din2 = DW'(m_tap[NT/2]);
        end
        #1;
        s = 0;
        for (int j = 0; j < NT; j++) s += m_tap[j] * m_coef[j];
        if (s > 131071) begin s = 131071; nsat++; end
        if (s < -131072) begin s = -131072; nsat++; end
        if (i >= NT) begin
          checks++;
          if (sum !== IW'(s)) begin
            failures++;
            if (failures < 10) $display("MAC i=%0d sum=%0d exp=%0d", i, sum, s);
          end
        end
        @(posedge clk);
        for (int j = NT-1; j > 0; j--) m_tap[j] = m_tap[j-1];
      end
    end
    checks++;
    if (nsat == 0) begin failures++; $display("saturation never exercised"); end
    // ---- part 2: adaptation ----
    @(negedge clk); coef_clr = 1; din = '0; split = 0;
    @(negedge clk); coef_clr = 0;
    repeat (NT + 2) @(negedge clk);
    foreach (m_tap[j]) m_tap[j] = 0;
    foreach (m_coef[j]) begin m_coef[j] = 0; m_acc[j] = 0; end
    th_y = 9'd100; acc_lim = 7'd3; upd_en = 1;
    for (int i = 0; i < 2000; i++) begin
      int ed;
      m_tap[0] = int'($urandom_range(0, 1023)) - 512;
      din = DW'(m_tap[0]);
      ed = int'($urandom_range(0, 2)) - 1;
      if (i % 3 != 0) ed = 1;   // bias so coefficients drift
      e_dir = 2'(ed);
      @(posedge clk);
      if (ed != 0)
        for (int j = 0; j < NT; j++) begin
          int a;
          a = m_acc[j] + ed * tsgn(m_tap[j], 100);
          if (a >= 3) begin a = 0; if (m_coef[j] < 127) m_coef[j]++; end
          else if (a <= -3) begin a = 0; if (m_coef[j] > -128) m_coef[j]--; end
          m_acc[j] = a;
        end
      for (int j = NT-1; j > 0; j--) m_tap[j] = m_tap[j-1];
      @(negedge clk);
    end
    upd_en = 0;
    begin
      int nz = 0;
      for (int j = 0; j < NT; j++) begin
        coef_idx = 7'(j);
        #1;
        checks++;
        if (m_coef[j] != 0) nz++;
        if (coef_rd !== CW'(m_coef[j])) begin
          failures++;
          if (failures < 20) $display("coef %0d = %0d exp %0d", j, coef_rd, m_coef[j]);
        end
      end
      checks++;
      if (nz < NT / 2) begin failures++; $display("adaptation moved only %0d coefficients", nz); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

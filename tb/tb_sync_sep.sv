// tb_sync_sep: drives synthetic NTSC-like fields (910-sample lines, 67-sample
// horizontal sync, three lines of broad vertical pulses at half-line spacing,
// an equalizing pulse at mid-line, one line two samples long) and checks:
// one hs per line (half-line pulses rejected), one vs per field, the line
// number at each line start, the timing error of the long and normal lines,
// and the GCR window's line, first sample, length and end pulse.
// The stimulus, the reference model and the expected values are this
// testbench's own; the block's behaviour under test is described in its
// module header. A watchdog ends the run with a failure if it hangs.
module tb_sync_sep;
  localparam int DW = 10, LINE_LEN = 910, NL = 24, WIN = 100;
  logic clk = 0, rst_n = 0;
  logic [DW-1:0] video, sync_th;
  logic [9:0] gcr_line;
  logic [10:0] win_start;
  logic hs, vs, field, terr_vld, gcr_win, gcr_end;
  logic [10:0] hpos, gcr_pos;
  logic [9:0] line;
  logic signed [11:0] terr;
  int checks = 0, failures = 0;

  sync_sep #(.LINE_LEN(LINE_LEN), .VS_HOLDOFF(10), .VS_LINE(4), .WIN_LEN(WIN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int k, s, f;                 // TB field, line and sample being driven
  int n_hs = 0, n_vs = 0, n_terr = 0, n_win = 0, n_end = 0, win_first = -1;
  bit vs_seen = 0;

  function automatic logic [DW-1:0] sample(int line_i, int smp, int len);
    if (line_i < 3) begin
      if ((smp < 388) || (smp >= 455 && smp < 455 + 388)) return 10'd40;
      return 10'd300;
    end
    if (smp < 67) return 10'd40;
    if (line_i == 3 && smp >= 455 && smp < 455 + 33) return 10'd40;   // equalizing pulse
    return 10'(300 + (smp * 7 + line_i * 13) % 500);
    // len unused for content
  endfunction

  // monitors (outputs are registered: they describe the previous sample)
  always @(posedge clk) if (rst_n) begin
    #1;
    if (hs) begin
      n_hs++;
      if (vs_seen && k != 0) begin
        checks++;
        if (int'(line) != 4 + k) begin
          failures++;
          if (failures < 10) $display("line %0d expected %0d", line, 4 + k);
        end
      end
    end
    if (vs) begin
      n_vs++; vs_seen = 1;
      checks++;
      if (k != 0 || line != 10'd4) begin failures++; $display("vs in line %0d", k); end
    end
    if (terr_vld && vs_seen) begin
      n_terr++;
      checks++;
      if (int'(terr) != ((k == 11) ? 2 : 0)) begin
        failures++;
        if (failures < 10) $display("terr %0d at line %0d", terr, k);
      end
    end
    if (gcr_win && vs_seen) begin
      if (int'(gcr_pos) == 0) begin
        win_first = s;
        checks++;
        if (4 + k != int'(gcr_line) || s != int'(win_start) + 1) begin
          failures++; $display("window opens at line %0d sample %0d", k, s);
        end
      end
      n_win++;
    end
    if (gcr_end) n_end++;
  end

  initial begin
    video = 10'd300; sync_th = 10'd100; gcr_line = 10'd12; win_start = 11'd150;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (f = 0; f < 4; f++)
      for (k = 0; k < NL; k++) begin
        int len;
        len = (k == 10) ? LINE_LEN + 2 : LINE_LEN;
        for (s = 0; s < len; s++) begin
          @(negedge clk);
          video = sample(k, s, len);
        end
      end
    @(negedge clk);
    checks++;
    if (n_vs != 4) begin failures++; $display("vs count %0d", n_vs); end
    checks++;
    if (n_hs < 4 * NL - 1 || n_hs > 4 * NL) begin failures++; $display("hs count %0d", n_hs); end
    checks++;
    if (n_end < 4 || n_win != n_end * WIN) begin failures++; $display("window %0d samples %0d ends", n_win, n_end); end
    checks++;
    if (n_terr < 3 * NL - 2) begin failures++; $display("terr count %0d", n_terr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

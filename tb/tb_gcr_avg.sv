// tb_gcr_avg: two averaging sequences of 8 windowed lines each. Every line
// carries a DC level and static content plus the GCR with the line's
// polarity (4 positive, 4 negative) and random noise. After each sequence
// done must pulse once, and every read-back position must equal the
// model's sum over lines of (+/-x), shifted right by 3, which removes the DC
// and static content; without noise it must equal the GCR exactly.
// The stimulus, the reference model and the expected values are this
// testbench's own; the block's behaviour under test is described in its
// module header. A watchdog ends the run with a failure if it hangs.
module tb_gcr_avg;
  import gc_pkg::*;
  localparam int LEN = 64;
  logic clk = 0, rst_n = 0;
  logic start, win, pol, line_end, done;
  logic [5:0] pos, rd_addr;
  logic signed [DW-1:0] x, rd_data;
  int checks = 0, failures = 0, ndone = 0;

  gcr_avg #(.LEN(LEN), .NAVG_LOG2(3)) dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) if (done) ndone++;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int g [LEN];
  int sum [LEN];
  bit pseq [8] = '{1, 0, 0, 1, 1, 0, 1, 0};

  initial begin
    start = 0; win = 0; pol = 0; line_end = 0; pos = 0; rd_addr = 0; x = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int seq = 0; seq < 2; seq++) begin
      foreach (g[p]) begin g[p] = int'($urandom_range(0, 300)) - 150; sum[p] = 0; end
      for (int l = 0; l < 8; l++) begin
        pol = pseq[l];
        for (int p = 0; p < LEN; p++) begin
          int v;
          @(negedge clk);
          v = -100 + (p % 7) * 10 + (pseq[l] ? g[p] : -g[p]);
          if (seq == 1) v += int'($urandom_range(0, 20)) - 10;
          win = 1; pos = 6'(p); x = DW'(v);
          sum[p] += pseq[l] ? v : -v;
        end
        @(negedge clk); win = 0; line_end = 1;
        @(negedge clk); line_end = 0;
        repeat (20) @(negedge clk);
      end
      checks++;
      if (ndone != seq + 1) begin failures++; $display("done count %0d", ndone); end
      for (int p = 0; p < LEN; p++) begin
        int e;
        rd_addr = 6'(p); #1;
        e = (seq == 0) ? g[p] : (sum[p] >>> 3);
        checks++;
        if (rd_data !== DW'(e)) begin
          failures++;
          if (failures < 10) $display("seq %0d pos %0d avg %0d exp %0d", seq, p, rd_data, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

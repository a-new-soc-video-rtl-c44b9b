// tb_dac_decoder: sweeps all 1024 codes and then random codes. Two clocks
// after each code the unary cells that are on must be exactly those whose
// place in the switching sequence is at most code[9:4], the binary switches
// must equal code[3:0], the digital output the code, and the summed current
// (16 per unit cell plus the binary weights) must equal the code.
// The stimulus, the reference model and the expected values are this
// testbench's own; the block's behaviour under test is described in its
// module header. A watchdog ends the run with a failure if it hangs.
module tb_dac_decoder;
  logic clk = 0, rst_n = 0;
  logic [9:0] code, dout;
  logic [63:0] cells;
  logic [3:0] bin;
  int checks = 0, failures = 0;

  dac_decoder dut (.*);

  // order in which each cell of the 4 x 16 array turns on, row by row
  int seq [64] = '{
    62, 58, 54, 50, 49, 53, 57, 61, 31, 27, 23, 19, 20, 24, 28, 32,
    46, 42, 38, 34, 33, 37, 41, 45, 15, 11,  7,  3,  4,  8, 12, 16,
    14, 10,  6,  2,  1,  5,  9, 13, 47, 43, 39, 35, 36, 40, 44, 48,
    30, 26, 22, 18, 17, 21, 25, 29, 63, 59, 55, 51, 52, 56, 60, 64};

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hist [$];

  initial begin
    code = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1024 + 3000; i++) begin
      int c;
      @(negedge clk);
      c = (i < 1024) ? i : int'($urandom_range(0, 1023));
      code = 10'(c);
      hist.push_back(c);
      if (hist.size() > 3) begin
        int e, t, cur;
        void'(hist.pop_front());
        e = hist[0];   // code applied two clocks earlier
        t = e >> 4;
        cur = 0;
        checks++;
        for (int p = 0; p < 64; p++) begin
          if (cells[p] !== (seq[p] <= t)) begin
            failures++;
            if (failures < 10) $display("code %0d cell %0d = %0d", e, p, cells[p]);
            break;
          end
          cur += cells[p] ? 16 : 0;
        end
        cur += int'(bin);
        checks += 3;
        if (bin !== 4'(e)) failures++;
        if (dout !== 10'(e)) failures++;
        if (cur != e) begin failures++; if (failures < 10) $display("current %0d code %0d", cur, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

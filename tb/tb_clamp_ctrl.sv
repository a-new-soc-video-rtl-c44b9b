// tb_clamp_ctrl: hs pulses every 910 clocks with a new clamp position,
// length and reference each line (sync tip and back porch settings); the
// clamp must be high exactly in clocks t+1+m for pos <= m < pos+len after an
// hs in clock t, never while disabled, and clamp_ref must follow ref_sel.
// The stimulus, the reference model and the expected values are this
// testbench's own; the block's behaviour under test is described in its
// module header. A watchdog ends the run with a failure if it hangs.
module tb_clamp_ctrl;
  localparam int HW = 11;
  logic clk = 0, rst_n = 0;
  logic en, hs, ref_sel, clamp, clamp_ref;
  logic [HW-1:0] clamp_pos, clamp_len;
  int checks = 0, failures = 0, nhigh = 0;

  clamp_ctrl #(.HW(HW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; hs = 0; ref_sel = 0; clamp_pos = 0; clamp_len = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < 12; l++) begin
      int p, q;
      p = (l % 2) ? int'($urandom_range(70, 120)) : int'($urandom_range(0, 10));
      q = int'($urandom_range(1, 40));
      @(negedge clk);
      en = (l != 5); clamp_pos = HW'(p); clamp_len = HW'(q); ref_sel = l[0];
      hs = 1;
      #1 checks++; if (clamp) failures++;
      @(negedge clk); hs = 0;
      for (int m = 0; m < 909; m++) begin
        bit exp;
        exp = en && m >= p && m < p + q;
        #1;
        checks++;
        if (clamp) nhigh++;
        if (clamp !== exp || clamp_ref !== l[0]) begin
          failures++;
          if (failures < 10) $display("line %0d m=%0d clamp=%0d exp=%0d", l, m, clamp, exp);
        end
        @(negedge clk);
      end
    end
    checks++;
    if (nhigh == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

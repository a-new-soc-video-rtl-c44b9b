// tb_gcr_ref_ram: fills the reference memory with a known pattern, then
// reads random addresses through both read ports at once and compares.
// The stimulus, the reference model and the expected values are this
// testbench's own; the block's behaviour under test is described in its
// module header. A watchdog ends the run with a failure if it hangs.
module tb_gcr_ref_ram;
  import gc_pkg::*;
  localparam int DEPTH = 1024;
  logic clk = 0;
  logic we;
  logic [9:0] waddr, raddr_a, raddr_b;
  logic signed [DW-1:0] wdata, rdata_a, rdata_b;
  int checks = 0, failures = 0;
  int m [DEPTH];

  gcr_ref_ram #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr_a = 0; raddr_b = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      m[i] = int'($urandom_range(0, 1023)) - 512;
      we = 1; waddr = 10'(i); wdata = DW'(m[i]);
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 2000; i++) begin
      int a, b;
      a = int'($urandom_range(0, DEPTH-1)); b = int'($urandom_range(0, DEPTH-1));
      raddr_a = 10'(a); raddr_b = 10'(b);
      #1;
      checks += 2;
      if (rdata_a !== DW'(m[a])) failures++;
      if (rdata_b !== DW'(m[b])) failures++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

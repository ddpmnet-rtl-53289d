// tb_ddpm_modulator: checks the DDPM pulse positions of ddpm_modulator.
//
// An 8-bit and a 3-bit modulator are loaded with features and followed over
// whole 2^N periods. Every pulse is compared with a reference that finds the
// owning bit by counting the trailing ones of the position, and the number
// of ones per period must equal the feature. The 3-bit case X = 101b
// (0.625) must pulse at positions 0, 2, 3, 4 and 6.
module tb_ddpm_modulator;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load8, load3;
  logic [7:0] din8;
  logic [2:0] din3;
  logic p8, p3;
  int checks = 0, failures = 0;

  ddpm_modulator #(.N(8)) dut8 (.clk, .rst_n, .load(load8), .din(din8), .pulse(p8));
  ddpm_modulator #(.N(3)) dut3 (.clk, .rst_n, .load(load3), .din(din3), .pulse(p3));

  always #5 clk = ~clk;

  function automatic bit ref_bit(int x, int n, int pos);
    int k = 0;
    while (k < n && ((pos >> k) & 1) == 1) k++;
    if (k >= n) return 1'b0;
    return bit'((x >> (n - 1 - k)) & 1);
  endfunction

  task automatic check(bit got, bit exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    int xs[$];
    load8 = 0; load3 = 0; din8 = 0; din3 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // 3-bit example: X = 0.625 -> pulses at 0,2,3,4,6
    @(negedge clk); load3 = 1; din3 = 3'b101;
    @(negedge clk); load3 = 0;
    for (int t = 0; t < 16; t++) begin
      automatic bit e = (t % 8 == 0) || (t % 8 == 2) || (t % 8 == 3) || (t % 8 == 4) || (t % 8 == 6);
      check(p3, e, $sformatf("N=3 X=101 pos %0d", t));
      @(negedge clk);
    end
    // 8-bit features: full periods
    xs = '{0, 255, 128, 1, 170, 85};
    for (int i = 0; i < 10; i++) xs.push_back(int'($urandom_range(0, 255)));
    foreach (xs[i]) begin
      load8 = 1; din8 = 8'(xs[i]);
      @(negedge clk); load8 = 0;
      ones = 0;
      for (int t = 0; t < 256; t++) begin
        check(p8, ref_bit(xs[i], 8, t), $sformatf("N=8 X=%0d pos %0d", xs[i], t));
        ones += int'(p8);
        @(negedge clk);
      end
      checks++;
      if (ones != xs[i]) begin
        failures++;
        $display("FAIL X=%0d: %0d ones per period", xs[i], ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

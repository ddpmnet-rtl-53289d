// tb_ddpm_modulator_array: 27 x 2 modulators with independent port loads.
//
// The two ports are reloaded at random, independent times with random
// features for every row. A model keeps, per port, the loaded features and
// the cycles since the load, and predicts every one of the 54 pulse streams
// each cycle from the DDPM position rule (bit N-1-k at positions ending in
// exactly k ones).
module tb_ddpm_modulator_array;
  import ddpm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [MODS-1:0] load;
  logic [MODS-1:0][ROWS-1:0][FW-1:0] feat;
  logic [ROWS-1:0][MODS-1:0] pulse;
  int checks = 0, failures = 0;
  int mx[MODS][ROWS];
  int mpos[MODS];

  ddpm_modulator_array dut (.clk, .rst_n, .load, .feat, .pulse);

  always #5 clk = ~clk;

  function automatic bit ref_bit(int x, int n, int pos);
    int k = 0;
    pos = pos % (1 << n);
    while (k < n && ((pos >> k) & 1) == 1) k++;
    if (k >= n) return 1'b0;
    return bit'((x >> (n - 1 - k)) & 1);
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = '0; feat = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    load = '1;
    for (int k = 0; k < int'(MODS); k++)
      for (int r = 0; r < int'(ROWS); r++) begin
        feat[k][r] = FW'($urandom);
        mx[k][r] = int'(feat[k][r]);
      end
    @(negedge clk);
    mpos = '{0, 0};
    for (int cyc = 0; cyc < 3000; cyc++) begin
      // check the current cycle
      for (int r = 0; r < int'(ROWS); r++)
        for (int k = 0; k < int'(MODS); k++) begin
          checks++;
          if (pulse[r][k] !== ref_bit(mx[k][r], FW, mpos[k])) begin
            failures++;
            if (failures < 10) $display("FAIL row %0d port %0d pos %0d", r, k, mpos[k]);
          end
        end
      // schedule loads for the next edge
      for (int k = 0; k < int'(MODS); k++) begin
        load[k] = ($urandom_range(0, 99) < 3);
        for (int r = 0; r < int'(ROWS); r++) feat[k][r] = FW'($urandom);
      end
      @(negedge clk);
      for (int k = 0; k < int'(MODS); k++) begin
        if (load[k]) begin
          mpos[k] = 0;
          for (int r = 0; r < int'(ROWS); r++) mx[k][r] = int'(feat[k][r]);
        end else mpos[k]++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

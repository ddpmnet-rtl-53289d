// tb_conv_layer: one output row of a LeNet-5-style 5x5 convolution layer
// run on the full-size core, with the testbench acting as the scheduler.
//
// Layer: a random 8-bit input patch of 5 x 31 pixels, 30 kernels of 5x5
// signed weights with magnitudes 0..3 and a signed bias, ReLU. MAC row r
// computes output position r (27 positions), column c computes kernel c.
//
// Scheduling, as an off-line scheduler would do it:
//   * weight normalisation: the largest sum of |w| over a kernel (bias
//     included) is scaled to fill a 2^R-cycle window (R = 10), so one
//     weight unit lasts s = floor(2^R / max_sum) cycles;
//   * tap t of the kernel is fed through modulator port t mod 2 (ports
//     alternate, so the two active banks are both used); the bank word at
//     address t holds, in lane r, the pixel under tap t for output r;
//   * for tap t the columns count for |w|*s cycles in their own direction;
//     since a word is shared by all columns, the tap is cut into up to three
//     words at the distinct durations s, 2s, 3s, with NOP for columns that
//     are done. The first word of a tap reloads its port.
// The layer is run as two programs, as a kernel too long for the program
// memory would be: program A clears the counters and runs taps 0..12;
// program B rotates the banks and runs taps 13..24, the bias and the ReLU
// store, so the counters must keep their value between the runs. Taps
// 13..24 on port 1 come from the bank that is idle during program A; the
// testbench fills it while program A is running.
// Checks: every result against the exact DDPM pulse count (model written
// here from the pulse-position rule), against the ideal value
// s*sum(w*x)/256 + bias within 8 counts per tap (each of the 8 feature bits
// is off by less than one pulse), the idle-bank reports, and each run's
// length against its program.
module tb_conv_layer;
  import ddpm_pkg::*;
  localparam int R = ROWS, C = COLS, KT = 25, KSPLIT = 13, RBITS = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done;
  logic pm_we; logic [PM_AW-1:0] pm_waddr; pm_ctrl_t pm_wctrl; mac_op_t [C-1:0] pm_wops;
  logic im_we; logic [1:0] im_wbank, im_idle_bank; logic [BANK_AW-1:0] im_waddr;
  logic [$clog2(R)-1:0] im_wlane; logic [FW-1:0] im_wdata;
  logic dm_we; logic [DM_AW-1:0] dm_waddr; disp_t dm_wdata;
  logic [$clog2(R)-1:0] rd_row; logic [$clog2(C)-1:0] rd_col;
  logic signed [CNT_W-1:0] rd_data;
  int checks = 0, failures = 0;

  ddpmnet_top dut (.*);

  always #5 clk = ~clk;

  int img[5][R + 4];
  int w[C][KT];
  int bias[C];
  int s;
  logic refill_busy;
  pm_ctrl_t p_ctrl[PM_DEPTH];
  mac_op_t [C-1:0] p_ops[PM_DEPTH];
  int nwords, ndisp, prog_cycles;
  disp_t dlist[DM_DEPTH];

  function automatic bit ref_bit(int x, int pos);
    int k = 0;
    pos = pos % (1 << FW);
    while (k < FW && ((pos >> k) & 1) == 1) k++;
    if (k >= FW) return 1'b0;
    return bit'((x >> (FW - 1 - k)) & 1);
  endfunction

  function automatic int ones_in(int x, int d);
    int n = 0;
    for (int p = 0; p < d; p++) n += int'(ref_bit(x, p));
    return n;
  endfunction

  function automatic int pix(int r, int t);
    return img[t / 5][r + t % 5];
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  task automatic add_word(logic [1:0] ld, int dur, mac_op_t [C-1:0] ops);
    p_ctrl[nwords] = '0;
    p_ctrl[nwords].ld = ld;
    p_ctrl[nwords].dur = DUR_W'(dur - 1);
    p_ops[nwords] = ops;
    prog_cycles += dur;
    nwords++;
  endtask

  function automatic int kernel_scale();
    int maxsum = 0;
    for (int c = 0; c < C; c++) begin
      int sum = (bias[c] < 0) ? -bias[c] : bias[c];
      for (int t = 0; t < KT; t++) sum += (w[c][t] < 0) ? -w[c][t] : w[c][t];
      if (sum > maxsum) maxsum = sum;
    end
    return ((1 << RBITS) / maxsum > 256) ? 256 : (1 << RBITS) / maxsum;
  endfunction

  // program for taps t0..t1-1; 'first' clears the counters, 'last' adds the
  // bias and stores, 'rot' rotates the banks at the first word
  task automatic schedule(int t0, int t1, bit first, bit last, bit rot);
    int gx[2], gy[2];
    mac_op_t [C-1:0] ops;
    nwords = 0; ndisp = 0; prog_cycles = 1;
    gx = '{0, 0}; gy = '{0, 0};
    if (first) add_word(2'b00, 1, {C{OP_CLR}});
    for (int t = t0; t < t1; t++) begin
      int port = t % 2;
      // displacement to word t (x = t, y = 0) of this port's bank
      dlist[ndisp].dx = DX_W'(t - gx[port]);
      dlist[ndisp].dy = DY_W'(0 - gy[port]);
      ndisp++;
      gx[port] = t; gy[port] = 0;
      for (int m = 1; m <= 3; m++) begin
        for (int c = 0; c < C; c++) begin
          int a = (w[c][t] < 0) ? -w[c][t] : w[c][t];
          ops[c] = (a >= m) ? op_count(w[c][t] < 0, 2'(port)) : OP_NOP;
        end
        add_word((m == 1) ? (port == 0 ? 2'b01 : 2'b10) : 2'b00, s, ops);
        if (rot && t == t0 && m == 1) p_ctrl[nwords - 1].rot = 1'b1;
      end
    end
    if (last) begin
      for (int m = 1; m <= 3; m++) begin
        for (int c = 0; c < C; c++) begin
          int a = (bias[c] < 0) ? -bias[c] : bias[c];
          ops[c] = (a >= m) ? op_count(bias[c] < 0, 2'd2) : OP_NOP;
        end
        add_word(2'b00, s, ops);
      end
      add_word(2'b00, 1, {C{OP_STORE_RELU}});
    end
    p_ctrl[nwords - 1].halt = 1'b1;
  endtask

  task automatic write_tap(int b, int t);
    for (int r = 0; r < R; r++) begin
      im_we = 1; im_wbank = 2'(b); im_waddr = BANK_AW'(t); im_wlane = 5'(r);
      im_wdata = FW'(pix(r, t));
      @(negedge clk);
    end
    im_we = 0;
  endtask

  task automatic load_program();
    for (int i = 0; i < nwords; i++) begin
      pm_we = 1; pm_waddr = PM_AW'(i); pm_wctrl = p_ctrl[i]; pm_wops = p_ops[i];
      @(negedge clk);
    end
    pm_we = 0;
    for (int i = 0; i < ndisp; i++) begin
      dm_we = 1; dm_waddr = DM_AW'(i); dm_wdata = dlist[i];
      @(negedge clk);
    end
    dm_we = 0;
  endtask

  task automatic run_program(string name);
    int got_cycles = 1;
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done && got_cycles < 100000) begin
      @(negedge clk);
      got_cycles++;
    end
    chk(got_cycles == prog_cycles, $sformatf("%s took %0d cycles, expected %0d", name, got_cycles, prog_cycles));
    $display("%s: %0d program words, %0d cycles", name, nwords, got_cycles);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nrelu, maxerr;
    start = 0; pm_we = 0; im_we = 0; dm_we = 0; rd_row = 0; rd_col = 0;
    pm_waddr = 0; pm_wctrl = '0; pm_wops = '0; im_wbank = 0; im_waddr = 0; im_wlane = 0;
    im_wdata = 0; dm_waddr = 0; dm_wdata = '0;
    foreach (img[y, x]) img[y][x] = int'($urandom_range(0, 255));
    foreach (w[c, t]) w[c][t] = int'($urandom_range(0, 6)) - 3;
    foreach (bias[c]) bias[c] = int'($urandom_range(0, 6)) - 3;
    s = kernel_scale();
    $display("weight unit s = %0d cycles (window 2^%0d)", s, RBITS);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // taps 0..12: port t%2 reads bank t%2 (no rotation yet)
    for (int t = 0; t < KSPLIT; t++) write_tap(t % 2, t);
    // taps 13..24 run after one rotation: port 0 reads bank 1, port 1 bank 2;
    // bank 1 gets its part now, bank 2 (idle) is filled while program A runs
    for (int t = KSPLIT; t < KT; t += 2) write_tap(1, t + (KSPLIT % 2));
    chk(im_idle_bank == 2'd2, "bank 2 idle before program A");
    // ---- program A: taps 0..12, no store ----
    schedule(0, KSPLIT, 1'b1, 1'b0, 1'b0);
    load_program();
    fork
      run_program("program A (taps 0-12)");
      begin
        @(negedge clk);
        for (int t = KSPLIT + 1 - (KSPLIT % 2); t < KT; t += 2) write_tap(2, t);
        refill_busy = busy;
      end
    join
    chk(refill_busy, "idle bank refilled while the core was busy");
    // ---- program B: rotate, taps 13..24, bias, ReLU store ----
    schedule(KSPLIT, KT, 1'b0, 1'b1, 1'b1);
    load_program();
    run_program("program B (taps 13-24, bias, store)");
    chk(im_idle_bank == 2'd0, "bank 0 idle after the rotation");
    nrelu = 0; maxerr = 0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        automatic int exact = 0, ideal_num = 0, err = 0;
        automatic real ideal = 0.0;
        for (int t = 0; t < KT; t++) begin
          automatic int a = (w[c][t] < 0) ? -w[c][t] : w[c][t];
          automatic int n = ones_in(pix(r, t), a * s);
          exact += (w[c][t] < 0) ? -n : n;
          ideal_num += w[c][t] * pix(r, t);
        end
        exact += bias[c] * s;
        ideal = real'(ideal_num * s) / 256.0 + real'(bias[c] * s);
        if (exact < 0) begin exact = 0; nrelu++; end
        if (ideal < 0.0) ideal = 0.0;
        rd_row = 5'(r); rd_col = 5'(c);
        #1;
        chk(int'(rd_data) == exact, $sformatf("out(%0d,%0d) = %0d, exact pulse count %0d", r, c, rd_data, exact));
        err = int'(real'(rd_data) - ideal);
        if (err < 0) err = -err;
        if (err > maxerr) maxerr = err;
        chk(real'(rd_data) - ideal <= real'(8 * KT) && ideal - real'(rd_data) <= real'(8 * KT),
            $sformatf("out(%0d,%0d) = %0d too far from ideal %f", r, c, rd_data, ideal));
      end
    $display("outputs clamped by ReLU: %0d of %0d; largest |DDPM - ideal| = %0d counts", nrelu, R * C, maxerr);
    chk(nrelu > 0 && nrelu < R * C, "ReLU clamped some but not all outputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ddpmnet_top: end-to-end run of the whole accelerator at its default
// size (27 x 30 MAC array, 27 x 2 modulators, 3 x 135-word banks,
// 140-word program memory).
//
// Each run fills the input banks and the displacement list, writes a
// program of kernel windows, starts the core and, after done, reads all
// 810 MAC results through the memory-mapped port. Expected results come
// from a cycle-level model written in the testbench: it tracks the bank
// rotation, both read pointers, the DDPM position of every modulator port
// and all 810 counters, and finds each pulse by the trailing-ones rule.
//
// The first run is a single window and a model-free check of counting as
// multiplication: a weight of 256 cycles (a full DDPM period) on an 8-bit
// feature must give exactly the feature (even columns, count up) or its
// negation (odd columns, count down; ReLU columns give 0). The next two
// runs fill the program memory with random windows: runs of up/down counts on either port or the bias
// input, mid-window reloads of one port, bank rotations, NOPs, and STORE or
// STORE_RELU at the end. The third run refills the idle bank first. Every
// mechanism is counted and must occur at least once. The run length must
// equal the sum of the word hold times plus one cycle.
module tb_ddpmnet_top;
  import ddpm_pkg::*;
  localparam int R = ROWS, C = COLS;
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

  // ---- model state ----------------------------------------------------------
  int bank[3][BANK_DEPTH][R];
  pm_ctrl_t p_ctrl[PM_DEPTH];
  mac_op_t [C-1:0] p_ops[PM_DEPTH];
  disp_t dlist[DM_DEPTH];
  int nwords, ndisp;
  int m_base = 0;
  int mx[MODS][R], mpos[MODS];
  int px[MODS], py[MODS];
  int cnt[R][C], q[R][C];
  // mechanism counters
  int n_up, n_down, n_bias, n_clamp, n_neg_store, n_rot, n_ld1, n_ld2, n_midld, n_nop, n_exact;

  function automatic bit ref_bit(int x, int pos);
    int k = 0;
    pos = pos % (1 << FW);
    while (k < FW && ((pos >> k) & 1) == 1) k++;
    if (k >= FW) return 1'b0;
    return bit'((x >> (FW - 1 - k)) & 1);
  endfunction

  function automatic int wrap12(int v);
    v = v & 32'hFFF;
    return (v >= 2048) ? v - 4096 : v;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  // ---- program generation ---------------------------------------------------
  int gx[MODS], gy[MODS];  // pointer tracking while generating

  task automatic add_word(pm_ctrl_t ct, mac_op_t [C-1:0] ops);
    for (int k = 0; k < MODS; k++)
      if (ct.ld[k]) begin
        int tx = int'($urandom_range(0, XDIM - 1));
        int ty = int'($urandom_range(0, YDIM - 1));
        dlist[ndisp].dx = DX_W'(tx - gx[k]);
        dlist[ndisp].dy = DY_W'(ty - gy[k]);
        ndisp++;
        gx[k] = tx; gy[k] = ty;
      end
    p_ctrl[nwords] = ct;
    p_ops[nwords]  = ops;
    nwords++;
  endtask

  task automatic gen_program(bit exact_window);
    pm_ctrl_t ct;
    mac_op_t [C-1:0] ops;
    nwords = 0; ndisp = 0;
    gx = '{0, 0}; gy = '{0, 0};
    if (exact_window) begin
      ct = '0; ct.ld = 2'b11;
      add_word(ct, {C{OP_CLR}});
      ct = '0; ct.dur = 8'd255;
      for (int c = 0; c < C; c++) ops[c] = (c % 2 == 0) ? op_count(1'b0, 2'd0) : op_count(1'b1, 2'd1);
      add_word(ct, ops);
      ct = '0;
      for (int c = 0; c < C; c++) ops[c] = (c % 4 < 2) ? OP_STORE : OP_STORE_RELU;
      add_word(ct, ops);
    end
    while (!exact_window && nwords < PM_DEPTH - 12) begin
      // window start: reload both ports, maybe rotate, clear
      ct = '0; ct.ld = 2'b11; ct.rot = ($urandom_range(0, 2) == 0);
      add_word(ct, {C{OP_CLR}});
      for (int s = 0, ns = int'($urandom_range(3, 8)); s < ns; s++) begin
        ct = '0;
        ct.dur = DUR_W'($urandom_range(0, 40));
        if (s > 0 && $urandom_range(0, 3) == 0) ct.ld = ($urandom_range(0, 1) == 0) ? 2'b01 : 2'b10;
        for (int c = 0; c < C; c++) begin
          int r = int'($urandom_range(0, 99));
          ops[c] = (r < 40) ? op_count(1'b0, 2'($urandom_range(0, 1))) :
                   (r < 80) ? op_count(1'b1, 2'($urandom_range(0, 1))) :
                   (r < 90) ? op_count(1'($urandom), 2'd2) : OP_NOP;
        end
        add_word(ct, ops);
      end
      ct = '0;
      for (int c = 0; c < C; c++) ops[c] = ($urandom_range(0, 1) == 0) ? OP_STORE : OP_STORE_RELU;
      add_word(ct, ops);
    end
    p_ctrl[nwords - 1].halt = 1'b1;
  endtask

  // ---- host writes -----------------------------------------------------------
  task automatic write_bank(int b);
    for (int a = 0; a < int'(BANK_DEPTH); a++)
      for (int r = 0; r < R; r++) begin
        im_we = 1; im_wbank = 2'(b); im_waddr = BANK_AW'(a); im_wlane = 5'(r);
        im_wdata = FW'($urandom);
        bank[b][a][r] = int'(im_wdata);
        @(negedge clk);
      end
    im_we = 0;
  endtask

  task automatic write_program();
    for (int w = 0; w < nwords; w++) begin
      pm_we = 1; pm_waddr = PM_AW'(w); pm_wctrl = p_ctrl[w]; pm_wops = p_ops[w];
      @(negedge clk);
    end
    pm_we = 0;
    for (int i = 0; i < ndisp; i++) begin
      dm_we = 1; dm_waddr = DM_AW'(i); dm_wdata = dlist[i];
      @(negedge clk);
    end
    dm_we = 0;
  endtask

  // ---- cycle-level reference model -----------------------------------------
  task automatic model_fetch(int w, ref int di);
    if (p_ctrl[w].rot) begin m_base = (m_base + 1) % 3; n_rot++; end
    if (p_ctrl[w].ld == 2'b11) n_ld2++;
    else if (p_ctrl[w].ld != 2'b00) begin
      n_ld1++;
      if (w > 0 && p_ops[w][0] != OP_CLR) n_midld++;
    end
    for (int k = 0; k < MODS; k++) begin
      if (p_ctrl[w].ld[k]) begin
        int a;
        px[k] = (px[k] + int'(dlist[di].dx)) & 63;
        py[k] = (py[k] + int'(dlist[di].dy)) & 15;
        di++;
        a = py[k] * XDIM + px[k];
        for (int r = 0; r < R; r++) mx[k][r] = bank[(m_base + k) % 3][a][r];
        mpos[k] = 0;
      end else mpos[k]++;
    end
  endtask

  task automatic model_run(output int cycles);
    int di = 0;
    px = '{0, 0}; py = '{0, 0};
    cycles = 1;
    model_fetch(0, di);
    for (int w = 0; w < nwords; w++) begin
      for (int t = 0; t <= int'(p_ctrl[w].dur); t++) begin
        for (int c = 0; c < C; c++) begin
          mac_op_t o = p_ops[w][c];
          if (o == OP_NOP) n_nop++;
          for (int r = 0; r < R; r++) begin
            if (!o[3]) begin
              int b = (o[1:0] < 2) ? int'(ref_bit(mx[o[0]][r], mpos[o[0]])) : 1;
              if (o[1:0] >= 2) n_bias += b;
              else if (o[2]) n_down += b;
              else n_up += b;
              cnt[r][c] = wrap12(cnt[r][c] + (o[2] ? -b : b));
            end else if (o == OP_CLR) cnt[r][c] = 0;
            else if (o == OP_STORE_RELU) begin
              if (cnt[r][c] < 0) n_clamp++;
              q[r][c] = (cnt[r][c] < 0) ? 0 : cnt[r][c];
            end else if (o == OP_STORE) begin
              if (cnt[r][c] < 0) n_neg_store++;
              q[r][c] = cnt[r][c];
            end
          end
        end
        cycles++;
        if (t == int'(p_ctrl[w].dur) && w + 1 < nwords) model_fetch(w + 1, di);
        else for (int k = 0; k < MODS; k++) mpos[k]++;
      end
    end
  endtask

  task automatic run_and_check(int run, bit exact_window);
    int exp_cycles, got_cycles;
    model_run(exp_cycles);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    got_cycles = 1;
    while (!done) begin
      @(negedge clk);
      got_cycles++;
      if (got_cycles > 100000) break;
    end
    chk(got_cycles == exp_cycles, $sformatf("run %0d took %0d cycles, expected %0d", run, got_cycles, exp_cycles));
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        rd_row = 5'(r); rd_col = 5'(c);
        #1;
        chk(int'(rd_data) == q[r][c], $sformatf("run %0d MAC(%0d,%0d) = %0d, expected %0d", run, r, c, rd_data, q[r][c]));
      end
    if (exact_window) begin
      // no model involved: port 0 read bank 0 and port 1 bank 1 at the
      // first two displacements (pointers start at 0, no rotation yet)
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) begin
          int x0 = bank[0][int'(dlist[0].dy) * XDIM + int'(dlist[0].dx)][r];
          int x1 = bank[1][int'(dlist[1].dy) * XDIM + int'(dlist[1].dx)][r];
          int e = (c % 4 == 0) ? x0 : (c % 4 == 1) ? -x1 : (c % 4 == 2) ? x0 : 0;
          rd_row = 5'(r); rd_col = 5'(c);
          #1;
          n_exact++;
          chk(int'(rd_data) == e, $sformatf("W=256 product MAC(%0d,%0d) = %0d, expected %0d", r, c, rd_data, e));
        end
    end
    $display("run %0d: %0d program words, %0d cycles", run, nwords, got_cycles);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; pm_we = 0; im_we = 0; dm_we = 0; rd_row = 0; rd_col = 0;
    pm_waddr = 0; pm_wctrl = '0; pm_wops = '0; im_wbank = 0; im_waddr = 0; im_wlane = 0;
    im_wdata = 0; dm_waddr = 0; dm_wdata = '0;
    foreach (cnt[r, c]) begin cnt[r][c] = 0; q[r][c] = 0; end
    {n_up, n_down, n_bias, n_clamp, n_neg_store, n_rot, n_ld1, n_ld2, n_midld, n_nop, n_exact} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int b = 0; b < 3; b++) write_bank(b);

    // ---- run 0 ----
    // ---- run 0: one window with 256-cycle weights ----
    gen_program(1'b1);
    write_program();
    run_and_check(0, 1'b1);

    // ---- run 1: a full program memory of random windows ----
    gen_program(1'b0);
    write_program();
    run_and_check(1, 1'b0);

    // ---- run 2: refill the idle bank, new program ----
    chk(int'(im_idle_bank) == (m_base + 2) % 3, "idle bank after run 1");
    write_bank((m_base + 2) % 3);
    gen_program(1'b0);
    write_program();
    run_and_check(2, 1'b0);

    $display("mechanisms: up=%0d down=%0d bias=%0d relu_clamp=%0d neg_store=%0d rot=%0d ld_one=%0d ld_both=%0d mid_window_ld=%0d nop=%0d exact=%0d",
             n_up, n_down, n_bias, n_clamp, n_neg_store, n_rot, n_ld1, n_ld2, n_midld, n_nop, n_exact);
    chk(n_up > 0, "count-up happened");
    chk(n_down > 0, "count-down happened");
    chk(n_bias > 0, "bias counting happened");
    chk(n_clamp > 0, "ReLU clamp happened");
    chk(n_neg_store > 0, "signed store happened");
    chk(n_rot > 0, "bank rotation happened");
    chk(n_ld1 > 0, "single-port load happened");
    chk(n_ld2 > 0, "two-port load happened");
    chk(n_midld > 0, "mid-window load happened");
    chk(n_nop > 0, "NOP happened");
    chk(n_exact > 0, "exact full-period products checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

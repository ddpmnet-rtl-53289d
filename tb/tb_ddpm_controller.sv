// tb_ddpm_controller: sequencing of the program counter and controller.
//
// The testbench holds the program memory and displacement list itself and
// answers the controller's read addresses combinationally. A random program
// (random hold times, modulator loads, rotations, instructions) with
// displacements that keep the pointers inside the bank is turned into a
// cycle-by-cycle expectation: the column instructions, which modulator ports
// load, the bank address of each load, rotations, busy and the one-cycle
// done pulse. The program runs twice to check that start re-initialises
// the pointers. The run length must be sum(dur+1) + 1 cycles.
module tb_ddpm_controller;
  import ddpm_pkg::*;
  localparam int NW = 40;
  localparam int MAXC = 2000;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done, mem_rot;
  logic [PM_AW-1:0] pm_raddr;
  pm_ctrl_t pm_ctrl;
  mac_op_t [COLS-1:0] pm_ops, mac_op;
  logic [DM_AW-1:0] dm_raddr;
  disp_t dm_d0, dm_d1;
  logic [MODS-1:0][BANK_AW-1:0] mem_raddr;
  logic [MODS-1:0] mod_load;
  int checks = 0, failures = 0;

  pm_ctrl_t p_ctrl[PM_DEPTH];
  mac_op_t [COLS-1:0] p_ops[PM_DEPTH];
  disp_t dlist[DM_DEPTH];
  // expected trace, index = cycles after the start edge
  mac_op_t [COLS-1:0] e_op[MAXC];
  logic [MODS-1:0] e_load[MAXC];
  int e_addr[MAXC][MODS];
  logic e_rot[MAXC];
  int ncyc;

  ddpm_controller dut (.clk, .rst_n, .start, .busy, .done, .pm_raddr, .pm_ctrl, .pm_ops,
                       .dm_raddr, .dm_d0, .dm_d1, .mem_rot, .mem_raddr, .mod_load, .mac_op);

  always_comb begin
    pm_ctrl = p_ctrl[pm_raddr];
    pm_ops  = p_ops[pm_raddr];
    dm_d0   = dlist[dm_raddr];
    dm_d1   = dlist[DM_AW'(dm_raddr + 1)];
  end

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  task automatic build();
    int px[MODS], py[MODS];
    int di = 0, cyc = 0;
    px = '{0, 0}; py = '{0, 0};
    e_op[0] = {COLS{OP_NOP}};
    for (int w = 0; w < NW; w++) begin
      p_ctrl[w].dur  = DUR_W'($urandom_range(0, 6));
      p_ctrl[w].ld   = MODS'($urandom);
      p_ctrl[w].rot  = ($urandom_range(0, 9) == 0);
      p_ctrl[w].halt = (w == NW - 1);
      for (int c = 0; c < COLS; c++) p_ops[w][c] = mac_op_t'($urandom);
      // fetch of word w happens in cycle 'cyc'
      e_load[cyc] = p_ctrl[w].ld;
      e_rot[cyc]  = p_ctrl[w].rot;
      for (int k = 0; k < MODS; k++)
        if (p_ctrl[w].ld[k]) begin
          int tx = int'($urandom_range(0, XDIM - 1));
          int ty = int'($urandom_range(0, YDIM - 1));
          dlist[di].dx = DX_W'(tx - px[k]);
          dlist[di].dy = DY_W'(ty - py[k]);
          di++;
          px[k] = tx; py[k] = ty;
          e_addr[cyc][k] = ty * XDIM + tx;
        end
      for (int t = 0; t <= int'(p_ctrl[w].dur); t++) begin
        cyc++;
        e_op[cyc]   = p_ops[w];
        e_load[cyc] = '0;
        e_rot[cyc]  = 1'b0;
      end
    end
    ncyc = cyc + 1;  // done pulses in the cycle after the last word
    e_op[ncyc] = {COLS{OP_NOP}};
    e_load[ncyc] = '0; e_rot[ncyc] = 1'b0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0;
    foreach (p_ctrl[i]) begin p_ctrl[i] = '0; p_ctrl[i].halt = 1'b1; p_ops[i] = {COLS{OP_NOP}}; end
    foreach (dlist[i]) dlist[i] = '0;
    build();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(!busy && mac_op == {COLS{OP_NOP}}, "idle after reset");
    for (int run = 0; run < 2; run++) begin
      automatic int donecyc = -1;
      start = 1;
      for (int cyc = 0; cyc <= ncyc; cyc++) begin
        #1;
        chk(mac_op == e_op[cyc], $sformatf("run %0d cycle %0d: column instructions", run, cyc));
        chk(mod_load == e_load[cyc], $sformatf("run %0d cycle %0d: loads %b exp %b", run, cyc, mod_load, e_load[cyc]));
        chk(mem_rot == e_rot[cyc], $sformatf("run %0d cycle %0d: rotation", run, cyc));
        for (int k = 0; k < MODS; k++)
          if (e_load[cyc][k])
            chk(int'(mem_raddr[k]) == e_addr[cyc][k],
                $sformatf("run %0d cycle %0d: port %0d addr %0d exp %0d", run, cyc, k, mem_raddr[k], e_addr[cyc][k]));
        chk(busy == (cyc > 0 && cyc < ncyc), $sformatf("run %0d cycle %0d: busy", run, cyc));
        if (done) donecyc = cyc;
        @(negedge clk);
        start = 0;
      end
      chk(donecyc == ncyc, $sformatf("done at cycle %0d, expected %0d", donecyc, ncyc));
      repeat (3) @(negedge clk);
      chk(!busy && !done, "idle after done");
    end
    $display("run length %0d cycles", ncyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

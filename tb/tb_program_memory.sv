// tb_program_memory: fill every word of the program memory with random
// control fields and instructions, read them back, and check that an
// address past the end reads as a halting all-NOP word.
module tb_program_memory;
  import ddpm_pkg::*;
  logic clk = 1'b0;
  logic wr_en;
  logic [PM_AW-1:0] wr_addr, rd_addr;
  pm_ctrl_t wr_ctrl, rd_ctrl;
  mac_op_t [COLS-1:0] wr_ops, rd_ops;
  pm_ctrl_t m_ctrl[PM_DEPTH];
  mac_op_t [COLS-1:0] m_ops[PM_DEPTH];
  int checks = 0, failures = 0;

  program_memory dut (.clk, .wr_en, .wr_addr, .wr_ctrl, .wr_ops, .rd_addr, .rd_ctrl, .rd_ops);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_addr = 0; rd_addr = 0; wr_ctrl = '0; wr_ops = '0;
    @(negedge clk);
    for (int a = 0; a < int'(PM_DEPTH); a++) begin
      wr_en = 1; wr_addr = PM_AW'(a);
      wr_ctrl = pm_ctrl_t'($urandom);
      for (int c = 0; c < int'(COLS); c++) wr_ops[c] = mac_op_t'($urandom);
      m_ctrl[a] = wr_ctrl; m_ops[a] = wr_ops;
      @(negedge clk);
    end
    wr_en = 0;
    for (int a = 0; a < int'(PM_DEPTH); a++) begin
      rd_addr = PM_AW'(a);
      #1;
      checks += 2;
      if (rd_ctrl !== m_ctrl[a]) begin failures++; $display("FAIL ctrl %0d", a); end
      if (rd_ops !== m_ops[a]) begin failures++; $display("FAIL ops %0d", a); end
    end
    rd_addr = PM_AW'(PM_DEPTH); #1;
    checks++;
    if (!rd_ctrl.halt || rd_ops !== {COLS{OP_NOP}}) begin failures++; $display("FAIL past-end word"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_displacement_memory: write a random displacement list, then read every
// entry through both ports (entry a and entry a+1) and compare.
module tb_displacement_memory;
  import ddpm_pkg::*;
  logic clk = 1'b0;
  logic wr_en;
  logic [DM_AW-1:0] wr_addr, rd_addr;
  disp_t wr_data, rd_data0, rd_data1;
  disp_t model[DM_DEPTH];
  int checks = 0, failures = 0;

  displacement_memory dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data0, .rd_data1);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_addr = 0; rd_addr = 0; wr_data = '0;
    @(negedge clk);
    for (int a = 0; a < int'(DM_DEPTH); a++) begin
      wr_en = 1; wr_addr = DM_AW'(a); wr_data = disp_t'($urandom);
      model[a] = wr_data;
      @(negedge clk);
    end
    wr_en = 0;
    for (int a = 0; a < int'(DM_DEPTH) - 1; a++) begin
      rd_addr = DM_AW'(a);
      #1;
      checks += 2;
      if (rd_data0 !== model[a]) begin failures++; $display("FAIL port0 %0d", a); end
      if (rd_data1 !== model[a+1]) begin failures++; $display("FAIL port1 %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

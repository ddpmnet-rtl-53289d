// tb_input_feature_memory: three-bank rotation of the input feature memory.
//
// Every bank, word and lane is written with random data kept in a model.
// Then, for four rotation states, both read ports are swept over all words:
// port k must return bank (base + k) mod 3 and idle_bank must be the third
// bank. Reads while rot is high must already see the rotated mapping.
module tb_input_feature_memory;
  import ddpm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en, rot;
  logic [1:0] wr_bank, idle_bank;
  logic [BANK_AW-1:0] wr_addr;
  logic [$clog2(ROWS)-1:0] wr_lane;
  logic [FW-1:0] wr_data;
  logic [MODS-1:0][BANK_AW-1:0] rd_addr;
  logic [MODS-1:0][ROWS-1:0][FW-1:0] rd_data;
  int checks = 0, failures = 0;
  logic [FW-1:0] model[3][BANK_DEPTH][ROWS];

  input_feature_memory dut (.clk, .rst_n, .wr_en, .wr_bank, .wr_addr, .wr_lane,
                            .wr_data, .rot, .idle_bank, .rd_addr, .rd_data);

  always #1000 clk = ~clk;  // slow clock: each read sweep fits in one phase

  task automatic sweep(int base);
    for (int a = 0; a < int'(BANK_DEPTH); a++) begin
      rd_addr[0] = BANK_AW'(a);
      rd_addr[1] = BANK_AW'(BANK_DEPTH - 1 - a);
      #1;
      for (int k = 0; k < int'(MODS); k++)
        for (int r = 0; r < int'(ROWS); r++) begin
          checks++;
          if (rd_data[k][r] !== model[(base + k) % 3][int'(rd_addr[k])][r]) begin
            failures++;
            if (failures < 10) $display("FAIL base %0d port %0d addr %0d lane %0d", base, k, rd_addr[k], r);
          end
        end
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int base = 0;
    wr_en = 0; rot = 0; wr_bank = 0; wr_addr = 0; wr_lane = 0; wr_data = 0; rd_addr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 3; b++)
      for (int a = 0; a < int'(BANK_DEPTH); a++)
        for (int r = 0; r < int'(ROWS); r++) begin
          wr_en = 1; wr_bank = 2'(b); wr_addr = BANK_AW'(a); wr_lane = 5'(r);
          wr_data = FW'($urandom);
          model[b][a][r] = wr_data;
          @(negedge clk);
        end
    wr_en = 0;
    for (int step = 0; step < 4; step++) begin
      checks++;
      if (int'(idle_bank) != (base + 2) % 3) begin
        failures++; $display("FAIL idle bank %0d at base %0d", idle_bank, base);
      end
      sweep(base);
      rot = 1;           // rotated mapping visible while rot is high
      sweep((base + 1) % 3);
      @(negedge clk);
      rot = 0;
      base = (base + 1) % 3;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

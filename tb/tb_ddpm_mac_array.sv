// tb_ddpm_mac_array: the 27 x 30 array with row-shared pulses and
// column-shared instructions.
//
// Random pulse streams per row and random instructions per column are
// applied; a model of all 810 counters and output registers predicts the
// results. After every burst of instructions the whole array is read through
// the memory-mapped port and compared; an out-of-range address must read 0.
module tb_ddpm_mac_array;
  import ddpm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [ROWS-1:0][MODS-1:0] pulse;
  mac_op_t [COLS-1:0] op;
  logic [$clog2(ROWS)-1:0] rd_row;
  logic [$clog2(COLS)-1:0] rd_col;
  logic signed [CNT_W-1:0] rd_data;
  int checks = 0, failures = 0;
  int m_cnt[ROWS][COLS], m_q[ROWS][COLS];

  ddpm_mac_array dut (.clk, .rst_n, .pulse, .op, .rd_row, .rd_col, .rd_data);

  always #5 clk = ~clk;

  function automatic int wrap12(int v);
    v = v & 32'hFFF;
    return (v >= 2048) ? v - 4096 : v;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pulse = '0; op = {COLS{OP_NOP}}; rd_row = '0; rd_col = '0;
    foreach (m_cnt[r, c]) begin m_cnt[r][c] = 0; m_q[r][c] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int burst = 0; burst < 20; burst++) begin
      for (int cyc = 0; cyc < 100; cyc++) begin
        for (int r = 0; r < int'(ROWS); r++) pulse[r] = MODS'($urandom);
        for (int c = 0; c < int'(COLS); c++) begin
          automatic int x = int'($urandom_range(0, 99));
          op[c] = (x < 80) ? {1'b0, 3'($urandom)} : (x < 85) ? OP_CLR :
                  (x < 92) ? OP_STORE_RELU : (x < 97) ? OP_STORE : OP_NOP;
        end
        @(negedge clk);
        for (int r = 0; r < int'(ROWS); r++)
          for (int c = 0; c < int'(COLS); c++) begin
            if (!op[c][3]) begin
              automatic int b = (op[c][1:0] < 2'(MODS)) ? int'(pulse[r][op[c][0]]) : 1;
              m_cnt[r][c] = wrap12(m_cnt[r][c] + (op[c][2] ? -b : b));
            end else if (op[c] == OP_CLR) m_cnt[r][c] = 0;
            else if (op[c] == OP_STORE_RELU) m_q[r][c] = (m_cnt[r][c] < 0) ? 0 : m_cnt[r][c];
            else if (op[c] == OP_STORE) m_q[r][c] = m_cnt[r][c];
          end
      end
      op = {COLS{OP_NOP}};
      for (int r = 0; r < int'(ROWS); r++)
        for (int c = 0; c < int'(COLS); c++) begin
          rd_row = 5'(r); rd_col = 5'(c);
          #1;
          checks++;
          if (int'(rd_data) != m_q[r][c]) begin
            failures++;
            if (failures < 10) $display("FAIL (%0d,%0d): %0d expected %0d", r, c, rd_data, m_q[r][c]);
          end
        end
      @(negedge clk);
    end
    rd_row = 5'd31; rd_col = 5'd0; #1;
    checks++;
    if (rd_data != 0) begin failures++; $display("FAIL out-of-range read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

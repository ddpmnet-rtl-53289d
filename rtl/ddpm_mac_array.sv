// ddpm_mac_array: the R x C array of MAC units (27 x 30 in the source
// design) with a memory-mapped readout of the MAC results.
//
// Input features are shared along a row: every unit of row r sees the same
// M pulse streams. Weights are shared along a column: every unit of column c
// executes the same 4-bit instruction, so a column computes one kernel over
// R input patches while the R rows compute R kernels' worth of outputs side
// by side. The output registers are read through rd_row/rd_col; the read is
// combinational (the memory-map decoding is this implementation's choice).
module ddpm_mac_array
  import ddpm_pkg::*;
#(
  parameter int unsigned R  = ROWS,
  parameter int unsigned C  = COLS,
  parameter int unsigned M  = MODS,
  parameter int unsigned CW = CNT_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [R-1:0][M-1:0]   pulse,   // row-shared pulse streams
  input  mac_op_t [C-1:0]       op,      // column-shared instructions
  input  logic [$clog2(R)-1:0]  rd_row,
  input  logic [$clog2(C)-1:0]  rd_col,
  output logic signed [CW-1:0]  rd_data
);

  logic signed [CW-1:0] res [R][C];

  for (genvar r = 0; r < R; r++) begin : g_row
    for (genvar c = 0; c < C; c++) begin : g_col
      ddpm_mac_unit #(.NIN(M), .CW(CW)) u_mac (
        .clk   (clk),
        .rst_n (rst_n),
        .d     (pulse[r]),
        .op    (op[c]),
        .q     (res[r][c])
      );
    end
  end

  always_comb begin
    rd_data = '0;
    if (int'(rd_row) < int'(R) && int'(rd_col) < int'(C))
      rd_data = res[rd_row][rd_col];
  end

endmodule

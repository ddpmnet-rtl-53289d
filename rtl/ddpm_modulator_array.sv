// ddpm_modulator_array: the R x M grid of DDPM modulators that feeds the
// MAC array, M modulators per row (27 x 2 in the source design).
//
// Modulator k of row r modulates the feature that read port k of the input
// feature memory delivers for lane r. All modulators of one port load
// together when load[k] is high; the two ports load independently, so one
// port can be refilled while the other is being counted. Each row's M
// streams are broadcast to every MAC unit of that row.
//
// Timing: as ddpm_modulator; pulses are valid in the cycle after a load.
module ddpm_modulator_array
  import ddpm_pkg::*;
#(
  parameter int unsigned R  = ROWS,
  parameter int unsigned M  = MODS,
  parameter int unsigned NW = FW
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [M-1:0]                load,   // per port
  input  logic [M-1:0][R-1:0][NW-1:0] feat,   // per port, per row
  output logic [R-1:0][M-1:0]         pulse   // per row, per port
);

  for (genvar r = 0; r < R; r++) begin : g_row
    for (genvar k = 0; k < M; k++) begin : g_mod
      ddpm_modulator #(.N(NW)) u_mod (
        .clk   (clk),
        .rst_n (rst_n),
        .load  (load[k]),
        .din   (feat[k][r]),
        .pulse (pulse[r][k])
      );
    end
  end

endmodule

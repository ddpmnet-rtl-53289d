// program_memory: the weight memory of DDPMnet, holding the MAC instructions.
//
// Weights are not stored as numbers: the scheduler compiles each kernel into
// runs of count-up / count-down instructions whose lengths are the weight
// magnitudes. A word holds one 4-bit instruction per column plus the control
// fields of pm_ctrl_t (hold time, modulator loads, bank rotation, halt); the
// word is applied for dur+1 cycles, so a long weight pulse costs one word
// and not one word per cycle. The 18 Kb size follows the source design
// (140 words x 132 bits); the word layout is this implementation's choice.
//
// Timing: synchronous write from the host, combinational read. An address
// past the end reads as a halting NOP word.
module program_memory
  import ddpm_pkg::*;
#(
  parameter int unsigned C     = COLS,
  parameter int unsigned DEPTH = PM_DEPTH,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               wr_en,
  input  logic [AW-1:0]      wr_addr,
  input  pm_ctrl_t           wr_ctrl,
  input  mac_op_t [C-1:0]    wr_ops,
  input  logic [AW-1:0]      rd_addr,
  output pm_ctrl_t           rd_ctrl,
  output mac_op_t [C-1:0]    rd_ops
);

  pm_ctrl_t             ctrl_mem [DEPTH];
  logic [C-1:0][OP_W-1:0] ops_mem [DEPTH];

  always_ff @(posedge clk)
    if (wr_en && int'(wr_addr) < DEPTH) begin
      ctrl_mem[wr_addr] <= wr_ctrl;
      ops_mem[wr_addr]  <= wr_ops;
    end

  always_comb begin
    rd_ctrl      = '0;  // past the end: a one-cycle NOP word that halts
    rd_ctrl.halt = 1'b1;
    rd_ops       = {C{OP_NOP}};
    if (int'(rd_addr) < DEPTH) begin
      rd_ctrl = ctrl_mem[rd_addr];
      rd_ops  = ops_mem[rd_addr];
    end
  end

endmodule

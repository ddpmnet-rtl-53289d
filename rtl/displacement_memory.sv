// displacement_memory: the list of read-pointer displacements that walks the
// modulator ports over the stored input patch.
//
// Each entry is a signed 6-bit dX and a signed 4-bit dY (widths from the
// source design), precomputed by the scheduler so that the sequence of
// pointers covers the input frame with the intended kernel size and stride.
// One entry is consumed per modulator load; a program word that reloads both
// ports consumes two, hence the two read ports at rd_addr and rd_addr+1.
//
// Timing: synchronous write, combinational read. The depth (512) is this
// implementation's choice.
module displacement_memory
  import ddpm_pkg::*;
#(
  parameter int unsigned DEPTH = DM_DEPTH,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  disp_t         wr_data,
  input  logic [AW-1:0] rd_addr,
  output disp_t         rd_data0,  // entry rd_addr
  output disp_t         rd_data1   // entry rd_addr + 1
);

  disp_t mem [DEPTH];
  logic [AW-1:0] addr1;

  always_ff @(posedge clk)
    if (wr_en && int'(wr_addr) < DEPTH) mem[wr_addr] <= wr_data;

  always_comb begin
    addr1    = rd_addr + 1'b1;
    rd_data0 = (int'(rd_addr) < DEPTH) ? mem[rd_addr] : '0;
    rd_data1 = (int'(addr1) < DEPTH) ? mem[addr1] : '0;
  end

endmodule

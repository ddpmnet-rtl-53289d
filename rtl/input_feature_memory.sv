// input_feature_memory: three banks of input features, two of them read at
// any time while the third is refilled (three-way time interleaving).
//
// Each bank word holds one N-bit feature per MAC row (R lanes), so one read
// delivers a whole column of features to one modulator port. Read port k
// reads bank (base + k) mod 3; the remaining bank, reported on idle_bank, is
// the one the host should fill with the next patch. rot advances base by one,
// so the second active bank becomes the first, the idle bank becomes the
// second and the first one becomes idle. The bank count, the two active
// banks and 28.5 Kb per bank follow the source design; the 135-word by
// 27-lane organisation and the write port are this implementation's choices.
//
// Timing: writes and rotation take effect at the rising edge; reads are
// combinational (the source design uses a latch memory). While rot is high
// the read ports already see the rotated mapping, so a modulator load issued
// with a rotation reads the new banks.
module input_feature_memory
  import ddpm_pkg::*;
#(
  parameter int unsigned R     = ROWS,
  parameter int unsigned NW    = FW,
  parameter int unsigned DEPTH = BANK_DEPTH,
  parameter int unsigned AW    = $clog2(DEPTH),
  parameter int unsigned M     = MODS
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // host write port
  input  logic                        wr_en,
  input  logic [1:0]                  wr_bank,
  input  logic [AW-1:0]               wr_addr,
  input  logic [$clog2(R)-1:0]        wr_lane,
  input  logic [NW-1:0]               wr_data,
  // bank rotation
  input  logic                        rot,
  output logic [1:0]                  idle_bank,
  // read ports, one per modulator port
  input  logic [M-1:0][AW-1:0]        rd_addr,
  output logic [M-1:0][R-1:0][NW-1:0] rd_data
);

  logic [R-1:0][NW-1:0] mem [NBANKS][DEPTH];
  logic [1:0] base_q, rd_base;

  function automatic logic [1:0] bank_add(logic [1:0] b, int unsigned k);
    return 2'((int'(b) + k) % NBANKS);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   base_q <= '0;
    else if (rot) base_q <= bank_add(base_q, 1);
  end

  always_ff @(posedge clk) begin
    if (wr_en && int'(wr_bank) < NBANKS && int'(wr_addr) < DEPTH && int'(wr_lane) < R)
      mem[wr_bank][wr_addr][wr_lane] <= wr_data;
  end

  always_comb begin
    rd_base   = rot ? bank_add(base_q, 1) : base_q;
    idle_bank = bank_add(base_q, M);
    for (int k = 0; k < int'(M); k++) begin
      rd_data[k] = '0;
      if (int'(rd_addr[k]) < DEPTH)
        rd_data[k] = mem[bank_add(rd_base, k)][rd_addr[k]];
    end
  end

endmodule

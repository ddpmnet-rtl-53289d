// ddpm_mac_unit: one MAC unit of the DDPMnet array, a MUX and a counter.
//
// The unit never multiplies. A weight W is the number of consecutive cycles
// during which the unit counts the pulse stream of one input feature; the
// stream has density X/2^N, so the count grows by about W*X/2^N. A positive
// weight counts up, a negative one counts down, and successive weights add
// into the same counter, so the counter holds the accumulated dot product at
// the end of a kernel window. The input MUX chooses which of the row's
// modulator streams is counted, so the scheduler may reorder weights and
// their features freely. At the end of the window the count, optionally
// passed through ReLU, is copied to the output register, which is read out
// through the array's memory map.
//
// Following the source design: MUX over the row's modulator outputs, a 12-bit
// up/down counter, ReLU and a 12-bit output register, all steered by a 4-bit
// instruction. This implementation's choices: the instruction encoding (see
// ddpm_pkg), a select value beyond the modulators meaning "constant 1" (used
// to add a bias as a run of counts), a two's-complement counter that wraps,
// and a STORE that leaves the counter unchanged (clear it with CLR).
//
// Timing: the instruction and the selected pulse are sampled at each rising
// edge; the counter and output register change one cycle after.
module ddpm_mac_unit
  import ddpm_pkg::*;
#(
  parameter int unsigned NIN   = MODS,
  parameter int unsigned CW    = CNT_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NIN-1:0]       d,      // pulse streams of this row
  input  mac_op_t              op,     // instruction of this column
  output logic signed [CW-1:0] q       // stored MAC result
);

  logic signed [CW-1:0] cnt_q;
  logic                 sel_bit;

  always_comb begin
    sel_bit = 1'b1;  // select values past the modulators count every cycle
    for (int i = 0; i < int'(NIN); i++)
      if (int'(op[1:0]) == i) sel_bit = d[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      q     <= '0;
    end else if (!op[3]) begin
      if (sel_bit) cnt_q <= op[2] ? cnt_q - 1'b1 : cnt_q + 1'b1;
    end else begin
      unique case (op)
        OP_CLR:        cnt_q <= '0;
        OP_STORE_RELU: q     <= cnt_q[CW-1] ? '0 : cnt_q;
        OP_STORE:      q     <= cnt_q;
        default:       ;  // NOP and reserved codes
      endcase
    end
  end

endmodule

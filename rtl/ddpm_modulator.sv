// ddpm_modulator: dyadic digital pulse modulator for one input feature.
//
// An N-bit feature X is turned into a bit stream that, over 2^N cycles,
// carries exactly X ones. Bit X[N-1] is emitted at cycle positions 0, 2, 4..,
// bit X[N-2] at positions 1, 5, 9.., bit X[N-3] at 3, 11, 19.., and so on:
// bit X[N-1-k] owns the positions whose binary count ends in exactly k ones
// followed by a zero. Position 2^N-1 carries nothing. The positions follow
// the source design; the circuit is a free-running binary counter and a
// one-hot "lowest zero bit" mask that picks one bit of the feature register.
//
// Interface: load captures din and restarts the position counter, so the
// first cycle after load is position 0 (an implementation choice that makes
// the pulse count of any window starting at a load exact and repeatable).
// pulse is combinational from the registers: the value for the current
// position, valid in the same cycle.
module ddpm_modulator #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] din,
  output logic         pulse
);

  logic [N-1:0] x_q;    // feature being modulated
  logic [N-1:0] pos_q;  // position inside the 2^N-cycle period
  logic [N-1:0] lowz;   // one-hot: lowest zero bit of pos_q
  logic [N-1:0] x_rev;  // feature with bit order reversed

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q   <= '0;
      pos_q <= '0;
    end else if (load) begin
      x_q   <= din;
      pos_q <= '0;
    end else begin
      pos_q <= pos_q + 1'b1;
    end
  end

  always_comb begin
    lowz = ~pos_q & (pos_q + 1'b1);
    for (int i = 0; i < int'(N); i++) x_rev[i] = x_q[N-1-i];
    pulse = |(lowz & x_rev);
  end

endmodule

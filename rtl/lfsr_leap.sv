// lfsr_leap: maximal-length linear feedback shift register that advances W
// steps per clock.
//
// The register holds X^n mod P[X] (Galois form, bit i = coefficient of X^i).
// One step multiplies by X: the top coefficient leaves the register as the
// output bit and, when it is 1, the feedback polynomial is added back in. A
// clock applies W such steps, so the register computes X^(W n) mod P[X] and
// delivers W fresh bits per clock with the hardware of a single register, as
// the generator's FPGA version does with W = 4. With a primitive P[X] the
// bit sequence has period 2^L - 1 whatever W, provided W and 2^L - 1 are
// coprime.
//
// Interface: `bits` are the W bits the next enabled clock shifts out,
// bits[0] first; they are a combinational function of the state, so they are
// valid from the end of reset. The state advances on each clock with `en`
// high. Reset (synchronous, active low) loads SEED, which must be non-zero;
// the seed and the reset style are this design's choice.
module lfsr_leap #(
  parameter int unsigned  L    = 22,             // register length l
  parameter int unsigned  W    = 4,              // steps (bits) per clock
  parameter logic [L-1:0] POLY = L'('h200001),   // P[X] less its X^L term
  parameter logic [L-1:0] SEED = L'(1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] bits
);

  logic [L-1:0] state, nxt;

  always_comb begin
    nxt = state;
    for (int i = 0; i < int'(W); i++) begin
      bits[i] = nxt[L-1];
      nxt     = {nxt[L-2:0], 1'b0} ^ (nxt[L-1] ? POLY : '0);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= nxt;
  end

  initial begin
    assert (SEED != '0) else $error("lfsr_leap: SEED must be non-zero");
  end

endmodule

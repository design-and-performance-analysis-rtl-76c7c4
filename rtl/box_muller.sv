// box_muller: forms one quantised Box-Muller sample from a word of ROM f_r,
// a word of ROM g and a random sign bit.
//
// The half Box-Muller value is the product of the two words truncated to b
// fraction bits:
//     n+ = floor(f_r(s) * g(s') / 2^(m + m' - b))   (x 2^-b),
// taken from a (3+m) x (1+m') bit unsigned multiplier (10 x 7 bits with the
// defaults) whose low m+m'-b bits are dropped. The sign bit then gives
// BM = +n+ (sign = 0) or -n+ (sign = 1) in two's complement, b fraction bits.
// The sign encoding and the plain negation are this design's choice.
//
// Timing: one clock. `bm` and `out_valid` are registered; `bm` loads when
// `in_valid` is high, `out_valid` follows `in_valid` one clock later and is
// cleared by the synchronous active-low reset.
module box_muller
  import wgng_pkg::*;
#(
  parameter int unsigned M  = M_DEF,
  parameter int unsigned MG = MG_DEF,
  parameter int unsigned B  = B_DEF
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [M+2:0]        f,
  input  logic [MG:0]         g,
  input  logic                sign,
  output logic signed [B+4:0] bm,
  output logic                out_valid
);

  localparam int unsigned PW    = M + MG + 4;   // product width
  localparam int unsigned SHIFT = M + MG - B;

  logic [PW-1:0]  prod;
  logic [B+3:0]   nplus;

  always_comb begin
    prod  = PW'(f) * PW'(g);
    nplus = (B + 4)'(prod >> SHIFT);
  end

  always_ff @(posedge clk) begin
    if (in_valid) bm <= sign ? -$signed({1'b0, nplus}) : $signed({1'b0, nplus});
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  initial begin
    assert (M + MG >= B) else $error("box_muller: b must not exceed m + m'");
  end

endmodule

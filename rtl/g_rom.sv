// g_rom: quantises g(x2) = sqrt(2) cos(2 pi x2) over the first quarter
// period, x2 in [0, 1/4], with a uniform step 2^-q'.
//
// The word at address s' is
//     g(s') = floor(2^m' * sqrt(2) * cos(pi 2^-q' (s' + delta') / 2))  (x 2^-m'),
// an unsigned number with 1 integer and m' fraction bits (256 words of 7
// bits with the defaults q' = 8, m' = 6, delta' = 0.5). The other three
// quarters of the cosine only change its sign, which the generator draws as a
// separate random bit, so one quarter suffices. The words are computed at
// elaboration; the floor rounding is this design's reading.
//
// Timing: one clock. `g` is registered and loads on each clock with `en`
// high (a synchronous ROM, fit for an FPGA memory block).
module g_rom
  import wgng_pkg::*;
#(
  parameter int unsigned QG     = QG_DEF,
  parameter int unsigned MG     = MG_DEF,
  parameter real         DELTAG = DELTAG_DEF
) (
  input  logic          clk,
  input  logic          en,
  input  logic [QG-1:0] addr,
  output logic [MG:0]   g
);

  localparam int unsigned WORDS = 2 ** QG;
  typedef logic [MG:0] rom_t [WORDS];

  function automatic rom_t build();
    rom_t t;
    for (int a = 0; a < int'(WORDS); a++)
      t[a] = (MG + 1)'(g_word(a, int'(QG), int'(MG), DELTAG));
    return t;
  endfunction

  localparam rom_t ROM = build();

  always_ff @(posedge clk) begin
    if (en) g <= ROM[addr];
  end

endmodule

// f_rom: the K ROMs f_1..f_K that quantise f(x1) = sqrt(-ln x1) on a
// non-uniform grid, and the multiplexer that picks one of them.
//
// ROM f_r covers x1 in [0, 2^(-(r-1)q)) with step 2^(-r q); its word at
// address s is
//     f_r(s) = floor(2^m * sqrt(-ln(2^(-r q) (s + delta))))   (x 2^-m),
// an unsigned number with 3 integer and m fraction bits (10 bits, 16 words
// per ROM with the defaults q = 4, m = 7, K = 5, delta = 0.467). Each ROM is
// read at its own variable s_r, as in the generator's ROM-per-rank structure,
// and the one-hot `sel` from rank_select chooses the word. The words are
// computed at elaboration from the parameters. The floor rounding is this
// design's reading of the quantiser.
//
// Timing: one clock. `f` is registered and loads on each clock with `en`
// high, like a synchronous ROM. No reset: the data carry no state.
module f_rom
  import wgng_pkg::*;
#(
  parameter int unsigned Q     = Q_DEF,
  parameter int unsigned K     = K_DEF,
  parameter int unsigned M     = M_DEF,
  parameter real         DELTA = DELTA_DEF
) (
  input  logic           clk,
  input  logic           en,
  input  logic [K*Q-1:0] s,
  input  logic [K-1:0]   sel,
  output logic [M+2:0]   f
);

  localparam int unsigned FW    = M + 3;
  localparam int unsigned WORDS = 2 ** Q;
  typedef logic [FW-1:0] rom_t [WORDS];

  // contents of ROM f_r, r = 1..K
  function automatic rom_t build(int r);
    rom_t t;
    for (int a = 0; a < int'(WORDS); a++)
      t[a] = FW'(f_word(r, a, int'(Q), int'(M), DELTA));
    return t;
  endfunction

  initial begin
    assert (f_word(int'(K), 0, int'(Q), int'(M), DELTA) < 2 ** FW)
      else $error("f_rom: K*q too large for 3 integer bits");
  end

  logic [FW-1:0] word [K];
  logic [FW-1:0] pick;

  for (genvar r = 0; r < K; r++) begin : g_rom
    localparam rom_t ROM = build(r + 1);
    assign word[r] = ROM[s[r*Q +: Q]];
  end

  always_comb begin
    pick = '0;
    for (int r = 0; r < int'(K); r++)
      pick |= sel[r] ? word[r] : '0;
  end

  always_ff @(posedge clk) begin
    if (en) f <= pick;
  end

endmodule

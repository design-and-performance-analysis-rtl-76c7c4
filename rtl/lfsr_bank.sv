// lfsr_bank: the generator's source of binary random variables.
//
// Seven lfsr_leap registers of lengths 22, 21, 20, 17, 13, 7 and 15 run side
// by side; their output bits are concatenated into one word, register 0 in
// the low bits. With the default steps (4 bits per clock, 5 for the 15-bit
// register) the word is 29 bits wide, exactly what one Box-Muller sample
// uses: 8 bits for the address s' of ROM g (registers 22 and 21), 20 bits for
// s_1..s_5 (registers 20, 17, 13, 7 and four bits of 15) and one sign bit
// (the fifth bit of register 15). Lengths of different registers make the
// joint period long; the lengths are the synthesised configuration, while the
// split of the bits among g, f_r and sign and the fifth step of the 15-bit
// register are this design's reading.
//
// Interface: `bits` is valid from the end of reset and changes after every
// clock with `en` high. Each register gets its own non-zero seed.
module lfsr_bank
  import wgng_pkg::*;
#(
  parameter int unsigned NBITS = 29   // must equal the sum of LFSR_STEP
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [NBITS-1:0] bits
);

  function automatic int unsigned offset(int idx);
    int unsigned o = 0;
    for (int j = 0; j < idx; j++) o += LFSR_STEP[j];
    return o;
  endfunction

  localparam int unsigned TOTAL = offset(NLFSR);

  initial begin
    assert (TOTAL == NBITS) else $error("lfsr_bank: NBITS must be %0d", TOTAL);
  end

  for (genvar i = 0; i < NLFSR; i++) begin : g_lfsr
    localparam int unsigned L = LFSR_LEN[i];
    localparam int unsigned W = LFSR_STEP[i];
    logic [W-1:0] b;
    lfsr_leap #(
      .L   (L),
      .W   (W),
      .POLY(L'(LFSR_POLY[i])),
      .SEED(L'(32'h1 + 32'h5 * i))
    ) u_lfsr (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (en),
      .bits (b)
    );
    assign bits[offset(i) +: W] = b;
  end

endmodule

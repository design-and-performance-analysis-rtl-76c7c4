// wgng_top: white Gaussian noise generator for hardware channel emulation.
//
// Every clock the generator draws one sample of a quantised Box-Muller
// variable and every A clocks it outputs the sum of A such samples, a close
// approximation of an N(0, A) Gaussian sample whose distribution is known
// exactly from the parameters. The datapath is:
//
//   lfsr_bank --29 bits--+-- s_1..s_K --> rank_select --sel--> f_rom --f--+
//                        +-- s'        -----------------------> g_rom --g--+--> box_muller --> clt_accum --> noise
//                        +-- sign bit  --(delayed one clock)---------------+
//
//   stage 0  LFSR state gives the random bits (combinational outputs)
//   stage 1  ROM f_r and ROM g words and the sign are registered
//   stage 2  product, truncation to b fraction bits and sign (BM sample)
//   stage 3  running sum over A samples; `noise_valid` on every A-th
//
// `noise` is a signed number; with A = 4 and b = 6 it has 7 fraction bits
// and unit variance (sum of four samples scaled by 1/2 through the binary
// point). The first output appears A + 2 clocks after the first enabled
// clock; then one output every A enabled clocks. `en` low freezes the LFSRs
// and the ROM registers and stops new samples from entering; samples already
// in flight finish. Reset is synchronous, active low. The parameter defaults
// are the synthesised configuration (q = 4, K = 5, q' = 8, m = 7, m' = 6,
// b = 6, A = 4); the LFSR bank is fixed at the seven registers of that
// configuration and needs K q + q' + 1 <= 29 bits. The enable and the
// pipeline registers are this design's choices.
module wgng_top
  import wgng_pkg::*;
#(
  parameter int unsigned Q      = Q_DEF,
  parameter int unsigned K      = K_DEF,
  parameter int unsigned QG     = QG_DEF,
  parameter int unsigned M      = M_DEF,
  parameter int unsigned MG     = MG_DEF,
  parameter int unsigned B      = B_DEF,
  parameter int unsigned A      = A_DEF,
  parameter real         DELTA  = DELTA_DEF,
  parameter real         DELTAG = DELTAG_DEF
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            en,
  output logic signed [B+4+$clog2(A):0]   noise,
  output logic                            noise_valid
);

  localparam int unsigned NBANK = 29;
  localparam int unsigned NUSE  = K * Q + QG + 1;

  initial begin
    assert (NUSE <= NBANK) else $error("wgng_top: K*q + q' + 1 exceeds the LFSR bank");
  end

  // ---- stage 0: random bits ----------------------------------------------
  logic [NBANK-1:0] rbits;
  logic [QG-1:0]    s_g;
  logic [K*Q-1:0]   s_f;
  logic             sgn0;

  lfsr_bank #(.NBITS(NBANK)) u_bank (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .bits (rbits)
  );

  assign s_g  = rbits[QG-1:0];
  assign s_f  = rbits[QG +: K*Q];
  assign sgn0 = rbits[QG + K*Q];

  // ---- stage 1: ROM lookups ----------------------------------------------
  logic [K-1:0]           sel;
  logic [M+2:0]           f1;
  logic [MG:0]            g1;
  logic                   sgn1, v1;

  rank_select #(.Q(Q), .K(K)) u_rank (
    .s   (s_f),
    .sel (sel),
    .rank(),
    .addr()
  );

  f_rom #(.Q(Q), .K(K), .M(M), .DELTA(DELTA)) u_from (
    .clk(clk),
    .en (en),
    .s  (s_f),
    .sel(sel),
    .f  (f1)
  );

  g_rom #(.QG(QG), .MG(MG), .DELTAG(DELTAG)) u_grom (
    .clk (clk),
    .en  (en),
    .addr(s_g),
    .g   (g1)
  );

  always_ff @(posedge clk) begin
    if (en) sgn1 <= sgn0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= en;
  end

  // ---- stage 2: Box-Muller sample ------------------------------------------
  logic signed [B+4:0] bm2;
  logic                v2;

  box_muller #(.M(M), .MG(MG), .B(B)) u_bm (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (v1),
    .f        (f1),
    .g        (g1),
    .sign     (sgn1),
    .bm       (bm2),
    .out_valid(v2)
  );

  // ---- stage 3: central-limit accumulation -------------------------------
  clt_accum #(.A(A), .IW(B + 5)) u_acc (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (v2),
    .x        (bm2),
    .sum      (noise),
    .out_valid(noise_valid)
  );

endmodule

// rank_select: picks the segment of x1 for the non-uniform quantisation of
// f(x1) = sqrt(-ln x1).
//
// K independent q-bit variables s_1..s_K arrive packed in `s` (s_1 in the low
// q bits). The first one that is non-zero chooses its ROM: s_1 != 0 selects
// ROM f_1 at address s_1; otherwise s_2 != 0 selects ROM f_2 at s_2, and so on.
// A given address s of rank r is therefore drawn with probability 2^(-r q),
// matching the length of the x1 segment that word stands for. When all K
// variables are zero (probability 2^(-K q)) this design selects rank K at
// address 0, the segment nearest x1 = 0; the source leaves that case open.
//
// Interface: purely combinational. `sel` is one-hot (bit r-1 for rank r),
// `rank` is r-1 in binary and `addr` the chosen variable s_r.
module rank_select #(
  parameter int unsigned Q = 4,   // bits per variable
  parameter int unsigned K = 5    // number of variables / ROMs
) (
  input  logic [K*Q-1:0]         s,
  output logic [K-1:0]           sel,
  output logic [$clog2(K+1)-1:0] rank,
  output logic [Q-1:0]           addr
);

  always_comb begin
    sel  = '0;
    rank = ($clog2(K+1))'(K - 1);
    addr = '0;
    for (int r = K - 1; r >= 0; r--) begin
      if (s[r*Q +: Q] != '0) begin
        sel  = '0;
        sel[r] = 1'b1;
        rank = ($clog2(K+1))'(r);
        addr = s[r*Q +: Q];
      end
    end
    if (s == '0) sel[K-1] = 1'b1;
  end

  always_comb begin
    assert ($onehot(sel)) else $error("rank_select: selection is not one-hot");
  end

endmodule

// wgng_dist_check: testbench helper that runs one wgng_top configuration and
// compares the histogram of its output with the exact law of that output.
//
// All random inputs of the generator are uniform few-bit draws, so the law
// of a sample is exact: each triple (s, r, s') with probability
// 2^-(4r+8) (2^-20 for the all-zero case at rank 5) gives
// n+ = floor(f_r(s) g(s') / 2^(m+m'-b)), with the ROM words evaluated here in
// floating point; the sign splits it in two; the output, a sum of A
// independent samples, has the A-fold convolution of that law. The helper
// enables the generator for NCYC clocks, then checks every output value
// expected at least 400 times to lie within 5 standard deviations of its
// expected count, the total chi-square to stay below twice the number of
// such values, the output count to be NCYC/A, and the measured variance to
// be within 2 % of the exact one. q = 4, K = 5, q' = 8, m = 7, m' = 6.
module wgng_dist_check #(
  parameter int  B     = 6,
  parameter int  A     = 4,
  parameter real DELTA = 0.467,
  parameter int  NCYC  = 1000000
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output bit   done
);
  localparam int NW   = B + 5 + $clog2(A);
  localparam int NMAX = (6 << B);            // bound on |sample|, units 2^-b
  localparam int SMAX = A * NMAX;

  logic en = 1'b0;
  logic signed [NW-1:0] noise;
  logic noise_valid;

  wgng_top #(.B(B), .A(A), .DELTA(DELTA)) dut (.clk, .rst_n, .en, .noise, .noise_valid);

  real law [];     // index v + SMAX
  int  hist [];
  int  nout = 0;
  real s1 = 0.0, s2 = 0.0;

  always @(posedge clk)
    if (rst_n && noise_valid) begin
      real v;
      int k;
      k = int'(noise) + SMAX;
      hist[k] = hist[k] + 1;
      nout++;
      v = real'(noise);
      s1 += v;
      s2 += v * v;
    end

  task automatic fail(input string what);
    failures++;
    if (failures < 6) $display("FAIL [b=%0d A=%0d delta=%f] %s", B, A, DELTA, what);
  endtask

  initial begin
    int ftab [1:5][16];
    int gtab [256];
    real one [];
    real acc [], nxt [];
    real chi2, e, ev, vm, mean;
    int nb, width;
    checks = 0; failures = 0; done = 1'b0;
    law  = new [2 * SMAX + 1];
    hist = new [2 * SMAX + 1];
    for (int r = 1; r <= 5; r++)
      for (int a = 0; a < 16; a++)
        ftab[r][a] = int'($floor(128.0 * $sqrt(-$ln((a + DELTA) / (16.0 ** r)))));
    for (int a = 0; a < 256; a++)
      gtab[a] = int'($floor(64.0 * $sqrt(2.0) * $cos(3.141592653589793 * (a + 0.5) / 512.0)));
    // law of one signed sample, index v + NMAX
    one = new [2 * NMAX + 1];
    for (int r = 1; r <= 5; r++)
      for (int a = 0; a < 16; a++) begin
        real p;
        if (a == 0 && r < 5) continue;
        p = (a == 0) ? 2.0 ** (-20) : 2.0 ** (-4 * r);
        for (int s = 0; s < 256; s++) begin
          int n;
          n = (ftab[r][a] * gtab[s]) >> (13 - B);
          one[NMAX + n] = one[NMAX + n] + p / 512.0;
          one[NMAX - n] = one[NMAX - n] + p / 512.0;
        end
      end
    // A-fold convolution; acc covers [-k NMAX, k NMAX]
    acc = one;
    for (int k = 2; k <= A; k++) begin
      width = 2 * k * NMAX + 1;
      nxt = new [width];
      for (int i = 0; i < acc.size(); i++)
        if (acc[i] > 0.0)
          for (int j = 0; j <= 2 * NMAX; j++)
            if (one[j] > 0.0) nxt[i + j] = nxt[i + j] + acc[i] * one[j];
      acc = nxt;
    end
    for (int i = 0; i < acc.size(); i++) law[i] = acc[i];
    ev = 0.0;
    for (int i = 0; i <= 2 * SMAX; i++) ev += law[i] * real'(i - SMAX) * real'(i - SMAX);

    @(posedge rst_n);
    @(negedge clk);
    en = 1'b1;
    repeat (NCYC) @(negedge clk);
    en = 1'b0;
    repeat (10) @(negedge clk);

    chi2 = 0.0;
    nb = 0;
    for (int i = 0; i <= 2 * SMAX; i++) begin
      e = law[i] * nout;
      if (e >= 400.0) begin
        real d;
        d = real'(hist[i]) - e;
        chi2 += d * d / e;
        nb++;
        checks++;
        if (d * d > 25.0 * e)
          fail($sformatf("value %0d seen %0d expected %f", i - SMAX, hist[i], e));
      end
    end
    checks++;
    if (chi2 > 2.0 * nb) fail($sformatf("chi-square %f over %0d values", chi2, nb));
    checks++;
    if (nout < NCYC / A - 1 || nout > NCYC / A) fail($sformatf("output count %0d", nout));
    mean = s1 / nout;
    vm = s2 / nout - mean * mean;
    checks++;
    if (vm < 0.98 * ev || vm > 1.02 * ev) fail($sformatf("variance %f exact %f", vm, ev));
    $display("b=%0d A=%0d delta=%.3f: outputs=%0d values=%0d chi2=%.1f sigma=%.4f (exact %.4f, ideal %.4f)",
             B, A, DELTA, nout, nb, chi2, $sqrt(vm) / (2.0 ** B), $sqrt(ev) / (2.0 ** B), $sqrt(real'(A)));
    done = 1'b1;
  end
endmodule

// tb_wgng_top: end-to-end test of the noise generator at its default
// parameters (q = 4, K = 5, q' = 8, m = 7, m' = 6, b = 6, A = 4).
//
// A cycle-accurate model built here from first principles runs beside the
// generator: seven bit-serial LFSR models give the 29 random bits of each
// enabled clock, the first non-zero 4-bit variable picks rank r, the ROM
// words are evaluated in floating point (floor(128 sqrt(-ln((s+0.467)16^-r)))
// and floor(64 sqrt(2) cos(pi (s'+0.5)/512))), the product is truncated to
// 6 fraction bits and signed, and four samples are summed. Every `noise`
// value is compared with the model's. It also checks:
//   - latency: first output A + 2 = 6 clocks after the first enabled clock;
//   - rate: one output every 4 clocks while `en` stays high;
//   - stall: `en` is dropped at random, and the stream must continue exactly;
//   - statistics: mean near 0 and variance of the 7-fraction-bit output
//     within 2 % of the exact variance of the quantised distribution.
// Mechanisms counted (each must occur): ROM f_r chosen for every rank
// r = 1..5, both signs, stalls, full outputs. The all-zero fallback to rank
// K (probability about 2^-20 per sample) is counted and reported only.
module tb_wgng_top;
  localparam int NCYC = 2000000;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [12:0] noise;
  logic noise_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  wgng_top dut (.clk, .rst_n, .en, .noise, .noise_valid);

  // ---- model -------------------------------------------------------------
  int unsigned len  [7] = '{22, 21, 20, 17, 13, 7, 15};
  int unsigned stp  [7] = '{4, 4, 4, 4, 4, 4, 5};
  int unsigned poly [7] = '{32'h200001, 32'h080001, 32'h020001, 32'h004001,
                            32'h00001B, 32'h000041, 32'h004001};
  int unsigned st   [7];
  int ftab [1:5][16];
  int gtab [256];
  int rank_hits [1:5];
  int zero_hits = 0, npos = 0, nneg = 0, stalls = 0, nout = 0;
  int exp_q [$];
  int part = 0, pcnt = 0;

  function automatic logic [28:0] model_bits();
    logic [28:0] w;
    int k = 0;
    for (int i = 0; i < 7; i++)
      for (int j = 0; j < int'(stp[i]); j++) begin
        bit o;
        o = bit'((st[i] >> (len[i] - 1)) & 1);
        st[i] = ((st[i] << 1) & ((32'h1 << len[i]) - 1)) ^ (o ? poly[i] : 0);
        w[k] = o;
        k++;
      end
    return w;
  endfunction

  task automatic model_sample();
    logic [28:0] w;
    int r, a, n;
    w = model_bits();
    r = 5; a = 0;
    for (int j = 5; j >= 1; j--)
      if (w[8 + (j-1)*4 +: 4] != 0) begin r = j; a = int'(w[8 + (j-1)*4 +: 4]); end
    if (w[27:8] == 0) zero_hits++;
    rank_hits[r]++;
    n = (ftab[r][a] * gtab[int'(w[7:0])]) / 128;
    if (w[28]) begin n = -n; nneg++; end else if (n != 0) npos++;
    part += n;
    pcnt++;
    if (pcnt == 4) begin
      exp_q.push_back(part);
      part = 0; pcnt = 0;
    end
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t noise=%0d", what, $time, noise);
    end
  endtask

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- output monitor ------------------------------------------------------
  real sum1 = 0.0, sum2 = 0.0;
  longint cyc = 0, first_en = -1, first_out = -1, last_out = -1;
  logic [11:0] en_hist = '0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    en_hist <= {en_hist[10:0], en};
    if (rst_n && noise_valid) begin
      real v;
      if (exp_q.size() == 0) check(1'b0, "output without a model sample");
      else check(int'(noise) == exp_q.pop_front(), "noise value");
      v = real'(noise) / 128.0;
      sum1 += v;
      sum2 += v * v;
      nout++;
      if (first_out < 0) first_out = cyc;
      else if (&en_hist) check(cyc - last_out == 4, "one output every 4 clocks");
      last_out = cyc;
    end
  end

  // ---- stimulus -------------------------------------------------------------
  initial begin
    real ev2, p, mean, var_m, var_e;
    for (int i = 0; i < 7; i++) st[i] = 1 + 5 * i;
    for (int r = 1; r <= 5; r++)
      for (int a = 0; a < 16; a++)
        ftab[r][a] = int'($floor(128.0 * $sqrt(-$ln((a + 0.467) / (16.0 ** r)))));
    for (int a = 0; a < 256; a++)
      gtab[a] = int'($floor(64.0 * $sqrt(2.0) * $cos(3.141592653589793 * (a + 0.5) / 512.0)));
    // exact second moment of one sample (units of 2^-6)
    ev2 = 0.0;
    for (int r = 1; r <= 5; r++)
      for (int a = 0; a < 16; a++) begin
        if (a == 0 && r < 5) continue;
        p = (a == 0) ? 2.0 ** (-20) : 2.0 ** (-4 * r);
        for (int s = 0; s < 256; s++) begin
          int n;
          n = (ftab[r][a] * gtab[s]) / 128;
          ev2 += p / 256.0 * real'(n * n);
        end
      end
    var_e = ev2 / 4096.0;   // variance of (sum of 4) / 2

    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCYC; c++) begin
      bit e;
      e = (c < 2000) ? 1'b1 : ($urandom_range(0, 99) >= 3);
      en = e;
      if (e) begin
        if (first_en < 0) first_en = cyc;
        model_sample();
      end else begin
        stalls++;
      end
      @(negedge clk);
    end
    en = 1'b0;
    repeat (10) @(negedge clk);
    check(first_out - first_en == 6, $sformatf("latency %0d clocks", first_out - first_en));
    check(exp_q.size() == 0, "every model sum appeared");
    mean  = sum1 / nout;
    var_m = sum2 / nout - mean * mean;
    $display("outputs=%0d mean=%f variance=%f exact=%f", nout, mean, var_m, var_e);
    check(mean > -0.01 && mean < 0.01, "mean near zero");
    check(var_m > 0.98 * var_e && var_m < 1.02 * var_e, "variance matches the exact one");
    for (int r = 1; r <= 5; r++) begin
      $display("rank %0d chosen %0d times", r, rank_hits[r]);
      check(rank_hits[r] > 0, $sformatf("rank %0d used", r));
    end
    $display("all-zero fallback %0d, positive %0d, negative %0d, stalls %0d",
             zero_hits, npos, nneg, stalls);
    check(npos > 0 && nneg > 0, "both signs");
    check(stalls > 0, "stall happened");
    check(nout > 0, "outputs produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rank_select: self-checking test of the priority choice of ROM f_r.
//
// With q = 4 and K = 5 it applies 20000 words: random ones, ones with the
// first r-1 variables forced to zero (so every rank occurs often) and the
// all-zero word. The expected rank is the index of the first non-zero
// 4-bit variable, or rank K at address 0 when all are zero; `sel` must be the
// matching one-hot bit. The rank histogram is checked to cover every rank.
module tb_rank_select;
  localparam int Q = 4, K = 5;
  logic [K*Q-1:0] s;
  logic [K-1:0] sel;
  logic [2:0] rank;
  logic [Q-1:0] addr;
  int checks = 0, failures = 0;
  int hist [K];

  rank_select #(.Q(Q), .K(K)) dut (.s, .sel, .rank, .addr);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s s=%h sel=%b rank=%0d addr=%0d", what, s, sel, rank, addr);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int er, ea, zeros;
      s = 20'($urandom());
      zeros = (n == 0) ? K : int'($urandom_range(0, K - 1));
      for (int j = 0; j < zeros; j++) s[j*4 +: 4] = 4'h0;
      // reference: scan the variables one after the other
      er = K; ea = 0;
      begin : scan
        for (int j = 1; j <= K; j++)
          if (((s >> ((j - 1) * 4)) & 20'hF) != 0) begin
            er = j; ea = int'((s >> ((j - 1) * 4)) & 20'hF);
            disable scan;
          end
      end
      #1;
      check(int'(rank) == er - 1, "rank");
      check(int'(addr) == ea, "address");
      check(sel == 5'(1 << (er - 1)), "one-hot select");
      hist[er - 1]++;
    end
    for (int r = 0; r < K; r++) check(hist[r] > 100, "every rank used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

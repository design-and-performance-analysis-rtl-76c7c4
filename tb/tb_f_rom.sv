// tb_f_rom: self-checking test of the K ROMs f_r and their selection.
//
// For every rank r = 1..5 and address s = 0..15 the test puts s on variable
// s_r, random values on the other variables, selects rank r and compares the
// registered word with floor(128 sqrt(-ln((s + 0.467) 16^-r))) evaluated in
// floating point here. It checks the one-clock latency, that `en` low holds
// the word, and that the words decrease with s inside a ROM (f is
// decreasing in x1).
module tb_f_rom;
  localparam int Q = 4, K = 5, M = 7;
  localparam real D = 0.467;
  logic clk = 1'b0, en = 1'b1;
  logic [K*Q-1:0] s;
  logic [K-1:0] sel;
  logic [M+2:0] f;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  f_rom #(.Q(Q), .K(K), .M(M), .DELTA(D)) dut (.clk, .en, .s, .sel, .f);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t f=%0d", what, $time, f);
    end
  endtask

  function automatic int expect_f(int r, int a);
    real x = (a + D) / (16.0 ** r);
    return int'($floor(128.0 * $sqrt(-$ln(x))));
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev;
    for (int r = 1; r <= K; r++) begin
      prev = 1 << 30;
      for (int a = 0; a < 16; a++) begin
        @(negedge clk);
        s = 20'($urandom());
        s[(r-1)*4 +: 4] = 4'(a);
        sel = 5'(1 << (r - 1));
        @(posedge clk);
        #1;
        check(int'(f) == expect_f(r, a), $sformatf("f_%0d(%0d)", r, a));
        check(int'(f) < prev, "decreasing in s");
        prev = int'(f);
      end
    end
    // hold
    @(negedge clk);
    begin
      logic [M+2:0] h;
      h = f;
      en = 1'b0;
      s = ~s;
      sel = 5'b00001;
      repeat (3) @(posedge clk);
      #1 check(f == h, "hold with en low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

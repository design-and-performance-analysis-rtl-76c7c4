// tb_lfsr_leap: self-checking test of the W-steps-per-clock LFSR.
//
// Two instances run: L = 7 with W = 4 (P = X^7 + X^6 + 1) and L = 15 with
// W = 5 (P = X^15 + X^14 + 1). Every clock their bits are compared with a
// bit-serial integer model that shifts one bit at a time. Over one full
// period of the 7-bit register (127 clocks, 508 bits) the test also checks
// the maximal-length properties: the sequence repeats after 127 clocks and
// the 127-bit sequence holds 64 ones. Holding `en` low must
// freeze the outputs.
module tb_lfsr_leap;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [3:0] b7;
  logic [4:0] b15;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lfsr_leap #(.L(7),  .W(4), .POLY(7'h41),    .SEED(7'h01))    dut7  (.clk, .rst_n, .en, .bits(b7));
  lfsr_leap #(.L(15), .W(5), .POLY(15'h4001), .SEED(15'h1234)) dut15 (.clk, .rst_n, .en, .bits(b15));

  // bit-serial models: integer state, one shift per produced bit
  int unsigned m7 = 32'h01, m15 = 32'h1234;

  function automatic bit step(ref int unsigned st, input int l, input int unsigned p);
    bit o;
    o  = bit'((st >> (l - 1)) & 1);
    st = ((st << 1) & ((32'h1 << l) - 1)) ^ (o ? p : 0);
    return o;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] e7;
    logic [4:0] e15;
    int ones;
    logic [3:0] first [127];
    logic [4:0] e15h;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    en = 1'b1;
    ones = 0;
    for (int c = 0; c < 127; c++) begin
      for (int i = 0; i < 4; i++) e7[i] = step(m7, 7, 32'h41);
      for (int i = 0; i < 5; i++) e15[i] = step(m15, 15, 32'h4001);
      check(b7 == e7, "7-bit output");
      check(b15 == e15, "15-bit output");
      // the first bit of each group taken 127 times covers the sequence
      // at a stride of 4 (coprime with 127): a full period
      ones += b7[0];
      first[c] = b7;
      @(negedge clk);
    end
    check(ones == 64, "balance: 64 ones per period");
    // second period repeats the first (127 is prime, so with the balance
    // check no shorter period is possible)
    for (int c = 0; c < 127; c++) begin
      for (int i = 0; i < 5; i++) e15[i] = step(m15, 15, 32'h4001);
      check(b7 == first[c], "period 127 clocks");
      check(b15 == e15, "15-bit output");
      @(negedge clk);
    end
    // freeze
    en = 1'b0;
    e7 = b7;
    e15h = b15;
    repeat (5) @(negedge clk);
    check(b7 == e7 && b15 == e15h, "hold with en low");
    en = 1'b1;
    for (int i = 0; i < 5; i++) e15[i] = step(m15, 15, 32'h4001);
    check(b15 == e15, "resume after hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

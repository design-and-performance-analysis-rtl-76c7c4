// tb_g_rom: self-checking test of ROM g.
//
// Reads all 256 addresses and compares each registered word with
// floor(64 sqrt(2) cos(pi (s' + 0.5) / 512)) evaluated in floating point, one
// clock after the address. Also checks that the words never increase with
// the address (a falling quarter cosine) and that `en` low holds the word.
module tb_g_rom;
  logic clk = 1'b0, en = 1'b1;
  logic [7:0] addr;
  logic [6:0] g;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  g_rom #(.QG(8), .MG(6), .DELTAG(0.5)) dut (.clk, .en, .addr, .g);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s g=%0d", what, g);
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
    int prev = 1000;
    for (int a = 0; a < 256; a++) begin
      int e;
      @(negedge clk);
      addr = 8'(a);
      e = int'($floor(64.0 * $sqrt(2.0) * $cos(3.141592653589793 * (a + 0.5) / 512.0)));
      @(posedge clk);
      #1;
      check(int'(g) == e, $sformatf("g(%0d) expect %0d", a, e));
      check(int'(g) <= prev, "non-increasing");
      prev = int'(g);
    end
    @(negedge clk);
    begin
      logic [6:0] h;
      h = g;
      en = 1'b0;
      addr = 8'd0;
      repeat (2) @(posedge clk);
      #1 check(g == h, "hold with en low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

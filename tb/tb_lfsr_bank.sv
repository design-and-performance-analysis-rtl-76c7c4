// tb_lfsr_bank: self-checking test of the seven-register random bit source.
//
// A model of each register (length, feedback polynomial, seed 1 + 5 i and
// bits per clock written out here by hand) is stepped bit by bit and the
// concatenated 29-bit word is compared with the bank's output for 3000
// clocks, including a stretch with `en` low where nothing may change. It
// also counts the ones of every output bit, which should be close to half.
module tb_lfsr_bank;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [28:0] bits;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lfsr_bank #(.NBITS(29)) dut (.clk, .rst_n, .en, .bits);

  int unsigned len  [7] = '{22, 21, 20, 17, 13, 7, 15};
  int unsigned stp  [7] = '{4, 4, 4, 4, 4, 4, 5};
  int unsigned poly [7] = '{32'h200001, 32'h080001, 32'h020001, 32'h004001,
                            32'h00001B, 32'h000041, 32'h004001};
  int unsigned st   [7];
  int ones [29];

  function automatic logic [28:0] model_step();
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

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [28:0] e, held;
    for (int i = 0; i < 7; i++) st[i] = 1 + 5 * i;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    en = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      if (c >= 1000 && c < 1010) begin
        en = 1'b0;
        if (c == 1000) held = bits;
        check(bits == held, "hold with en low");
      end else begin
        en = 1'b1;
        e = model_step();
        check(bits == e, "bank word");
        for (int k = 0; k < 29; k++) ones[k] += int'(bits[k]);
      end
      @(negedge clk);
    end
    for (int k = 0; k < 29; k++) check(ones[k] > 1350 && ones[k] < 1650, "bit balance");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_clt_accum: self-checking test of the central-limit accumulator.
//
// Feeds 4000 random signed 11-bit samples with random gaps in `in_valid`
// to an A = 4 accumulator. Every fourth valid sample the output must pulse
// `out_valid` on the next clock with the exact sum of the last four samples,
// and at no other time. Extreme values (all four at -1024 or +1023) check
// that the 13-bit sum does not overflow. With gap-free input the output
// rate must be one sum every 4 clocks.
module tb_clt_accum;
  localparam int A = 4, IW = 11;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [IW-1:0] x;
  logic signed [IW+1:0] sum;
  logic out_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  clt_accum #(.A(A), .IW(IW)) dut (.clk, .rst_n, .in_valid, .x, .sum, .out_valid);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s sum=%0d at %0t", what, sum, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int part, cnt, e, last_out, nout;
    bit due;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    part = 0; cnt = 0; nout = 0;
    for (int n = 0; n < 6000; n++) begin
      bit v;
      int val;
      // phase 1: random gaps; phase 2: extremes; phase 3: gap-free
      v = (n < 4000) ? ($urandom_range(0, 2) != 0) : 1'b1;
      if (n >= 4000 && n < 4008) val = (n < 4004) ? -1024 : 1023;
      else val = int'($urandom_range(0, 2047)) - 1024;
      in_valid = v;
      x = IW'(val);
      due = 1'b0;
      if (v) begin
        part += val;
        cnt++;
        if (cnt == A) begin
          due = 1'b1; e = part; part = 0; cnt = 0;
        end
      end
      @(posedge clk);
      #1;
      check(out_valid == due, "out_valid only after every A-th sample");
      if (due) begin
        check(int'(sum) == e, "sum of A samples");
        if (n >= 4008) begin
          if (nout > 0) check(n - last_out == A, "one output every A clocks");
          last_out = n;
          nout++;
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

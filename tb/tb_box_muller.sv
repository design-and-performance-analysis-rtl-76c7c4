// tb_box_muller: self-checking test of the product, truncation and sign.
//
// Drives 5000 random (f, g, sign) triples with random gaps in `in_valid`
// (m = 7, m' = 6, b = 6) and compares, one clock later, the sample with the
// value computed here in reals: floor(f/2^7 * g/2^6 * 2^6), negated when
// sign = 1. The valid flag must follow `in_valid` by exactly one clock and
// the sample must hold while `in_valid` is low. Both signs must occur.
module tb_box_muller;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [9:0] f;
  logic [6:0] g;
  logic sign;
  logic signed [10:0] bm;
  logic out_valid;
  int checks = 0, failures = 0, npos = 0, nneg = 0;

  always #5 clk = ~clk;

  box_muller #(.M(7), .MG(6), .B(6)) dut (.clk, .rst_n, .in_valid, .f, .g, .sign, .bm, .out_valid);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s f=%0d g=%0d sign=%0d bm=%0d", what, f, g, sign, bm);
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
    int e, last;
    bit seen = 1'b0;
    logic v;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    last = 0;
    for (int n = 0; n < 5000; n++) begin
      v = ($urandom_range(0, 3) != 0);
      in_valid = v;
      f = 10'($urandom_range(0, 500));
      g = 7'($urandom_range(0, 91));
      sign = 1'($urandom());
      e = int'($floor((real'(f) / 128.0) * (real'(g) / 64.0) * 64.0));
      if (sign) e = -e;
      @(posedge clk);
      #1;
      check(out_valid == v, "valid latency one clock");
      if (v) begin
        check(int'(bm) == e, "sample value");
        last = e;
        seen = 1'b1;
        if (e > 0) npos++;
        if (e < 0) nneg++;
      end else if (seen) begin
        check(int'(bm) == last, "hold without in_valid");
      end
      @(negedge clk);
    end
    check(npos > 100 && nneg > 100, "both signs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

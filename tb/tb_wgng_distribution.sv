// tb_wgng_distribution: measured against exact output distribution of the
// noise generator for the configurations it is evaluated in.
//
// Instances of wgng_dist_check run side by side, each with its own
// generator: the synthesised configuration (b = 6, A = 4, delta = 0.467),
// the single-sample example (b = 6, A = 1, delta = 0.36), and corners of the
// quality table (b = 1, A = 2, delta = 0.44; b = 3, A = 3, delta = 0.445;
// b = 8, A = 5, delta = 0.467). Each compares the histogram of its output
// with the exact law (see wgng_dist_check). The test passes when every
// instance does.
module tb_wgng_distribution;
  logic clk = 1'b0, rst_n = 1'b0;
  int c [5], f [5];
  bit d [5];
  int checks, failures;

  always #5 clk = ~clk;

  wgng_dist_check #(.B(6), .A(4), .DELTA(0.467), .NCYC(4000000)) u_main (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .done(d[0]));
  wgng_dist_check #(.B(6), .A(1), .DELTA(0.36),  .NCYC(2000000)) u_ex   (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .done(d[1]));
  wgng_dist_check #(.B(1), .A(2), .DELTA(0.44),  .NCYC(1000000)) u_b1   (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .done(d[2]));
  wgng_dist_check #(.B(3), .A(3), .DELTA(0.445), .NCYC(2000000)) u_b3   (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .done(d[3]));
  wgng_dist_check #(.B(8), .A(5), .DELTA(0.467), .NCYC(4000000)) u_b8   (.clk, .rst_n, .checks(c[4]), .failures(f[4]), .done(d[4]));

  initial begin
    repeat (4100000) @(posedge clk);
    checks = 0; failures = 1;
    for (int i = 0; i < 5; i++) begin checks += c[i]; failures += f[i]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d[0] && d[1] && d[2] && d[3] && d[4]);
    checks = 0; failures = 0;
    for (int i = 0; i < 5; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

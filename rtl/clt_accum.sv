// clt_accum: smooths the quantised Box-Muller distribution with the central
// limit theorem by adding A successive samples.
//
// Each valid input sample is added to a running sum; the A-th one completes
// it, the total is presented on `sum` with a one-clock `out_valid` pulse and
// the running sum restarts from zero. With one input per clock the output
// rate is the clock rate divided by A (A = 4 by default). The sum of A unit
// Gaussian-like samples has standard deviation sqrt(A): for A a power of 4
// it reads as a unit-variance sample with b + log2(A)/2 fraction bits, so no
// rescaling is needed (with A = 4, b = 6: 7 fraction bits). The width is
// grown by ceil(log2 A) bits so the sum cannot overflow.
//
// Timing: `sum` and `out_valid` are registered; the output appears on the
// clock after the A-th input. Synchronous active-low reset clears the count,
// the running sum and `out_valid`.
module clt_accum #(
  parameter int unsigned A  = 4,    // samples per output
  parameter int unsigned IW = 11    // input width (signed)
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                in_valid,
  input  logic signed [IW-1:0]                x,
  output logic signed [IW+$clog2(A)-1:0]      sum,
  output logic                                out_valid
);

  localparam int unsigned OW = IW + $clog2(A);
  localparam int unsigned CW = (A > 1) ? $clog2(A) : 1;

  logic signed [OW-1:0] acc, acc_next;
  logic [CW-1:0]        cnt;

  assign acc_next = acc + OW'(x);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc       <= '0;
      cnt       <= '0;
      sum       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (cnt == CW'(A - 1)) begin
          sum       <= acc_next;
          out_valid <= 1'b1;
          acc       <= '0;
          cnt       <= '0;
        end else begin
          acc <= acc_next;
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule

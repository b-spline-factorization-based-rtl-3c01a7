// bspline_stage -- one two-input two-output (1+z^-1) or (1-z^-1) section of a
// B-spline part.
//
// The filter runs on a sample stream x[n] that arrives two samples per clock:
// odd_i is the earlier sample of the pair and even_i the later one (samples
// counted from 1, so the first sample of every pair is odd-numbered). The
// section computes y[n] = x[n] + x[n-1] (SUB = 0) or y[n] = x[n] - x[n-1]
// (SUB = 1) on that stream without ever leaving the two-phase form:
//   even_o = even_i +/- odd_i            (both samples of the current pair)
//   odd_o  = odd_i  +/- even_q           (even_q = even_i of the previous pair)
// so it needs one register and two adders. This is the direct implementation
// of the B-spline part; the placement of the single delay on the path from
// the even input to the odd adder follows the published structure.
//
// SHR = 1 divides both results by two (arithmetic shift right of the W+1 bit
// sum). The B-spline factorization carries denominators 8 and 4 that are
// realised this way between the stages; which stages shift is chosen by the
// enclosing chain. Without SHR the sums wrap to W bits.
//
// Timing: both outputs are combinational in the inputs of the same clock; the
// register only holds even_i for one clock. Active-low asynchronous reset
// clears it.
module bspline_stage #(
  parameter int unsigned W   = 16,   // sample width
  parameter bit          SUB = 1'b0, // 0: (1+z^-1), 1: (1-z^-1)
  parameter bit          SHR = 1'b0  // 1: halve the outputs
) (
  input  logic                clk,
  input  logic                rst_ni,
  input  logic signed [W-1:0] odd_i,   // earlier sample of the pair
  input  logic signed [W-1:0] even_i,  // later sample of the pair
  output logic signed [W-1:0] odd_o,
  output logic signed [W-1:0] even_o
);

  logic signed [W-1:0] even_q;
  logic signed [W:0]   sum_even, sum_odd;

  always_ff @(posedge clk or negedge rst_ni) begin
    if (!rst_ni) even_q <= '0;
    else         even_q <= even_i;
  end

  always_comb begin
    if (SUB) begin
      sum_even = (W+1)'(even_i) - (W+1)'(odd_i);
      sum_odd  = (W+1)'(odd_i)  - (W+1)'(even_q);
    end else begin
      sum_even = (W+1)'(even_i) + (W+1)'(odd_i);
      sum_odd  = (W+1)'(odd_i)  + (W+1)'(even_q);
    end
  end

  if (SHR) begin : g_shr
    assign even_o = sum_even[W:1];
    assign odd_o  = sum_odd[W:1];
  end else begin : g_noshr
    assign even_o = sum_even[W-1:0];
    assign odd_o  = sum_odd[W-1:0];
  end

endmodule

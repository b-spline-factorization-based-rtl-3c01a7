// tb_bspline_part -- checks three B-spline chains against the one-dimensional
// reference (N repeated sections y[n] = x[n] +/- x[n-1] on the interleaved
// stream, halving where the mask says):
//   u0: (1+z^-1)^9, halving after sections 4, 6, 8, no pipeline cut
//   u1: the same with the pipeline cut after section 3 (one clock later)
//   u2: (1-z^-1)^5, halving after sections 2, 4, cut after section 1
// The cut must delay the result by exactly one clock; u1 is also compared
// with u0 of the previous clock.
module tb_bspline_part;
  import idwt_tb_pkg::*;

  localparam int W = 16;
  localparam int NPAIRS = 300;

  logic clk = 1'b0, rst_ni = 1'b0;
  logic signed [W-1:0] odd_i, even_i;
  logic signed [W-1:0] odd_o [3], even_o [3];
  logic signed [W-1:0] prev_odd0, prev_even0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bspline_part #(.W(W), .N(9), .SUB(1'b0), .SHIFT_MASK(32'h0A8), .PIPE_AFTER(0)) u0 (
    .clk(clk), .rst_ni(rst_ni), .odd_i(odd_i), .even_i(even_i), .odd_o(odd_o[0]), .even_o(even_o[0]));
  bspline_part #(.W(W), .N(9), .SUB(1'b0), .SHIFT_MASK(32'h0A8), .PIPE_AFTER(3)) u1 (
    .clk(clk), .rst_ni(rst_ni), .odd_i(odd_i), .even_i(even_i), .odd_o(odd_o[1]), .even_o(even_o[1]));
  bspline_part #(.W(W), .N(5), .SUB(1'b1), .SHIFT_MASK(32'h00A), .PIPE_AFTER(1)) u2 (
    .clk(clk), .rst_ni(rst_ni), .odd_i(odd_i), .even_i(even_i), .odd_o(odd_o[2]), .even_o(even_o[2]));

  initial begin : watchdog
    repeat (NPAIRS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(int u, longint e_odd, longint e_even, int k);
    checks += 2;
    if (odd_o[u] !== W'(e_odd) || even_o[u] !== W'(e_even)) begin
      failures++;
      if (failures < 10)
        $display("chain %0d pair %0d: got %0d %0d, expected %0d %0d",
                 u, k, odd_o[u], even_o[u], e_odd, e_even);
    end
  endtask

  initial begin
    seq_t x, y0, y2;
    odd_i = '0; even_i = '0;
    prev_odd0 = '0; prev_even0 = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_ni = 1'b1;
    for (int k = 0; k < NPAIRS; k++) begin
      @(negedge clk);
      // Inputs below 1/8 of full scale keep the chains in range for most of
      // the run; the last part uses full-range words to cover wrapping.
      odd_i  = (k < 200) ? W'($signed($urandom_range(0, 8000)) - 4000) : W'($urandom);
      even_i = (k < 200) ? W'($signed($urandom_range(0, 8000)) - 4000) : W'($urandom);
      x.push_back(longint'(odd_i));
      x.push_back(longint'(even_i));
      #1;
      y0 = chain(x, 9, 1'b0, 32'h0A8, W);
      y2 = chain(x, 5, 1'b1, 32'h00A, W);
      cmp(0, y0[2*k], y0[2*k+1], k);
      if (k == 0) begin
        cmp(1, 0, 0, k);
        cmp(2, 0, 0, k);
      end else begin
        cmp(1, y0[2*k-2], y0[2*k-1], k);
        cmp(2, y2[2*k-2], y2[2*k-1], k);
        checks++;
        if (odd_o[1] !== prev_odd0 || even_o[1] !== prev_even0) failures++;
      end
      prev_odd0 = odd_o[0];
      prev_even0 = even_o[0];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

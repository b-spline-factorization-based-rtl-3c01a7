// tb_bspline_stage -- checks all four variants of the two-phase (1 +/- z^-1)
// section, with and without halving, against the one-dimensional recurrence
// y[n] = x[n] +/- x[n-1] on the interleaved stream (odd port = earlier
// sample). Random full-range words, so wrapping is exercised too. Outputs are
// combinational, so each pair is checked in the clock it is applied.
module tb_bspline_stage;
  import idwt_tb_pkg::*;

  localparam int W = 16;
  localparam int NPAIRS = 400;

  logic clk = 1'b0, rst_ni = 1'b0;
  logic signed [W-1:0] odd_i, even_i;
  logic signed [W-1:0] odd_o [4], even_o [4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar v = 0; v < 4; v++) begin : g_dut
    bspline_stage #(.W(W), .SUB(v[0]), .SHR(v[1])) u_dut (
      .clk(clk), .rst_ni(rst_ni), .odd_i(odd_i), .even_i(even_i),
      .odd_o(odd_o[v]), .even_o(even_o[v]));
  end

  initial begin : watchdog
    repeat (NPAIRS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seq_t x, y;
    odd_i = '0; even_i = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_ni = 1'b1;
    for (int k = 0; k < NPAIRS; k++) begin
      @(negedge clk);
      // Small values for a while so the unwrapped path is covered as well.
      odd_i  = (k < 100) ? W'($signed($urandom_range(0, 2000)) - 1000) : W'($urandom);
      even_i = (k < 100) ? W'($signed($urandom_range(0, 2000)) - 1000) : W'($urandom);
      x.push_back(longint'(odd_i));
      x.push_back(longint'(even_i));
      #1;
      for (int v = 0; v < 4; v++) begin
        y = section(x, v[0], v[1], W);
        checks += 2;
        if (longint'(odd_o[v]) !== y[2*k] || longint'(even_o[v]) !== y[2*k+1]) begin
          failures++;
          if (failures < 10)
            $display("variant %0d pair %0d: got odd=%0d even=%0d, expected %0d %0d",
                     v, k, odd_o[v], even_o[v], y[2*k], y[2*k+1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

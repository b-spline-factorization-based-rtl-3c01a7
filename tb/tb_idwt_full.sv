// tb_idwt_full -- one complete reconstruction with the inverse DWT exactly as
// built by default (serial filters, pipelined, retimed, 16-bit words).
// A random signal of 2*NPR samples is split into its two subbands by the
// (10,18) analysis bank (real arithmetic, rounded), the subbands are fed one
// pair per clock, the highpass two clocks behind the lowpass as the retimed
// circuit needs, and every output pair is checked one clock later:
// exactly against the word-level model, and against the original signal
// x[n-17] within PR_TOL. Before that, a highpass impulse and a lowpass
// impulse and a stretch of random subbands are run through the same checks.
module tb_idwt_full;
  import idwt_tb_pkg::*;

  localparam int DW = 16;
  localparam int NRAND = 200, NPR = 1000;
  localparam real PR_TOL = 400.0;
  localparam int LAT = 1;   // one pipeline cut

  logic clk = 1'b0, rst_ni = 1'b0;
  logic signed [DW-1:0] lp_i, hp_i, y_odd_o, y_even_o;
  int checks = 0, failures = 0, n_pr = 0;

  always #5 clk = ~clk;

  idwt_bspline_top u_dut (.clk(clk), .rst_ni(rst_ni), .lp_i(lp_i), .hp_i(hp_i),
                          .y_odd_o(y_odd_o), .y_even_o(y_even_o));

  initial begin : watchdog
    repeat (80 + NRAND + NPR + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seq_t lp, hp_r, hp_n, x, ym;
    int pr_start, j;
    real err, max_pr;
    stimulus(DW, NRAND, NPR, 6000, lp, hp_r, hp_n, x, pr_start);
    ym = idwt_model(lp, hp_r, 1'b0, 1'b1, DW, 14, 14);
    max_pr = 0.0;
    lp_i = '0; hp_i = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_ni = 1'b1;
    for (int k = 0; k < lp.size() + LAT; k++) begin
      @(negedge clk);
      lp_i = (k < lp.size()) ? DW'(lp[k])   : '0;
      hp_i = (k < lp.size()) ? DW'(hp_r[k]) : '0;
      #1;
      j = k - LAT;
      checks++;
      if (j < 0) begin
        if (y_odd_o != 0 || y_even_o != 0) failures++;
        continue;
      end
      if (y_odd_o !== DW'(ym[2*j]) || y_even_o !== DW'(ym[2*j+1])) begin
        failures++;
        if (failures < 10) $display("pair %0d: got %0d %0d, model %0d %0d", j, y_odd_o, y_even_o, ym[2*j], ym[2*j+1]);
      end
      if (j >= pr_start + 12) begin
        for (int p = 0; p < 2; p++) begin
          automatic int n = 2 * (j - pr_start) + p - 17;
          err = real'((p != 0) ? y_even_o : y_odd_o) - real'(x[n]);
          if (err < 0) err = -err;
          if (err > max_pr) max_pr = err;
          checks++;
          if (err > PR_TOL) begin
            failures++;
            if (failures < 10) $display("sample %0d: reconstruction error %f", n, err);
          end else n_pr++;
        end
      end
    end
    $display("reconstructed %0d samples, max error %0.1f LSB (signal amplitude 6000)", n_pr, max_pr);
    checks++;
    if (n_pr < 2 * (NPR - 20)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

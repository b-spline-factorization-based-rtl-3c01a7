// tb_idwt_bspline_top -- end-to-end test of the B-spline inverse DWT in the
// four build variants the architecture offers:
//   u_a  serial filters, pipelined, retimed  (the defaults)
//   u_b  parallel filters, pipelined, retimed
//   u_c  serial filters, not pipelined, retimed
//   u_d  parallel filters, not pipelined, not retimed
// All see the same stimulus (impulses, random subbands, then the subbands of
// a random signal from the analysis bank). Each output pair is compared
//   - exactly with the word-level model of its variant,
//   - with the ideal real-valued synthesis bank, within ERR_TOL,
//   - in the last segment, with the original signal x[n-17] (perfect
//     reconstruction), within PR_TOL.
// Latency is checked too: outputs of pipelined variants belong to the pair of
// the previous clock, and the variant without retiming answers a highpass
// impulse two pairs later than the retimed ones. Each mechanism (pipeline
// delay, retiming offset, serial and parallel filters, reconstruction) is
// counted, and one that never shows is a failure.
module tb_idwt_bspline_top;
  import idwt_tb_pkg::*;
  import idwt1018_pkg::*;

  localparam int DW = 16;
  localparam int NRAND = 300, NPR = 400;
  localparam int NV = 4;
  localparam real ERR_TOL = 320.0;
  localparam real PR_TOL  = 400.0;
  localparam bit PAR  [NV] = '{1'b0, 1'b1, 1'b0, 1'b1};
  localparam bit PIPE [NV] = '{1'b1, 1'b1, 1'b0, 1'b0};
  localparam bit RET  [NV] = '{1'b1, 1'b1, 1'b1, 1'b0};

  logic clk = 1'b0, rst_ni = 1'b0;
  logic signed [DW-1:0] lp_i, hp_r_i, hp_n_i;
  logic signed [DW-1:0] y_odd [NV], y_even [NV];
  int checks = 0, failures = 0;
  int n_pipe = 0, n_nopipe = 0, n_retime_off = 0, n_serial = 0, n_parallel = 0, n_pr = 0;

  always #5 clk = ~clk;

  idwt_bspline_top u_a (.clk(clk), .rst_ni(rst_ni), .lp_i(lp_i), .hp_i(hp_r_i),
                        .y_odd_o(y_odd[0]), .y_even_o(y_even[0]));
  idwt_bspline_top #(.STYLE(FIR_PARALLEL)) u_b (
    .clk(clk), .rst_ni(rst_ni), .lp_i(lp_i), .hp_i(hp_r_i), .y_odd_o(y_odd[1]), .y_even_o(y_even[1]));
  idwt_bspline_top #(.PIPELINE(1'b0)) u_c (
    .clk(clk), .rst_ni(rst_ni), .lp_i(lp_i), .hp_i(hp_r_i), .y_odd_o(y_odd[2]), .y_even_o(y_even[2]));
  idwt_bspline_top #(.STYLE(FIR_PARALLEL), .PIPELINE(1'b0), .RETIME(1'b0)) u_d (
    .clk(clk), .rst_ni(rst_ni), .lp_i(lp_i), .hp_i(hp_n_i), .y_odd_o(y_odd[3]), .y_even_o(y_even[3]));

  initial begin : watchdog
    repeat (80 + NRAND + NPR + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string what);
    failures++;
    if (failures < 20) $display("FAIL %s", what);
  endtask

  initial begin
    seq_t lp, hp_r, hp_n, x;
    seq_t ym [NV];
    real  yi [NV][$];
    int   pr_start, j, cyc;
    longint e_odd, e_even;
    real err, max_err, max_pr;

    stimulus(DW, NRAND, NPR, 6000, lp, hp_r, hp_n, x, pr_start);
    for (int v = 0; v < NV; v++) begin
      ym[v] = idwt_model(lp, RET[v] ? hp_r : hp_n, PAR[v], RET[v], DW, 14, 14);
      ideal_model(lp, RET[v] ? hp_r : hp_n, RET[v], yi[v]);
    end
    max_err = 0.0;
    max_pr = 0.0;

    lp_i = '0; hp_r_i = '0; hp_n_i = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_ni = 1'b1;
    for (int k = 0; k < lp.size() + 1; k++) begin
      @(negedge clk);
      lp_i   = (k < lp.size()) ? DW'(lp[k])   : '0;
      hp_r_i = (k < lp.size()) ? DW'(hp_r[k]) : '0;
      hp_n_i = (k < lp.size()) ? DW'(hp_n[k]) : '0;
      #1;
      for (int v = 0; v < NV; v++) begin
        j = k - int'(PIPE[v]);            // input pair this output belongs to
        if (j < 0 || j >= lp.size()) continue;
        // exact
        e_odd  = ym[v][2*j];
        e_even = ym[v][2*j+1];
        checks++;
        if (y_odd[v] !== DW'(e_odd) || y_even[v] !== DW'(e_even))
          fail($sformatf("variant %0d pair %0d: got %0d %0d, model %0d %0d",
                         v, j, y_odd[v], y_even[v], e_odd, e_even));
        else if (PAR[v]) n_parallel++;
        else n_serial++;
        // against the ideal filter bank
        err = real'(y_odd[v]) - yi[v][2*j];
        if (err < 0) err = -err;
        if (err > max_err) max_err = err;
        checks++;
        if (err > ERR_TOL) fail($sformatf("variant %0d pair %0d: ideal error %f", v, j, err));
        err = real'(y_even[v]) - yi[v][2*j+1];
        if (err < 0) err = -err;
        if (err > max_err) max_err = err;
        if (err > ERR_TOL) fail($sformatf("variant %0d pair %0d: ideal error %f", v, j, err));
        // reconstruction: y[n] = x[n-17], n counted from the segment start
        if (j >= pr_start + 12) begin
          for (int p = 0; p < 2; p++) begin
            automatic int n = 2 * (j - pr_start) + p - 17;
            err = real'((p != 0) ? y_even[v] : y_odd[v]) - real'(x[n]);
            if (err < 0) err = -err;
            if (err > max_pr) max_pr = err;
            checks++;
            if (err > PR_TOL) fail($sformatf("variant %0d sample %0d: reconstruction error %f", v, n, err));
            else n_pr++;
          end
        end
      end
      // Latency of the highpass impulse applied at pair 0.
      cyc = k;
      if (cyc <= 3) begin
        for (int v = 0; v < NV; v++) begin
          automatic int first = int'(PIPE[v]) + (RET[v] ? 0 : 2);
          automatic bit nz = (y_odd[v] != 0) || (y_even[v] != 0);
          checks++;
          if (nz != (cyc >= first)) fail($sformatf("variant %0d: impulse latency wrong at clock %0d", v, cyc));
          else if (cyc == first) begin
            if (PIPE[v]) n_pipe++;
            else n_nopipe++;
            if (!RET[v]) n_retime_off++;
          end
        end
      end
    end

    $display("max error against ideal bank %0.1f LSB, max reconstruction error %0.1f LSB", max_err, max_pr);
    $display("mechanisms: pipeline delay %0d, no pipeline %0d, retiming off %0d, serial %0d, parallel %0d, reconstruction %0d",
             n_pipe, n_nopipe, n_retime_off, n_serial, n_parallel, n_pr);
    checks++;
    if (n_pipe == 0 || n_nopipe == 0 || n_retime_off == 0 || n_serial == 0 || n_parallel == 0 || n_pr == 0)
      fail("a mechanism was never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_idwt_bspline_core -- checks the general B-spline synthesis core with two
// filter banks other than the (10,18) one, so that its generality is
// exercised:
//   u0  LeGall 5/3: Ht = (1+z^-1)^2 / 2, Gt = (1-z^-1)^2 (-1 -4 -1)/8.
//       One-tap polyphase filters (Qe = 1, Qo = 0, Ro = -1/2), serial
//       filters, pipeline cut after section 1.
//   u1  an arbitrary bank with non-symmetric polyphase filters (Q of 4
//       taps, R of 5 taps), orders 3 and 2, parallel filters, a cut after
//       section 3 (the 2-section highpass chain is cut at its end instead),
//       and one register of highpass input delay.
// Each output pair is compared exactly with the word-level model and with
// the ideal real-valued bank (ERR_TOL). Both variants are pipelined, so each
// output belongs to the input pair of the previous clock.
module tb_idwt_bspline_core;
  import idwt_tb_pkg::*;
  import idwt1018_pkg::*;

  localparam int DW = 16, SH = 14;
  localparam int NSAMP = 400;
  localparam real ERR_TOL = 40.0;

  // LeGall 5/3
  localparam int A_QE [1] = '{16384};
  localparam int A_QO [1] = '{0};
  localparam int A_RE [2] = '{-2048, -2048};
  localparam int A_RO [1] = '{-8192};
  // non-symmetric bank
  localparam int B_QE [2] = '{3000, 7000};
  localparam int B_QO [2] = '{-5000, 1200};
  localparam int B_RE [3] = '{-4000, 6000, 800};
  localparam int B_RO [2] = '{2500, -1500};

  logic clk = 1'b0, rst_ni = 1'b0;
  logic signed [DW-1:0] lp_i, hp_i;
  logic signed [DW-1:0] y_odd [2], y_even [2];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  idwt_bspline_core #(
    .DW(DW), .CW(16), .QSHIFT(SH), .STYLE(FIR_SERIAL), .GAMMA_H(2), .GAMMA_G(2),
    .NQE(1), .NQO(1), .NRE(2), .NRO(1), .QE(A_QE), .QO(A_QO), .RE(A_RE), .RO(A_RO),
    .LP_SHIFT_MASK(32'h2), .HP_SHIFT_MASK(32'h0), .PIPE_AFTER(1), .HP_DELAY(0)
  ) u0 (.clk(clk), .rst_ni(rst_ni), .lp_i(lp_i), .hp_i(hp_i), .y_odd_o(y_odd[0]), .y_even_o(y_even[0]));

  idwt_bspline_core #(
    .DW(DW), .CW(16), .QSHIFT(SH), .STYLE(FIR_PARALLEL), .GAMMA_H(3), .GAMMA_G(2),
    .NQE(2), .NQO(2), .NRE(3), .NRO(2), .QE(B_QE), .QO(B_QO), .RE(B_RE), .RO(B_RO),
    .LP_SHIFT_MASK(32'h5), .HP_SHIFT_MASK(32'h1), .PIPE_AFTER(3), .HP_DELAY(1)
  ) u1 (.clk(clk), .rst_ni(rst_ni), .lp_i(lp_i), .hp_i(hp_i), .y_odd_o(y_odd[1]), .y_even_o(y_even[1]));

  initial begin : watchdog
    repeat (NSAMP + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void to_dyn(input int src[], output int dst[]);
    dst = new[src.size()];
    foreach (src[i]) dst[i] = src[i];
  endfunction

  initial begin
    seq_t lp, hp;
    seq_t ym [2];
    real  yi [2][$];
    int qe[], qo[], re[], ro[];
    real err, max_err;
    int j;

    for (int k = 0; k < NSAMP; k++) begin
      lp.push_back(longint'($signed($urandom_range(0, 4094))) - 2047);
      hp.push_back(longint'($signed($urandom_range(0, 4094))) - 2047);
    end
    qe = new[1]; qe[0] = A_QE[0];
    qo = new[1]; qo[0] = A_QO[0];
    re = new[2]; re[0] = A_RE[0]; re[1] = A_RE[1];
    ro = new[1]; ro[0] = A_RO[0];
    ym[0] = idwt_model_gen(lp, hp, qe, qo, re, ro, 2, 2, 32'h2, 32'h0, 1'b0, 0, DW, SH);
    ideal_gen(lp, hp, qe, qo, re, ro, 2, 2, 32'h2, 32'h0, 0, SH, yi[0]);
    qe = new[2]; qe[0] = B_QE[0]; qe[1] = B_QE[1];
    qo = new[2]; qo[0] = B_QO[0]; qo[1] = B_QO[1];
    re = new[3]; re[0] = B_RE[0]; re[1] = B_RE[1]; re[2] = B_RE[2];
    ro = new[2]; ro[0] = B_RO[0]; ro[1] = B_RO[1];
    ym[1] = idwt_model_gen(lp, hp, qe, qo, re, ro, 3, 2, 32'h5, 32'h1, 1'b1, 1, DW, SH);
    ideal_gen(lp, hp, qe, qo, re, ro, 3, 2, 32'h5, 32'h1, 1, SH, yi[1]);
    max_err = 0.0;

    lp_i = '0; hp_i = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_ni = 1'b1;
    for (int k = 0; k <= NSAMP; k++) begin
      @(negedge clk);
      lp_i = (k < NSAMP) ? DW'(lp[k]) : '0;
      hp_i = (k < NSAMP) ? DW'(hp[k]) : '0;
      #1;
      j = k - 1;    // one pipeline cut in both variants
      for (int v = 0; v < 2; v++) begin
        checks++;
        if (j < 0) begin
          if (y_odd[v] != 0 || y_even[v] != 0) failures++;
          continue;
        end
        if (y_odd[v] !== DW'(ym[v][2*j]) || y_even[v] !== DW'(ym[v][2*j+1])) begin
          failures++;
          if (failures < 10) $display("variant %0d pair %0d: got %0d %0d, model %0d %0d",
                                      v, j, y_odd[v], y_even[v], ym[v][2*j], ym[v][2*j+1]);
        end
        for (int p = 0; p < 2; p++) begin
          err = real'((p != 0) ? y_even[v] : y_odd[v]) - yi[v][2*j+p];
          if (err < 0) err = -err;
          if (err > max_err) max_err = err;
          checks++;
          if (err > ERR_TOL) begin
            failures++;
            if (failures < 10) $display("variant %0d pair %0d: ideal error %f", v, j, err);
          end
        end
      end
    end
    $display("max error against the ideal banks %0.1f LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

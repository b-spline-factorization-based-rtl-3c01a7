// idwt_bspline_core -- general B-spline factorized synthesis filter bank
// (one inverse DWT stage) for any two-channel wavelet whose synthesis filters
// factor as
//   Ht(z) = (1+z^-1)^GAMMA_H * Q(z) / 2^(shifts in LP_SHIFT_MASK)
//   Gt(z) = (1-z^-1)^GAMMA_G * R(z) / 2^(shifts in HP_SHIFT_MASK)
// with Q(z) = Qe(z^2) + z^-1 Qo(z^2) and R(z) = Re(z^2) + z^-1 Ro(z^2).
//
// Each clock takes one lowpass sample lp_i and one highpass sample hp_i and
// returns two output samples, y_odd_o (the earlier) and y_even_o (the later).
// Structure, as in the published general architecture: per channel, the two
// polyphase filters of the distributed part see the same input, their outputs
// form a two-phase stream (the even-phase filter gives the earlier sample, so
// it drives the chain's odd port), the stream passes the B-spline part, and
// the two channels are summed phase by phase. The distributed part is built
// from serial (transposed) or parallel (direct, shared delay line) filters
// per STYLE; mirrored taps of symmetric filters share a multiplier.
//
// PIPE_AFTER = k > 0 places one register on each wire of both chains after
// section k (a chain shorter than k is cut at its end, so both channels keep
// the same latency). HP_DELAY inserts that many registers on hp_i; use it for
// leading zero taps of Re/Ro that were not removed by retiming.
//
// Number format and overflow: see poly_fir_serial/poly_fir_parallel and
// bspline_stage; every word is DW bits and wraps.
//
// Timing: with PIPE_AFTER = 0 the outputs are combinational in the inputs of
// the same clock; otherwise they appear one clock later. The defaults are the
// (10,18) bank with serial filters, retimed and pipelined.
module idwt_bspline_core
  import idwt1018_pkg::fir_style_e;
#(
  parameter int unsigned DW            = 16,
  parameter int unsigned CW            = 16,
  parameter int unsigned QSHIFT        = 14,
  parameter fir_style_e  STYLE         = idwt1018_pkg::FIR_SERIAL,
  parameter int unsigned GAMMA_H       = 9,
  parameter int unsigned GAMMA_G       = 5,
  parameter int unsigned NQE           = 5,
  parameter int unsigned NQO           = 4,
  parameter int unsigned NRE           = 3,
  parameter int unsigned NRO           = 2,
  parameter int          QE [NQE]      = '{125, 4394, 13253, 4394, 125},
  parameter int          QO [NQO]      = '{-1126, -9838, -9838, -1126},
  parameter int          RE [NRE]      = '{-1891, -18013, -1891},
  parameter int          RO [NRO]      = '{-9449, -9449},
  parameter int unsigned LP_SHIFT_MASK = 32'h0A8,
  parameter int unsigned HP_SHIFT_MASK = 32'h00A,
  parameter int unsigned PIPE_AFTER    = 3,
  parameter int unsigned HP_DELAY      = 0
) (
  input  logic                 clk,
  input  logic                 rst_ni,
  input  logic signed [DW-1:0] lp_i,
  input  logic signed [DW-1:0] hp_i,
  output logic signed [DW-1:0] y_odd_o,
  output logic signed [DW-1:0] y_even_o
);

  localparam int unsigned PIPE_H = (PIPE_AFTER > GAMMA_H) ? GAMMA_H : PIPE_AFTER;
  localparam int unsigned PIPE_G = (PIPE_AFTER > GAMMA_G) ? GAMMA_G : PIPE_AFTER;

  // ------------------------------------------------- highpass input delay
  logic signed [DW-1:0] hp_x;

  if (HP_DELAY == 0) begin : g_hp_direct
    assign hp_x = hp_i;
  end else begin : g_hp_delay
    logic signed [DW-1:0] hp_d [HP_DELAY];
    always_ff @(posedge clk or negedge rst_ni) begin
      if (!rst_ni) begin
        for (int i = 0; i < HP_DELAY; i++) hp_d[i] <= '0;
      end else begin
        hp_d[0] <= hp_i;
        for (int i = 1; i < HP_DELAY; i++) hp_d[i] <= hp_d[i-1];
      end
    end
    assign hp_x = hp_d[HP_DELAY-1];
  end

  // ------------------------------------------------------- distributed part
  logic signed [DW-1:0] qe, qo, re, ro;

  if (STYLE == idwt1018_pkg::FIR_SERIAL) begin : g_serial
    poly_fir_serial #(.DW(DW), .CW(CW), .QSHIFT(QSHIFT), .NTAPS(NQE), .COEF(QE))
      u_qe (.clk(clk), .rst_ni(rst_ni), .x_i(lp_i), .y_o(qe));
    poly_fir_serial #(.DW(DW), .CW(CW), .QSHIFT(QSHIFT), .NTAPS(NQO), .COEF(QO))
      u_qo (.clk(clk), .rst_ni(rst_ni), .x_i(lp_i), .y_o(qo));
    poly_fir_serial #(.DW(DW), .CW(CW), .QSHIFT(QSHIFT), .NTAPS(NRE), .COEF(RE))
      u_re (.clk(clk), .rst_ni(rst_ni), .x_i(hp_x), .y_o(re));
    poly_fir_serial #(.DW(DW), .CW(CW), .QSHIFT(QSHIFT), .NTAPS(NRO), .COEF(RO))
      u_ro (.clk(clk), .rst_ni(rst_ni), .x_i(hp_x), .y_o(ro));
  end else begin : g_parallel
    poly_fir_parallel #(.DW(DW), .CW(CW), .QSHIFT(QSHIFT), .NE(NQE), .NO(NQO),
                        .COEF_E(QE), .COEF_O(QO))
      u_q (.clk(clk), .rst_ni(rst_ni), .x_i(lp_i), .ye_o(qe), .yo_o(qo));
    poly_fir_parallel #(.DW(DW), .CW(CW), .QSHIFT(QSHIFT), .NE(NRE), .NO(NRO),
                        .COEF_E(RE), .COEF_O(RO))
      u_r (.clk(clk), .rst_ni(rst_ni), .x_i(hp_x), .ye_o(re), .yo_o(ro));
  end

  // ------------------------------------------------------- B-spline parts
  // The even-phase filter output is the earlier sample of each pair, so it
  // enters the chain on the odd port (the crossover in front of the chains).
  logic signed [DW-1:0] lp_odd, lp_even, hp_odd, hp_even;

  bspline_part #(
    .W(DW), .N(GAMMA_H), .SUB(1'b0), .SHIFT_MASK(LP_SHIFT_MASK), .PIPE_AFTER(PIPE_H)
  ) u_bspl_h (
    .clk(clk), .rst_ni(rst_ni),
    .odd_i(qe), .even_i(qo),
    .odd_o(lp_odd), .even_o(lp_even)
  );

  bspline_part #(
    .W(DW), .N(GAMMA_G), .SUB(1'b1), .SHIFT_MASK(HP_SHIFT_MASK), .PIPE_AFTER(PIPE_G)
  ) u_bspl_g (
    .clk(clk), .rst_ni(rst_ni),
    .odd_i(re), .even_i(ro),
    .odd_o(hp_odd), .even_o(hp_even)
  );

  // ------------------------------------------------------- channel sum
  assign y_odd_o  = lp_odd  + hp_odd;
  assign y_even_o = lp_even + hp_even;

endmodule

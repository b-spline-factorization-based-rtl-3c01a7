// idwt_bspline_top -- inverse DWT (synthesis filter bank) of the (10,18)
// wavelet, built on the B-spline factorization of its two synthesis filters.
//
// Every clock takes one lowpass subband sample lp_i and one highpass subband
// sample hp_i and produces two reconstructed samples: y_odd_o, the earlier one,
// and y_even_o, the later one (output samples counted from 1).
//
// The circuit is idwt_bspline_core set up for this bank; this module fixes
// the coefficients and turns the published build options into core settings.
// Structure (per channel): the input feeds the two polyphase filters of the
// distributed part (Qe/Qo for the lowpass, Re/Ro for the highpass), whose
// outputs form a two-phase stream -- the even-phase filter gives the earlier
// sample of each pair and so enters the chain on its odd port, the odd-phase
// filter the later one. That stream runs through the B-spline part, nine
// (1+z^-1) sections for the lowpass and five (1-z^-1) sections for the
// highpass, with the factorization's denominators 8 and 4 done as right shifts
// between sections. The two channels are then added phase by phase. All of
// this, the coefficients, the two filter forms, the pipeline positions and
// the retiming follow the published architecture.
//
// Parameters:
//   STYLE    FIR_SERIAL (transposed filters, 24 registers without the
//            pipeline cut) or FIR_PARALLEL (direct form sharing one delay line
//            per channel, 20 registers).
//   PIPELINE 1 cuts both chains with four registers: after section 3 for
//            serial filters, after section 1 for parallel filters. Adds one
//            clock of latency.
//   RETIME   1 drops the two leading zero taps of Re and Ro (z^-2 each). The
//            highpass channel then runs two input samples ahead, i.e. the
//            circuit computes y = Ht*up(lp) + z^+4 Gt*up(hp); a subband
//            stream from an analysis bank must present each highpass sample
//            two clocks later than the lowpass sample of the same index.
//            0 keeps the two delays as registers on hp_i.
//   DW, CW, CFRAC, QSHIFT  word widths (16 bits throughout, as published),
//            coefficient fraction bits and the product shift. This design's
//            choice: product >>> QSHIFT keeps the data in input units, so the
//            whole circuit has unity scale from subband to output.
//   LP_SHIFT_MASK, HP_SHIFT_MASK  which sections halve (3 and 2 bits set).
//
// Range: all words are DW bits and wrap on overflow. For |lp_i|, |hp_i| below
// 2^(DW-2) no internal node can overflow (worst-case gains of the (10,18)
// bank at every node are below 1.4).
//
// Timing: with PIPELINE = 0 the outputs are combinational in the inputs of the
// same clock (y for input pair k appears with pair k); with PIPELINE = 1 they
// appear one clock later. Active-low asynchronous reset clears all registers,
// which is the same as a history of zero-valued subband samples.
module idwt_bspline_top
  import idwt1018_pkg::*;
#(
  parameter int unsigned DW            = 16,
  parameter int unsigned CW            = 16,
  parameter int unsigned CFRAC         = 14,
  parameter int unsigned QSHIFT        = CFRAC,
  parameter fir_style_e  STYLE         = FIR_SERIAL,
  parameter bit          PIPELINE      = 1'b1,
  parameter bit          RETIME        = 1'b1,
  parameter int unsigned LP_SHIFT_MASK = 32'h0A8,  // sections 4, 6, 8
  parameter int unsigned HP_SHIFT_MASK = 32'h00A   // sections 2, 4
) (
  input  logic                 clk,
  input  logic                 rst_ni,
  input  logic signed [DW-1:0] lp_i,      // lowpass subband sample
  input  logic signed [DW-1:0] hp_i,      // highpass subband sample
  output logic signed [DW-1:0] y_odd_o,   // earlier output sample of the pair
  output logic signed [DW-1:0] y_even_o   // later output sample of the pair
);

  // Distributed-part coefficients in fixed point.
  localparam int C1 = quant(V1, CFRAC);
  localparam int C2 = quant(V2, CFRAC);
  localparam int C3 = quant(V3, CFRAC);
  localparam int C4 = quant(V4, CFRAC);
  localparam int C5 = quant(V5, CFRAC);
  localparam int C6 = quant(V6, CFRAC);
  localparam int C7 = quant(V7, CFRAC);
  localparam int C8 = quant(V8, CFRAC);

  // Polyphase components: Q(z) = Qe(z^2) + z^-1 Qo(z^2), likewise R(z);
  // Re and Ro without their two leading zero taps.
  localparam int QE [5] = '{C1, C3, C5, C3, C1};
  localparam int QO [4] = '{C2, C4, C4, C2};
  localparam int RE [3] = '{C6, C8, C6};
  localparam int RO [2] = '{C7, C7};

  // Pipeline cut position for the chosen filter form (after section 3 of each
  // chain for serial filters, after section 1 for parallel filters).
  localparam int unsigned PIPE_AFTER = !PIPELINE ? 0 : (STYLE == FIR_SERIAL ? 3 : 1);

  idwt_bspline_core #(
    .DW(DW), .CW(CW), .QSHIFT(QSHIFT), .STYLE(STYLE),
    .GAMMA_H(GAMMA_H), .GAMMA_G(GAMMA_G),
    .NQE(5), .NQO(4), .NRE(3), .NRO(2),
    .QE(QE), .QO(QO), .RE(RE), .RO(RO),
    .LP_SHIFT_MASK(LP_SHIFT_MASK), .HP_SHIFT_MASK(HP_SHIFT_MASK),
    .PIPE_AFTER(PIPE_AFTER),
    .HP_DELAY(RETIME ? 0 : 2)
  ) u_core (
    .clk(clk), .rst_ni(rst_ni),
    .lp_i(lp_i), .hp_i(hp_i),
    .y_odd_o(y_odd_o), .y_even_o(y_even_o)
  );

  // The shift masks must realise the denominators 8 and 4.
  if ($countones(LP_SHIFT_MASK) != DEN_H_LOG2 || $countones(HP_SHIFT_MASK) != DEN_G_LOG2)
  begin : g_chk_mask
    $error("idwt_bspline_top: shift masks must set %0d and %0d bits", DEN_H_LOG2, DEN_G_LOG2);
  end

endmodule

// poly_fir_parallel -- the even and the odd polyphase filter of one channel of
// the distributed part (Qe and Qo, or Re and Ro) in parallel, i.e. direct,
// form, sharing a single input delay line.
//
//   ye[k] = sum_t COEF_E[t] * x[k-t]   (t = 0..NE-1)
//   yo[k] = sum_t COEF_O[t] * x[k-t]   (t = 0..NO-1)
// Both filters read the same delay line of max(NE,NO)-1 registers, which is
// why this form needs fewer registers than two serial filters. For a
// symmetric coefficient set (as in all filters of the (10,18) bank) the
// mirrored taps are first added (pre-adders) and then multiplied once, so a
// filter of N taps uses ceil(N/2) multipliers; otherwise each tap has its own
// multiplier. The products are then summed. The longest path is one
// pre-adder, one multiplier and the product sum. Reading "parallel filter" as
// this direct form is this design's choice; it reproduces the published
// register count and critical path.
//
// Number format (this design's choice): x is a signed DW-bit word, the
// coefficients signed CW-bit words with QSHIFT fractional bits. Pre-adder
// sums and product sums wrap to DW bits; each product is shifted right
// arithmetically by QSHIFT and wrapped to DW bits. With |x| below half scale
// the pre-adders cannot wrap.
//
// Timing: ye_o and yo_o are combinational in x_i of the same clock.
module poly_fir_parallel #(
  parameter int unsigned DW     = 16,
  parameter int unsigned CW     = 16,
  parameter int unsigned QSHIFT = 14,
  parameter int unsigned NE     = 5,
  parameter int unsigned NO     = 4,
  parameter int          COEF_E [NE] = '{125, 4394, 13253, 4394, 125},
  parameter int          COEF_O [NO] = '{-1126, -9838, -9838, -1126}
) (
  input  logic                 clk,
  input  logic                 rst_ni,
  input  logic signed [DW-1:0] x_i,
  output logic signed [DW-1:0] ye_o,
  output logic signed [DW-1:0] yo_o
);

  localparam int unsigned L = (NE > NO) ? NE : NO;  // delay line taps

  if (NE < 1 || NO < 1) begin : g_chk_n
    $error("poly_fir_parallel: NE and NO must be at least 1");
  end

  function automatic bit sym_e();
    for (int t = 0; t < NE; t++) if (COEF_E[t] != COEF_E[NE-1-t]) return 1'b0;
    return 1'b1;
  endfunction
  function automatic bit sym_o();
    for (int t = 0; t < NO; t++) if (COEF_O[t] != COEF_O[NO-1-t]) return 1'b0;
    return 1'b1;
  endfunction

  localparam bit          SYM_E = sym_e();
  localparam bit          SYM_O = sym_o();
  localparam int unsigned NEU   = SYM_E ? (NE + 1) / 2 : NE;  // multipliers, even filter
  localparam int unsigned NOU   = SYM_O ? (NO + 1) / 2 : NO;  // multipliers, odd filter

  // Shared delay line: dl[0] is the current input, dl[t] = x[k-t].
  logic signed [DW-1:0] dl [L];
  assign dl[0] = x_i;

  if (L > 1) begin : g_dl
    logic signed [DW-1:0] dl_q [1:L-1];
    for (genvar t = 1; t < L; t++) begin : g_tap
      assign dl[t] = dl_q[t];
    end
    always_ff @(posedge clk or negedge rst_ni) begin
      if (!rst_ni) begin
        for (int t = 1; t < L; t++) dl_q[t] <= '0;
      end else begin
        dl_q[1] <= x_i;
        for (int t = 2; t < L; t++) dl_q[t] <= dl_q[t-1];
      end
    end
  end

  // Multiply, shift and wrap one (pre-added) tap value.
  function automatic logic signed [DW-1:0] mul_q(logic signed [DW-1:0] a,
                                                 logic signed [CW-1:0] c);
    logic signed [DW+CW-1:0] p;
    p = (DW+CW)'(a) * (DW+CW)'(c);
    return DW'(p >>> QSHIFT);
  endfunction

  logic signed [DW-1:0] pe [NEU];
  logic signed [DW-1:0] po [NOU];

  always_comb begin
    if (SYM_E) begin
      // Mirrored taps are added before the multiplier; the middle tap of an
      // odd-length filter has no partner.
      for (int u = 0; u < NE / 2; u++) pe[u] = mul_q(dl[u] + dl[NE-1-u], CW'(COEF_E[u]));
      if (NE % 2 == 1) pe[NEU-1] = mul_q(dl[NE/2], CW'(COEF_E[NE/2]));
    end else begin
      for (int u = 0; u < NEU; u++) pe[u] = mul_q(dl[u], CW'(COEF_E[u]));
    end
    if (SYM_O) begin
      for (int u = 0; u < NO / 2; u++) po[u] = mul_q(dl[u] + dl[NO-1-u], CW'(COEF_O[u]));
      if (NO % 2 == 1) po[NOU-1] = mul_q(dl[NO/2], CW'(COEF_O[NO/2]));
    end else begin
      for (int u = 0; u < NOU; u++) po[u] = mul_q(dl[u], CW'(COEF_O[u]));
    end
    ye_o = pe[0];
    for (int u = 1; u < NEU; u++) ye_o += pe[u];
    yo_o = po[0];
    for (int u = 1; u < NOU; u++) yo_o += po[u];
  end

endmodule

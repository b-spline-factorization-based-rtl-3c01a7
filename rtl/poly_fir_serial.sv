// poly_fir_serial -- one polyphase filter of the distributed part (Qe, Qo, Re
// or Ro) in serial, i.e. transposed, form.
//
// y[k] = sum_t COEF[t] * x[k-t], t = 0..NTAPS-1. The input is broadcast to
// the multipliers and the products run along a chain of NTAPS-1 adders and
// NTAPS-1 registers (register t holds the partial sum of taps t..NTAPS-1), so
// the longest path is one multiplier and one adder. When the coefficient set
// is symmetric (COEF[t] == COEF[NTAPS-1-t], true for all four filters of the
// (10,18) bank) a tap and its mirror share one product and the filter uses
// ceil(NTAPS/2) multipliers; otherwise every tap has its own. The transposed
// form itself is this design's reading of "serial filter"; it reproduces the
// published register count and critical path.
//
// Number format (this design's choice): x is a signed DW-bit word, COEF a
// signed CW-bit word with QSHIFT fractional bits. Each product is shifted
// right arithmetically by QSHIFT and wrapped to DW bits before it is added,
// and every adder and register is DW bits wide.
//
// Timing: y_o is combinational in x_i of the same clock (tap 0 has no delay).
module poly_fir_serial #(
  parameter int unsigned DW     = 16,
  parameter int unsigned CW     = 16,
  parameter int unsigned QSHIFT = 14,
  parameter int unsigned NTAPS  = 5,
  parameter int          COEF [NTAPS] = '{125, 4394, 13253, 4394, 125}
) (
  input  logic                 clk,
  input  logic                 rst_ni,
  input  logic signed [DW-1:0] x_i,
  output logic signed [DW-1:0] y_o
);

  function automatic bit is_sym();
    for (int t = 0; t < NTAPS; t++)
      if (COEF[t] != COEF[NTAPS-1-t]) return 1'b0;
    return 1'b1;
  endfunction

  localparam bit          SYM = is_sym();
  localparam int unsigned NP  = SYM ? (NTAPS + 1) / 2 : NTAPS;  // multipliers

  // Product used by tap t: its own, or the one it shares with its mirror.
  function automatic int unsigned pidx(int unsigned t);
    if (!SYM) return t;
    return (t < NTAPS - t) ? t : NTAPS - 1 - t;
  endfunction

  if (NTAPS < 1) begin : g_chk_n
    $error("poly_fir_serial: NTAPS must be at least 1");
  end

  logic signed [DW+CW-1:0] prod_full [NP];
  logic signed [DW-1:0]    prod      [NP];

  for (genvar u = 0; u < NP; u++) begin : g_mul
    localparam logic signed [CW-1:0] C = CW'(COEF[u]);
    assign prod_full[u] = (DW+CW)'(x_i) * (DW+CW)'(C);
    assign prod[u]      = DW'(prod_full[u] >>> QSHIFT);
  end

  if (NTAPS == 1) begin : g_one
    assign y_o = prod[0];
  end else begin : g_chain
    // Transposed chain: acc[t] is the register after tap t (t = 1..NTAPS-1),
    // nxt[t] the value it loads.
    logic signed [DW-1:0] acc [1:NTAPS-1];
    logic signed [DW-1:0] nxt [1:NTAPS-1];

    always_comb begin
      // The last tap has nothing to add to.
      nxt[NTAPS-1] = prod[pidx(NTAPS-1)];
      for (int t = 1; t < NTAPS - 1; t++) nxt[t] = prod[pidx(t)] + acc[t+1];
    end

    always_ff @(posedge clk or negedge rst_ni) begin
      if (!rst_ni) begin
        for (int t = 1; t < NTAPS; t++) acc[t] <= '0;
      end else begin
        for (int t = 1; t < NTAPS; t++) acc[t] <= nxt[t];
      end
    end

    assign y_o = prod[0] + acc[1];
  end

endmodule

// bspline_part -- the B-spline part (1+z^-1)^N or (1-z^-1)^N of one channel,
// built as N two-input two-output sections connected in series.
//
// Input and output are two-phase sample streams: odd_* carries the earlier and
// even_* the later sample of each pair, one pair per clock. Each section is a
// bspline_stage; bit j of SHIFT_MASK makes section j+1 halve its outputs, which
// is how the power-of-two denominator of the factorization (8 for the lowpass,
// 4 for the highpass channel of the (10,18) bank) is spread over the chain. The
// default positions (lowpass after sections 4, 6 and 8; highpass after 2 and
// 4) are this design's choice: they are the sections where the worst-case
// signal swing of the (10,18) bank roughly doubles, so the words stay within
// W bits for inputs below half scale.
//
// PIPE_AFTER = k (1..N) places a pipeline register on both wires after section
// k, which cuts the long adder path that runs through all sections; 0 means no
// cut. The cut adds one clock of latency to the chain.
//
// Timing: without a cut the outputs are combinational in the inputs; with a
// cut they belong to the input pair of the previous clock.
module bspline_part #(
  parameter int unsigned W          = 16,
  parameter int unsigned N          = 9,      // order of the B-spline part
  parameter bit          SUB        = 1'b0,   // 0: (1+z^-1)^N, 1: (1-z^-1)^N
  parameter int unsigned SHIFT_MASK = 32'h0A8, // bit j: section j+1 halves
  parameter int unsigned PIPE_AFTER = 0        // 0: no cut, k: cut after section k
) (
  input  logic                clk,
  input  logic                rst_ni,
  input  logic signed [W-1:0] odd_i,
  input  logic signed [W-1:0] even_i,
  output logic signed [W-1:0] odd_o,
  output logic signed [W-1:0] even_o
);

  if (N < 1 || N > 32) begin : g_chk_n
    $error("bspline_part: N must be 1..32");
  end
  if (PIPE_AFTER > N) begin : g_chk_pipe
    $error("bspline_part: PIPE_AFTER must not exceed N");
  end

  // Section inputs (index j feeds section j+1) and section outputs.
  logic signed [W-1:0] odd_in  [N+1];
  logic signed [W-1:0] even_in [N+1];
  logic signed [W-1:0] odd_out [N];
  logic signed [W-1:0] even_out[N];
  logic signed [W-1:0] odd_pq, even_pq;   // pipeline registers (if any)

  assign odd_in[0]  = odd_i;
  assign even_in[0] = even_i;

  for (genvar j = 0; j < N; j++) begin : g_sec
    bspline_stage #(
      .W  (W),
      .SUB(SUB),
      .SHR(SHIFT_MASK[j])
    ) u_stage (
      .clk   (clk),
      .rst_ni(rst_ni),
      .odd_i (odd_in[j]),
      .even_i(even_in[j]),
      .odd_o (odd_out[j]),
      .even_o(even_out[j])
    );

    assign odd_in[j+1]  = (PIPE_AFTER == j + 1) ? odd_pq  : odd_out[j];
    assign even_in[j+1] = (PIPE_AFTER == j + 1) ? even_pq : even_out[j];
  end

  // The pipeline cut: one register on each of the two wires.
  if (PIPE_AFTER > 0) begin : g_pipe
    always_ff @(posedge clk or negedge rst_ni) begin
      if (!rst_ni) begin
        odd_pq  <= '0;
        even_pq <= '0;
      end else begin
        odd_pq  <= odd_out[PIPE_AFTER-1];
        even_pq <= even_out[PIPE_AFTER-1];
      end
    end
  end else begin : g_nopipe
    assign odd_pq  = '0;
    assign even_pq = '0;
  end

  assign odd_o  = odd_in[N];
  assign even_o = even_in[N];

endmodule

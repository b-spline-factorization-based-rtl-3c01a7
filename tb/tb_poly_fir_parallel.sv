// tb_poly_fir_parallel -- checks the direct-form filter pair with a shared
// delay line for both channels of the (10,18) bank: Qe/Qo (5 and 4 taps) and
// Re/Ro (3 and 2 taps after retiming). Reference: direct convolution with the
// mirrored samples added (and wrapped) before the single product per pair.
// A third pair has non-symmetric sets of 2 and 3 taps (no pre-adders).
// Random full-range inputs, so the pre-adders wrap as well. Outputs are
// combinational, so output k is checked in the clock input k is applied.
module tb_poly_fir_parallel;
  import idwt_tb_pkg::*;

  localparam int DW = 16, CW = 16, SH = 14;
  localparam int NSAMP = 400;
  localparam int C1 = quant(V[1], SH), C2 = quant(V[2], SH), C3 = quant(V[3], SH),
                 C4 = quant(V[4], SH), C5 = quant(V[5], SH), C6 = quant(V[6], SH),
                 C7 = quant(V[7], SH), C8 = quant(V[8], SH);
  localparam int QE [5] = '{C1, C3, C5, C3, C1};
  localparam int QO [4] = '{C2, C4, C4, C2};
  localparam int RE [3] = '{C6, C8, C6};
  localparam int RO [2] = '{C7, C7};
  localparam int NE_ [2] = '{-3000, 5000};
  localparam int NO_ [3] = '{900, -7000, 3000};

  logic clk = 1'b0, rst_ni = 1'b0;
  logic signed [DW-1:0] x_i;
  logic signed [DW-1:0] y_o [6];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  poly_fir_parallel #(.DW(DW), .CW(CW), .QSHIFT(SH), .NE(5), .NO(4), .COEF_E(QE), .COEF_O(QO)) u_q (
    .clk(clk), .rst_ni(rst_ni), .x_i(x_i), .ye_o(y_o[0]), .yo_o(y_o[1]));
  poly_fir_parallel #(.DW(DW), .CW(CW), .QSHIFT(SH), .NE(3), .NO(2), .COEF_E(RE), .COEF_O(RO)) u_r (
    .clk(clk), .rst_ni(rst_ni), .x_i(x_i), .ye_o(y_o[2]), .yo_o(y_o[3]));
  poly_fir_parallel #(.DW(DW), .CW(CW), .QSHIFT(SH), .NE(2), .NO(3), .COEF_E(NE_), .COEF_O(NO_)) u_n (
    .clk(clk), .rst_ni(rst_ni), .x_i(x_i), .ye_o(y_o[4]), .yo_o(y_o[5]));

  initial begin : watchdog
    repeat (NSAMP + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seq_t x;
    seq_t y [6];
    int c [6][];
    c[0] = new[5]; foreach (QE[t]) c[0][t] = QE[t];
    c[1] = new[4]; foreach (QO[t]) c[1][t] = QO[t];
    c[2] = new[3]; foreach (RE[t]) c[2][t] = RE[t];
    c[3] = new[2]; foreach (RO[t]) c[3][t] = RO[t];
    c[4] = new[2]; foreach (NE_[t]) c[4][t] = NE_[t];
    c[5] = new[3]; foreach (NO_[t]) c[5][t] = NO_[t];
    x_i = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_ni = 1'b1;
    for (int k = 0; k < NSAMP; k++) begin
      @(negedge clk);
      x_i = (k < 100) ? DW'($signed($urandom_range(0, 4000)) - 2000) : DW'($urandom);
      x.push_back(longint'(x_i));
      #1;
      for (int f = 0; f < 6; f++) begin
        y[f] = fir_parallel(x, c[f], SH, DW);
        checks++;
        if (y_o[f] !== DW'(y[f][k])) begin
          failures++;
          if (failures < 10) $display("filter %0d sample %0d: got %0d expected %0d", f, k, y_o[f], y[f][k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Partial-product generator of the 4 x 4 reversible multiplier.
//
// A 4 x 4 grid of Toffoli gates, each with its target input tied to 0, so
// gate (i, j) outputs R = x[i].y[j]. Reversible logic has no fan-out, so
// x[i] travels along row i through the gates' P outputs and y[j] travels
// down column j through their Q outputs. The P and Q outputs of the last
// gate of each row and column are garbage and are brought out as x_pass and
// y_pass (they equal x and y). 16 gates, 16 constant inputs.
// The 16-Toffoli grid with 0 targets is the published arrangement; which
// output carries an operand to which neighbour is this design's choice.
// pp[4*i + j] = x[i].y[j]. Combinational, all 16 products in parallel.
module toffoli_ppg
  import rev_pkg::*;
(
  input  mul_operand_t           x,
  input  mul_operand_t           y,
  output logic [MUL_W*MUL_W-1:0] pp,
  output mul_operand_t           x_pass,
  output mul_operand_t           y_pass
);

  // xr[i][j]: x[i] entering gate (i, j); yc[i][j]: y[j] entering gate (i, j)
  logic [MUL_W-1:0][MUL_W:0] xr;
  logic [MUL_W:0][MUL_W-1:0] yc;

  for (genvar i = 0; i < MUL_W; i++) begin : g_row
    assign xr[i][0] = x[i];
    assign x_pass[i] = xr[i][MUL_W];
  end
  assign yc[0] = y;
  assign y_pass = yc[MUL_W];

  for (genvar i = 0; i < MUL_W; i++) begin : g_i
    for (genvar j = 0; j < MUL_W; j++) begin : g_j
      toffoli_gate u_tg (
        .a(xr[i][j]), .b(yc[i][j]), .c(1'b0),
        .p(xr[i][j+1]), .q(yc[i+1][j]), .r(pp[MUL_W*i + j])
      );
    end
  end

endmodule

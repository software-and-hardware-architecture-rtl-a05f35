// ICT_1D: one pass of the separable 4x4 inverse transform. Four IICT_x
// butterflies work in parallel, unit k on row k of the input matrix, and
// unit k's results are written to column k of the output: the pass transposes
// its result. Two passes in a row therefore give rows-then-columns with the
// block back in its original orientation. The result is registered when 'en'
// is high (one cycle per pass). Matrices are flat arrays in raster order,
// element (r,c) at index 4*r + c. Four parallel units with the transposed
// write-out follow the published architecture; the single capture enable in
// place of start/done is this design's.
module ict_1d #(
  parameter int unsigned IW = 23,
  parameter int unsigned OW = IW + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [IW-1:0] x [16],
  output logic signed [OW-1:0] y [16]
);
  logic signed [OW-1:0] v [4][4];

  for (genvar k = 0; k < 4; k++) begin : g_iict
    logic signed [IW-1:0] row [4];
    assign row = '{x[4*k], x[4*k+1], x[4*k+2], x[4*k+3]};
    iict_x #(.IW(IW), .OW(OW)) u_iict (.x(row), .v(v[k]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) y[i] <= '0;
    end else if (en) begin
      for (int k = 0; k < 4; k++)
        for (int j = 0; j < 4; j++)
          y[4*j + k] <= v[k][j];   // row k in -> column k out
    end
  end
endmodule

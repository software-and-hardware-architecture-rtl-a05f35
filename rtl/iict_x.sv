// IICT_x: one-dimensional 4-point H.264 inverse integer transform of one row
// (or column), built only from adders, subtractors and arithmetic right shifts
// by one bit (the 1/2 coefficients):
//   e0 = X0 + X2        e1 = X0 - X2
//   e2 = (X1>>>1) - X3  e3 = X1 + (X3>>>1)
//   V0 = e0 + e3   V1 = e1 + e2   V2 = e1 - e2   V3 = e0 - e3
// Purely combinational; the output is two bits wider than the input so that
// no sum can overflow. The butterfly is the standard's; its use as the
// building block of the transform follows the published architecture.
module iict_x #(
  parameter int unsigned IW = 23,
  parameter int unsigned OW = IW + 2
) (
  input  logic signed [IW-1:0] x [4],
  output logic signed [OW-1:0] v [4]
);
  logic signed [OW-1:0] x0, x1, x2, x3, e0, e1, e2, e3;

  always_comb begin
    x0 = OW'(x[0]); x1 = OW'(x[1]); x2 = OW'(x[2]); x3 = OW'(x[3]);
    e0 = x0 + x2;
    e1 = x0 - x2;
    e2 = (x1 >>> 1) - x3;
    e3 = x1 + (x3 >>> 1);
    v[0] = e0 + e3;
    v[1] = e1 + e2;
    v[2] = e1 - e2;
    v[3] = e0 - e3;
  end
endmodule

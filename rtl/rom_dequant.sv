// ROM dequant: look-up table that turns the quantization parameter QP into
// QE = floor(QP/6), the left-shift count of the inverse quantizer, and into
// QP mod 6, which selects the row of the rescaling table V. A table replaces
// the division by 6. The table is combinational (purely a function of qp);
// QP values above 51, which the standard does not allow, read as QP = 51.
// The table replacing a divider is the published architecture's; the extra
// QP mod 6 output is this design's, needed to address the V table.
module rom_dequant (
  input  logic [5:0] qp,
  output logic [3:0] qe,
  output logic [2:0] qrem
);
  // 52-entry table built at elaboration: entry q holds {q/6, q%6}.
  logic [6:0] rom [52];

  always_comb begin
    for (int q = 0; q < 52; q++) rom[q] = {4'(q / 6), 3'(q % 6)};
  end

  logic [5:0] qs;
  assign qs = (qp > 6'd51) ? 6'd51 : qp;
  assign {qe, qrem} = rom[qs];
endmodule

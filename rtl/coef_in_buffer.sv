// Input buffer: holds the 16 quantized coefficients of one 4x4 block. The
// bus side writes two 16-bit coefficients per 32-bit word: word n carries
// coefficient 2n in bits 15:0 and coefficient 2n+1 in bits 31:16, raster
// order inside the block. All 16 coefficients are visible at once to the
// inverse quantizer, which samples them when it starts. Reset clears it.
// A 16-coefficient buffer fed two coefficients per transfer is the published
// scheme; the order of the two halves is this design's.
module coef_in_buffer
  import h264_intra_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic [2:0]  wr_addr,
  input  logic [31:0] wr_data,
  output coef_t       coef [16]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) coef[i] <= '0;
    end else if (wr_en) begin
      coef[{wr_addr, 1'b0}] <= coef_t'(wr_data[15:0]);
      coef[{wr_addr, 1'b1}] <= coef_t'(wr_data[31:16]);
    end
  end
endmodule

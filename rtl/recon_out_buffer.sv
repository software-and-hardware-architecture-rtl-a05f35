// Output buffer: holds the 16 reconstructed pixels of the last 4x4 block.
// It is loaded in one cycle when the addition finishes and read by the bus
// one row per 32-bit word: row r in word r, pixel x of the row in bits
// 8x+7:8x. The read is combinational, and while ld is high it returns the
// block being loaded (a bypass), so the bus can take a row in the very cycle
// the addition finishes. Reset clears it. A 16-pixel output buffer is the
// published scheme; the row packing and the bypass are this design's.
module recon_out_buffer
  import h264_intra_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ld,
  input  pix_t        pix_in [16],
  input  logic [1:0]  rd_addr,
  output logic [31:0] rd_data
);
  pix_t buf_q [16];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  for (int i = 0; i < 16; i++) buf_q[i] <= '0;
    else if (ld) buf_q <= pix_in;
  end

  pix_t src [16];
  assign src = ld ? pix_in : buf_q;
  assign rd_data = {src[{rd_addr, 2'd3}], src[{rd_addr, 2'd2}],
                    src[{rd_addr, 2'd1}], src[{rd_addr, 2'd0}]};
endmodule

// H.264/AVC intra 4x4 reconstruction accelerator: the coprocessor a software
// decoder running on a 32-bit soft processor hands its 4x4 intra-coded luma
// blocks to. For each block the processor writes the quantized coefficients
// (and, once per macroblock, the 16 prediction modes, QP and the macroblock
// position) over an Avalon memory-mapped slave port and reads back the
// reconstructed pixels. Inside, the chain dequantizes, inverse-transforms,
// predicts from the neighbouring reconstructed pixels it keeps itself, and
// adds, in 10 cycles per block.
// See avalon_ctrl for the register map and the waitrequest handshake and
// intra4x4_chain for the schedule. The chain's done pulse is not brought
// out: the processor sees completion as the busy bit of the status word
// falling, or simply by a read of the output rows, which waits for it.
// FRAME_W is the luma frame width in pixels
// (352, CIF); the neighbour line buffer holds one row of it.
// The processor, bus fabric and other peripherals of the published system
// are outside this RTL; the slave port is where the bus fabric attaches.
module h264_intra_accel #(
  parameter int unsigned FRAME_W = 352
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  avs_address,
  input  logic        avs_chipselect,
  input  logic        avs_read,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  output logic [31:0] avs_readdata,
  output logic        avs_waitrequest
);
  logic        start, cw_en, busy;
  logic [3:0]  blk_idx, pred_mode;
  logic [5:0]  qp;
  logic [7:0]  mbx, mby;
  logic [2:0]  cw_addr;
  logic [31:0] cw_data, or_data;
  logic [1:0]  or_addr;

  avalon_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n),
    .avs_address(avs_address), .avs_chipselect(avs_chipselect), .avs_read(avs_read),
    .avs_write(avs_write), .avs_writedata(avs_writedata), .avs_readdata(avs_readdata),
    .avs_waitrequest(avs_waitrequest),
    .chain_start(start), .chain_blk_idx(blk_idx), .chain_pred_mode(pred_mode), .chain_qp(qp),
    .chain_mbx(mbx), .chain_mby(mby), .chain_cw_en(cw_en), .chain_cw_addr(cw_addr),
    .chain_cw_data(cw_data), .chain_or_addr(or_addr), .chain_or_data(or_data),
    .chain_busy(busy));

  intra4x4_chain #(.FRAME_W(FRAME_W)) u_chain (
    .clk(clk), .rst_n(rst_n), .start(start), .blk_idx(blk_idx), .pred_mode(pred_mode),
    .qp(qp), .mbx(mbx), .mby(mby), .cw_en(cw_en), .cw_addr(cw_addr), .cw_data(cw_data),
    .or_addr(or_addr), .or_data(or_data), .busy(busy), .done());
endmodule

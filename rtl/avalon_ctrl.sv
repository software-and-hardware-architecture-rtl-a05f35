// Bus controller of the intra 4x4 coprocessor: an Avalon memory-mapped slave
// (32-bit data, word addresses) between the processor bus and the chain.
//
// Register map (word address):
//   0..3   prediction modes: byte k of word w is the mode of block 4w+k
//          (z-scan block index), low 4 bits used
//   4      {8'h0, QP[7:0], MBY[7:0], MBX[7:0]}; writing it also restarts the
//          block counter at block 0 of the macroblock
//   5..12  coefficient pairs of the next 4x4 block: word 5+n holds
//          coefficient 2n in bits 15:0 and 2n+1 in bits 31:16 (raster order);
//          writing word 12 starts the block and advances the block counter
//   16..19 reconstructed row 0..3 of the last block, pixel x in bits 8x+7:8x
//   20     status {27'b0, busy, block counter[3:0]}
// So a macroblock costs 5 parameter writes, then per block 8 coefficient
// writes and 4 reads.
//
// Handshake: waitrequest is raised (the transfer is held) for a write of
// word 12 and for a read of words 16..19 while a block is pending or being
// processed; everything else completes in the cycle it is presented, reads
// included (no read latency). The start pulse to the chain follows the
// accepted write of word 12 by one cycle, so that the last coefficient pair
// is in the input buffer when the chain samples it.
// The packing (four byte-wide parameters or two coefficients per word) and
// the signal set follow the published system; the register map and the
// waitrequest policy are this design's.
module avalon_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  // Avalon-MM slave
  input  logic [4:0]  avs_address,
  input  logic        avs_chipselect,
  input  logic        avs_read,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  output logic [31:0] avs_readdata,
  output logic        avs_waitrequest,
  // to the chain
  output logic        chain_start,
  output logic [3:0]  chain_blk_idx,
  output logic [3:0]  chain_pred_mode,
  output logic [5:0]  chain_qp,
  output logic [7:0]  chain_mbx,
  output logic [7:0]  chain_mby,
  output logic        chain_cw_en,
  output logic [2:0]  chain_cw_addr,
  output logic [31:0] chain_cw_data,
  output logic [1:0]  chain_or_addr,
  input  logic [31:0] chain_or_data,
  input  logic        chain_busy
);
  localparam logic [4:0] A_PARAM  = 5'd4;
  localparam logic [4:0] A_COEF0  = 5'd5;
  localparam logic [4:0] A_COEF7  = 5'd12;
  localparam logic [4:0] A_OUT0   = 5'd16;
  localparam logic [4:0] A_OUT3   = 5'd19;
  localparam logic [4:0] A_STATUS = 5'd20;

  logic [31:0] mode_w [4];
  logic [7:0]  qp_q, mbx_q, mby_q;
  logic [3:0]  blk_cnt, blk_run;
  logic        start_q;

  logic wr, rd, pending, stall;
  assign wr      = avs_chipselect && avs_write;
  assign rd      = avs_chipselect && avs_read;
  assign pending = start_q || chain_busy;
  assign stall   = pending && ((wr && avs_address == A_COEF7) ||
                               (rd && avs_address >= A_OUT0 && avs_address <= A_OUT3));
  assign avs_waitrequest = stall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) mode_w[i] <= '0;
      qp_q <= '0; mbx_q <= '0; mby_q <= '0;
      blk_cnt <= '0; blk_run <= '0; start_q <= 1'b0;
    end else begin
      start_q <= 1'b0;
      if (wr && !stall) begin
        if (avs_address < A_PARAM)
          mode_w[avs_address[1:0]] <= avs_writedata;
        if (avs_address == A_PARAM) begin
          {qp_q, mby_q, mbx_q} <= avs_writedata[23:0];
          blk_cnt <= '0;
        end
        if (avs_address == A_COEF7) begin
          start_q <= 1'b1;
          blk_run <= blk_cnt;
          blk_cnt <= blk_cnt + 4'd1;
        end
      end
    end
  end

  // coefficient words go straight to the chain's input buffer
  assign chain_cw_en   = wr && !stall && avs_address >= A_COEF0 && avs_address <= A_COEF7;
  assign chain_cw_addr = 3'(avs_address - A_COEF0);
  assign chain_cw_data = avs_writedata;

  assign chain_start     = start_q;
  assign chain_blk_idx   = blk_run;
  assign chain_pred_mode = mode_w[blk_run[3:2]][8*blk_run[1:0] +: 4];
  assign chain_qp        = (qp_q > 8'd51) ? 6'd51 : qp_q[5:0];
  assign chain_mbx       = mbx_q;
  assign chain_mby       = mby_q;
  assign chain_or_addr   = avs_address[1:0];

  always_comb begin
    avs_readdata = '0;
    if (avs_address < A_PARAM)                              avs_readdata = mode_w[avs_address[1:0]];
    else if (avs_address == A_PARAM)                        avs_readdata = {8'h0, qp_q, mby_q, mbx_q};
    else if (avs_address >= A_OUT0 && avs_address <= A_OUT3) avs_readdata = chain_or_data;
    else if (avs_address == A_STATUS)                       avs_readdata = {27'h0, pending, blk_cnt};
  end

  // Avalon rule: a transfer held by waitrequest keeps its address and data
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
      (avs_chipselect && (avs_read || avs_write) && avs_waitrequest) |=>
      (avs_chipselect && $stable(avs_address) && $stable(avs_read) && $stable(avs_write)))
    else $error("avalon_ctrl: master changed a transfer held by waitrequest");
endmodule

// Full-frame test of the accelerator through its bus port, with the top at
// its default size (CIF, 352x288 luma): the testbench plays the processor and
// decodes one whole intra frame of 22x18 macroblocks, every macroblock
// 4x4-intra coded, then the first macroblock row of a second frame. Per
// macroblock it writes the 16 modes and {QP, MBY, MBX} in 5 words; per block
// it writes 8 coefficient words (the last starts the block) and reads the 4
// pixel rows back, which stalls on waitrequest until the block is done.
// Expected pixels come from the reference model and a picture model of what
// has been reconstructed. Modes are random among those legal for the block's
// neighbours, QP and coefficients random.
// Counted and required at least once: each of the nine modes, the four DC
// availability cases, above-right replaced by D, waitrequest stalls, clipping
// at 0 and at 255 in the addition, the 10-cycle block latency seen on the bus.
module tb_h264_intra_accel;
  import h264_ref_pkg::*;
  localparam int W = 352, H = 288;
  logic clk = 0, rst_n = 0;
  logic [4:0] avs_address;
  logic avs_chipselect = 0, avs_read = 0, avs_write = 0;
  logic [31:0] avs_writedata, avs_readdata;
  logic avs_waitrequest;
  int checks = 0, failures = 0, stalls = 0;
  int frame [H][W];
  bit decoded [H/4][W/4];
  int n_mode [9], n_dc [4], n_trsub = 0, n_clip_lo = 0, n_clip_hi = 0, n_blocks = 0;
  int cyc = 0, lat_min = 1 << 30;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  h264_intra_accel dut (.clk, .rst_n, .avs_address, .avs_chipselect, .avs_read, .avs_write,
    .avs_writedata, .avs_readdata, .avs_waitrequest);

  function automatic bit av(input int x, input int y);
    if (x < 0 || y < 0 || x >= W || y >= H) return 0;
    return decoded[y/4][x/4];
  endfunction

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  task automatic bus(input bit wr, input int addr, input logic [31:0] data, output logic [31:0] rdata);
    @(negedge clk);
    avs_chipselect = 1; avs_write = wr; avs_read = !wr;
    avs_address = 5'(addr); avs_writedata = data;
    #1;
    while (avs_waitrequest) begin stalls++; @(negedge clk); #1; end
    rdata = avs_readdata;
    @(posedge clk);
    #1;
    avs_chipselect = 0; avs_write = 0; avs_read = 0;
  endtask

  task automatic do_mb(input int mx, input int my);
    int nbs [16][13], modes [16], q;
    logic [31:0] rd, w;
    q = $urandom_range(0, 51);
    // modes are chosen block by block as availability becomes known
    for (int b = 0; b < 16; b++) modes[b] = -1;
    // availability inside the macroblock depends only on position, so the
    // modes can be chosen up front
    for (int b = 0; b < 16; b++) begin
      int x0, y0;
      bit at, al, atl;
      x0 = mx*16 + 4*({b[2], b[0]});
      y0 = my*16 + 4*({b[3], b[1]});
      at  = (y0 > 0);
      al  = (x0 > 0);
      atl = at && al;
      modes[b] = pick_mode(at, al, atl);
    end
    for (int wd = 0; wd < 4; wd++) begin
      w = {4'h0, 4'(modes[4*wd+3]), 4'h0, 4'(modes[4*wd+2]), 4'h0, 4'(modes[4*wd+1]), 4'h0, 4'(modes[4*wd])};
      bus(1, wd, w, rd);
    end
    bus(1, 4, {8'h0, 8'(q), 8'(my), 8'(mx)}, rd);
    for (int b = 0; b < 16; b++) begin
      int x0, y0, nb [13], t_start;
      bit at, al;
      blk_t z, e, p, r;
      x0 = mx*16 + 4*({b[2], b[0]});
      y0 = my*16 + 4*({b[3], b[1]});
      for (int i = 0; i < 4; i++) begin
        nb[i]   = av(x0 + i, y0 - 1) ? frame[y0-1][x0+i] : 128;
        nb[4+i] = av(x0 + 4 + i, y0 - 1) ? frame[y0-1][x0+4+i]
                : (av(x0 + 3, y0 - 1) ? frame[y0-1][x0+3] : 128);
        nb[8+i] = av(x0 - 1, y0 + i) ? frame[y0+i][x0-1] : 128;
      end
      nb[12] = av(x0 - 1, y0 - 1) ? frame[y0-1][x0-1] : 128;
      at = av(x0, y0 - 1); al = av(x0 - 1, y0);
      if (at && !av(x0 + 4, y0 - 1) && (modes[b] == 3 || modes[b] == 7)) n_trsub++;
      for (int i = 0; i < 16; i++)
        z[i] = ($urandom_range(0, 2) == 0) ? 0 : int'($urandom_range(0, 2 * (40 - q/2))) - (40 - q/2);
      e = ref_recon(z, q, modes[b], nb, at, al);
      p = ref_pred(modes[b], nb, at, al);
      r = ref_itrans(ref_dequant(z, q), 1'b0);
      for (int i = 0; i < 16; i++) begin
        if (p[i] + r[i] < 0)   n_clip_lo++;
        if (p[i] + r[i] > 255) n_clip_hi++;
      end
      n_mode[modes[b]]++;
      if (modes[b] == 2) n_dc[{at, al}]++;
      for (int rr = 0; rr < 4; rr++) for (int c = 0; c < 4; c++) frame[y0+rr][x0+c] = e[4*rr+c];
      decoded[y0/4][x0/4] = 1;
      for (int n = 0; n < 8; n++) bus(1, 5 + n, {16'(z[2*n+1]), 16'(z[2*n])}, rd);
      t_start = cyc;       // the start pulse is issued in the cycle after this edge
      for (int rr = 0; rr < 4; rr++) begin
        bus(0, 16 + rr, '0, rd);
        if (rr == 0 && cyc - t_start < lat_min) lat_min = cyc - t_start;
        for (int c = 0; c < 4; c++)
          chk(int'(rd[8*c +: 8]), e[4*rr + c], $sformatf("mb(%0d,%0d) blk %0d pixel %0d,%0d", mx, my, b, rr, c));
      end
      n_blocks++;
    end
  endtask

  initial begin
    avs_address = '0; avs_writedata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int y = 0; y < H/4; y++) for (int x = 0; x < W/4; x++) decoded[y][x] = 0;
      for (int my = 0; my < (f == 0 ? H/16 : 1); my++)
        for (int mx = 0; mx < W/16; mx++) do_mb(mx, my);
      $display("frame %0d done at cycle %0d, %0d blocks", f, cyc, n_blocks);
    end
    for (int m = 0; m < 9; m++) chk(int'(n_mode[m] > 0), 1, $sformatf("mode %0d used", m));
    for (int d = 0; d < 4; d++) chk(int'(n_dc[d] > 0), 1, $sformatf("DC availability case %0d", d));
    chk(int'(n_trsub > 0), 1, "above-right replaced by D");
    chk(int'(stalls > 0), 1, "waitrequest stall");
    chk(int'(n_clip_lo > 0), 1, "clip at 0");
    chk(int'(n_clip_hi > 0), 1, "clip at 255");
    // the start pulse is sampled one edge after the last coefficient write,
    // the chain's done comes 10 cycles later and the first row is accepted in
    // that done cycle (output buffer bypass): 1 + 10 edges
    chk(lat_min, 11, "write-to-first-read cycles (1 + 10)");
    $display("modes:"); for (int m = 0; m < 9; m++) $display("  %0d: %0d", m, n_mode[m]);
    $display("DC cases (none,left,top,both): %0d %0d %0d %0d", n_dc[0], n_dc[1], n_dc[2], n_dc[3]);
    $display("above-right substitutions %0d, stall cycles %0d, clips %0d/%0d", n_trsub, stalls, n_clip_lo, n_clip_hi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Workload test: one CIF (352x288) frame, every macroblock 4x4-intra coded,
// QP fixed at 30 (the operating point of the Foreman and Akiyo CIF
// sequences). The picture content is synthetic: a smooth ramp in the first
// blocks, then random legal modes with small random residuals, since the real
// bitstreams are not available.
// The processor side uses the overlapped flow the input buffer allows: while
// block n is in flight, it already writes the first 7 coefficient words of
// block n+1, then reads block n's rows, then writes block n+1's last word,
// which starts it. Checks every pixel against the reference model and
// reports the cycles per block and per frame, and the frame time and frame
// rate at the 317.76 MHz clock reported for the accelerator on an FPGA. It
// requires the CIF frame to fit in 1/30 s at that clock, and each block's
// write-to-read latency to stay 11 cycles.
module tb_workload_cif_qp30;
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
  int n_mode [9], n_blocks = 0, n_overlap = 0;
  int cyc = 0;
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

  // block list of one macroblock with everything the bus needs
  typedef struct {
    blk_t z;
    blk_t e;
  } blkjob_t;

  task automatic do_mb(input int mx, input int my);
    int modes [16], q;
    logic [31:0] rd, w;
    blkjob_t jobs [16];
    q = 30;
    for (int b = 0; b < 16; b++) begin
      int x0, y0;
      x0 = mx*16 + 4*({b[2], b[0]});
      y0 = my*16 + 4*({b[3], b[1]});
      modes[b] = pick_mode(y0 > 0, x0 > 0, (y0 > 0) && (x0 > 0));
    end
    // reference results, block by block in decoding order
    for (int b = 0; b < 16; b++) begin
      int x0, y0, nb [13];
      bit at, al;
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
      for (int i = 0; i < 16; i++) jobs[b].z[i] = 0;
      if (mx == 0 && my == 0) jobs[b].z[0] = 2 * b;   // a ramp of DC levels
      else
        for (int i = 0; i < 16; i++)
          jobs[b].z[i] = ($urandom_range(0, 3) != 0) ? 0 : int'($urandom_range(0, 6)) - 3;
      jobs[b].e = ref_recon(jobs[b].z, q, modes[b], nb, at, al);
      n_mode[modes[b]]++;
      for (int rr = 0; rr < 4; rr++) for (int c = 0; c < 4; c++) frame[y0+rr][x0+c] = jobs[b].e[4*rr+c];
      decoded[y0/4][x0/4] = 1;
    end
    for (int wd = 0; wd < 4; wd++) begin
      w = {4'h0, 4'(modes[4*wd+3]), 4'h0, 4'(modes[4*wd+2]), 4'h0, 4'(modes[4*wd+1]), 4'h0, 4'(modes[4*wd])};
      bus(1, wd, w, rd);
    end
    bus(1, 4, {8'h0, 8'(q), 8'(my), 8'(mx)}, rd);
    // block 0: 7 words, then the starting word
    for (int n = 0; n < 7; n++) bus(1, 5 + n, {16'(jobs[0].z[2*n+1]), 16'(jobs[0].z[2*n])}, rd);
    for (int b = 0; b < 16; b++) begin
      int t_start;
      bus(1, 12, {16'(jobs[b].z[15]), 16'(jobs[b].z[14])}, rd);
      t_start = cyc;
      // overlap: the next block's first 7 words while this one runs
      if (b < 15) begin
        for (int n = 0; n < 7; n++) bus(1, 5 + n, {16'(jobs[b+1].z[2*n+1]), 16'(jobs[b+1].z[2*n])}, rd);
        n_overlap++;
      end
      for (int rr = 0; rr < 4; rr++) begin
        bus(0, 16 + rr, '0, rd);
        if (rr == 0) chk(int'(cyc - t_start >= 11), 1, "row 0 not before the block is done");
        for (int c = 0; c < 4; c++)
          chk(int'(rd[8*c +: 8]), jobs[b].e[4*rr + c], $sformatf("mb(%0d,%0d) blk %0d pixel %0d,%0d", mx, my, b, rr, c));
      end
      n_blocks++;
    end
  endtask

  initial begin
    int c0, c1;
    real t_ms;
    avs_address = '0; avs_writedata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int y = 0; y < H/4; y++) for (int x = 0; x < W/4; x++) decoded[y][x] = 0;
    c0 = cyc;
    for (int my = 0; my < H/16; my++)
      for (int mx = 0; mx < W/16; mx++) do_mb(mx, my);
    c1 = cyc;
    t_ms = real'(c1 - c0) / 317.76e3;
    $display("CIF frame at QP 30: %0d blocks in %0d cycles, %0.2f cycles per block", n_blocks, c1 - c0, real'(c1 - c0) / n_blocks);
    $display("  %0.3f ms per frame at 317.76 MHz, %0.0f frames/s", t_ms, 1000.0 / t_ms);
    $display("  stall cycles %0d, overlapped blocks %0d", stalls, n_overlap);
    chk(n_blocks, 6336, "blocks in a CIF frame");
    chk(int'(t_ms < 1000.0 / 30.0), 1, "real time at 30 frames/s");
    chk(int'(n_overlap > 0), 1, "coefficients written while a block is in flight");
    chk(int'(stalls > 0), 1, "waitrequest stall");
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

// Bus-level test of the coprocessor's Avalon slave controller against a
// small chain model in the testbench (busy for a random 5..12 cycles after
// each start, output rows that encode their address). Checks the register
// map (mode and parameter words, readback, status), that coefficient words
// reach the input-buffer port unchanged, that the start pulse follows the
// write of the last coefficient word with the right block index, mode, QP and
// position, that the block counter restarts on a parameter write, and that
// waitrequest holds a start write and an output read while a block is busy.
module tb_avalon_ctrl;
  logic clk = 0, rst_n = 0;
  logic [4:0] avs_address;
  logic avs_chipselect = 0, avs_read = 0, avs_write = 0;
  logic [31:0] avs_writedata, avs_readdata;
  logic avs_waitrequest;
  logic chain_start, chain_cw_en, chain_busy;
  logic [3:0] chain_blk_idx, chain_pred_mode;
  logic [5:0] chain_qp;
  logic [7:0] chain_mbx, chain_mby;
  logic [2:0] chain_cw_addr;
  logic [31:0] chain_cw_data, chain_or_data;
  logic [1:0] chain_or_addr;
  int checks = 0, failures = 0, stalls = 0, starts = 0;
  int busy_left = 0;
  always #5 clk = ~clk;

  avalon_ctrl dut (.*);

  // chain model
  assign chain_busy    = busy_left > 0;
  assign chain_or_data = {4{6'h2A, chain_or_addr}};
  always @(posedge clk) begin
    if (chain_start) busy_left <= $urandom_range(5, 12);
    else if (busy_left > 0) busy_left <= busy_left - 1;
  end

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0h exp=%0h", what, got, exp);
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

  // expected values captured by the start monitor
  int exp_blk, exp_mode, exp_qp, exp_mbx, exp_mby;
  bit expect_start = 0;
  int cw_seen [8];
  logic [31:0] cw_val [8];
  always @(posedge clk) begin
    if (chain_cw_en) begin
      cw_seen[chain_cw_addr]++;
      cw_val[chain_cw_addr] <= chain_cw_data;
    end
    if (chain_start) begin
      starts++;
      chk(int'(expect_start), 1, "start only after word 12");
      chk(int'(chain_blk_idx), exp_blk, "blk_idx");
      chk(int'(chain_pred_mode), exp_mode, "pred_mode");
      chk(int'(chain_qp), exp_qp, "qp");
      chk(int'(chain_mbx), exp_mbx, "mbx");
      chk(int'(chain_mby), exp_mby, "mby");
      expect_start = 0;
    end
  end

  initial begin
    logic [31:0] rd;
    logic [31:0] modes [4];
    avs_address = '0; avs_writedata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int mb = 0; mb < 6; mb++) begin
      int q, x, y;
      q = $urandom_range(0, 51); x = $urandom_range(0, 21); y = $urandom_range(0, 17);
      for (int w = 0; w < 4; w++) begin
        modes[w] = $urandom & 32'h0707_0707;
        bus(1, w, modes[w], rd);
      end
      bus(1, 4, {8'h0, 8'(q), 8'(y), 8'(x)}, rd);
      for (int w = 0; w < 4; w++) begin bus(0, w, '0, rd); chk(rd, modes[w], "mode readback"); end
      bus(0, 4, '0, rd); chk(rd, {8'h0, 8'(q), 8'(y), 8'(x)}, "param readback");
      for (int b = 0; b < (mb == 0 ? 16 : 5); b++) begin
        logic [31:0] d [8];
        for (int n = 0; n < 8; n++) begin
          d[n] = $urandom;
          if (n == 7) begin
            exp_blk = b; exp_mode = modes[b/4][8*(b%4) +: 4]; exp_qp = q; exp_mbx = x; exp_mby = y;
            expect_start = 1;
          end
          bus(1, 5 + n, d[n], rd);
        end
        @(posedge clk);
        #1;
        for (int n = 0; n < 8; n++) chk(int'(cw_val[n] == d[n]), 1, "coefficient word");
        chk(starts, (mb == 0) ? b + 1 : 16 + 5 * (mb - 1) + b + 1, "start count");
        for (int r = 0; r < 4; r++) begin
          bus(0, 16 + r, '0, rd);
          chk(int'(chain_busy), 0, "output read waits for the block");
          chk(rd, {4{6'h2A, 2'(r)}}, "output row");
        end
        bus(0, 20, '0, rd);
        chk(int'(rd), (b + 1) % 16, "status block counter");
      end
    end
    chk(int'(stalls > 0), 1, "waitrequest exercised");
    $display("stall cycles: %0d, starts: %0d", stalls, starts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

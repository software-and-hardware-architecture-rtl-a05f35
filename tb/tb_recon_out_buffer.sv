// Loads random 4x4 pixel blocks into the output buffer and reads them back
// row by row; a block must stay put while ld is low, and while ld is high
// the read must already return the block being loaded.
module tb_recon_out_buffer;
  import h264_intra_pkg::*;
  logic clk = 0, rst_n = 0, ld = 0;
  pix_t pix_in [16];
  logic [1:0] rd_addr;
  logic [31:0] rd_data;
  int checks = 0, failures = 0;
  int model [16];
  always #5 clk = ~clk;
  recon_out_buffer dut (.clk, .rst_n, .ld, .pix_in, .rd_addr, .rd_data);
  initial begin
    rd_addr = '0;
    for (int i = 0; i < 16; i++) pix_in[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      ld = 1;
      for (int i = 0; i < 16; i++) begin model[i] = $urandom_range(0, 255); pix_in[i] = pix_t'(model[i]); end
      rd_addr = 2'($urandom_range(0, 3));
      #1;
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (int'(rd_data[8*c +: 8]) != model[4*int'(rd_addr) + c]) begin
          failures++;
          $display("FAIL bypass r=%0d c=%0d", rd_addr, c);
        end
      end
      @(negedge clk);
      ld = 0;
      for (int i = 0; i < 16; i++) pix_in[i] = pix_t'($urandom);
      for (int r = 0; r < 4; r++) begin
        rd_addr = 2'(r);
        #1;
        for (int c = 0; c < 4; c++) begin
          checks++;
          if (int'(rd_data[8*c +: 8]) != model[4*r + c]) begin
            failures++;
            $display("FAIL r=%0d c=%0d", r, c);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

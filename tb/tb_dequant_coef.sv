// Drives three Dequant_coef units (one per position class) with random
// coefficients and QPs, compares res_out with c*V<<floor(QP/6) from the
// reference model, and checks that done comes exactly 3 cycles after start.
module tb_dequant_coef;
  import h264_ref_pkg::*;
  import h264_intra_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [3:0] qe;
  logic [2:0] qrem;
  coef_t res_in;
  dq_t   out0, out5, out6;
  logic  d0, d5, d6;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dequant_coef #(.POS(0)) u0 (.clk, .rst_n, .start, .qe, .qrem, .res_in, .res_out(out0), .done(d0));
  dequant_coef #(.POS(5)) u5 (.clk, .rst_n, .start, .qe, .qrem, .res_in, .res_out(out5), .done(d5));
  dequant_coef #(.POS(6)) u6 (.clk, .rst_n, .start, .qe, .qrem, .res_in, .res_out(out6), .done(d6));

  // the unit keeps 23 bits: wrap the exact product the same way
  function automatic int w23(input int v);
    return int'(dq_t'(v));
  endfunction

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int qp, c, lat;
      qp = $urandom_range(0, 51);
      c  = int'($urandom_range(0, 4000)) - 2000;
      @(negedge clk);
      qe = 4'(qp / 6); qrem = 3'(qp % 6); res_in = coef_t'(c); start = 1;
      @(negedge clk);
      start = 0; qe = '0; qrem = '0; res_in = '0;
      lat = 1;
      while (!d0 && lat < 10) begin @(negedge clk); lat++; end
      chk(lat, 3, "latency");
      chk(int'(out0), w23(c * ref_v(qp, 0, 0) * (1 << (qp / 6))), "pos0");
      chk(int'(out5), w23(c * ref_v(qp, 1, 1) * (1 << (qp / 6))), "pos5");
      chk(int'(out6), w23(c * ref_v(qp, 1, 2) * (1 << (qp / 6))), "pos6");
      chk(int'(d5 && d6), 1, "done");
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

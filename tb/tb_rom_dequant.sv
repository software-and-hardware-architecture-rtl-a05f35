// Checks the QP -> {floor(QP/6), QP mod 6} table for every 6-bit QP
// (QP above 51 must read as 51).
module tb_rom_dequant;
  logic [5:0] qp;
  logic [3:0] qe;
  logic [2:0] qrem;
  int checks = 0, failures = 0;
  rom_dequant dut (.qp(qp), .qe(qe), .qrem(qrem));
  initial begin
    for (int q = 0; q < 64; q++) begin
      int qs;
      qp = 6'(q);
      #1;
      qs = (q > 51) ? 51 : q;
      checks++;
      if (qe != 4'(qs / 6) || qrem != 3'(qs % 6)) begin
        failures++;
        $display("FAIL qp=%0d qe=%0d qrem=%0d", q, qe, qrem);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

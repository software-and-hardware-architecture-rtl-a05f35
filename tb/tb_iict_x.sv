// Random vectors through the 4-point butterfly, compared with the rows of the
// standard's inverse transform matrix (including the one-bit right shifts).
module tb_iict_x;
  import h264_ref_pkg::*;
  logic signed [22:0] x [4];
  logic signed [24:0] v [4];
  int checks = 0, failures = 0;
  iict_x #(.IW(23)) dut (.x(x), .v(v));
  initial begin
    for (int t = 0; t < 2000; t++) begin
      int d [4], f [4];
      for (int i = 0; i < 4; i++) begin
        d[i] = (t < 4) ? ((t[0] ? -1 : 1) * ((1 << 22) - (t[1] ? 0 : 1)))
                       : int'($urandom_range(0, 1 << 22)) - (1 << 21);
        if (t < 4 && i % 2 == 1) d[i] = -d[i] - (t[0] ? 0 : 1);
        if (d[i] > (1 << 22) - 1) d[i] = (1 << 22) - 1;
        if (d[i] < -(1 << 22))    d[i] = -(1 << 22);
        x[i] = 23'(d[i]);
      end
      #1;
      t4(d[0], d[1], d[2], d[3], f[0], f[1], f[2], f[3]);
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (int'(v[i]) != f[i]) begin
          failures++;
          $display("FAIL t=%0d i=%0d got=%0d exp=%0d", t, i, int'(v[i]), f[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_radix8_bu: compares the multiplier-free radix-8 butterfly with an
// 8-point DFT computed in double precision, on full-scale random 19-bit
// inputs and on single impulses. The only approximation in the unit is the
// rounded 1/sqrt2 constant, so the error must stay within 3 LSB.
module tb_radix8_bu;
  localparam int IW = 19, OW = 23;
  int checks = 0, failures = 0;
  logic signed [IW-1:0] xr [8], xi [8];
  logic signed [OW-1:0] yr [8], yi [8];
  real                  max_err = 0.0;

  radix8_bu #(.IW(IW), .OW(OW)) dut (.x_re(xr), .x_im(xi), .y_re(yr), .y_im(yi));

  task automatic check();
    real er, ei, ang, d;
    #1;
    for (int k = 0; k < 8; k++) begin
      er = 0.0; ei = 0.0;
      for (int n = 0; n < 8; n++) begin
        ang = -2.0 * 3.14159265358979323846 * real'((n * k) % 8) / 8.0;
        er += real'(xr[n]) * $cos(ang) - real'(xi[n]) * $sin(ang);
        ei += real'(xr[n]) * $sin(ang) + real'(xi[n]) * $cos(ang);
      end
      d = $sqrt((real'(yr[k]) - er) ** 2 + (real'(yi[k]) - ei) ** 2);
      if (d > max_err) max_err = d;
      checks++;
      if (d > 3.0) begin
        failures++;
        if (failures < 10) $display("FAIL: k=%0d got (%0d,%0d) expected (%f,%f)", k, yr[k], yi[k], er, ei);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 8; n++) begin
      for (int i = 0; i < 8; i++) begin
        xr[i] = (i == n) ? 19'sd1000 : 19'sd0;
        xi[i] = (i == n) ? -19'sd300 : 19'sd0;
      end
      check();
    end
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < 8; i++) begin
        xr[i] = IW'($urandom);
        xi[i] = IW'($urandom);
      end
      check();
    end
    $display("largest error %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_twiddle_rom: reads all 256 entries of the twiddle table and compares
// them with 2^14*cos(2*pi*e/256) and -2^14*sin(2*pi*e/256) computed in
// double precision; each must be the nearest integer (error <= 0.5).
module tb_twiddle_rom;
  int checks = 0, failures = 0;
  logic [7:0]         e;
  logic signed [15:0] wr, wi;

  twiddle_rom #(.TW(16)) dut (.e(e), .w_re(wr), .w_im(wi));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real c, s, ang;
    for (int i = 0; i < 256; i++) begin
      e = 8'(i);
      #1;
      ang = 2.0 * 3.14159265358979323846 * real'(i) / 256.0;
      c = 16384.0 * $cos(ang);
      s = -16384.0 * $sin(ang);
      checks++;
      if ((real'(wr) - c) > 0.5001 || (c - real'(wr)) > 0.5001 ||
          (real'(wi) - s) > 0.5001 || (s - real'(wi)) > 0.5001) begin
        failures++;
        if (failures < 10) $display("FAIL: e=%0d got (%0d,%0d) expected (%f,%f)", i, wr, wi, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_twiddle_bank: checks the 64 twiddle multipliers between the second
// and third stage. For each size and group g, value (p, k2) must equal the
// input times exp(-j*2*pi*p*(g + R1*k2)/N) (double precision, error <= 2 LSB
// plus 1e-4 of the magnitude), one clock later, with the side-band
// signals (valid, g, last, size, ifft) delayed by the same clock.
module tb_twiddle_bank;
  import fft_pkg::*;
  localparam int W = 23;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_last = 1'b0, in_ifft = 1'b0;
  logic [1:0] in_g = '0;
  fft_size_e in_size = SZ_256;
  logic signed [W-1:0] ir [NPATH][8], ii [NPATH][8], orr [NPATH][8], oi [NPATH][8];
  logic out_valid, out_last, out_ifft;
  logic [1:0] out_g;
  fft_size_e out_size;

  twiddle_bank #(.W(W), .TW(16)) dut (
    .clk, .rst_n, .in_valid, .in_g, .in_last, .in_size, .in_ifft,
    .in_re(ir), .in_im(ii), .out_valid, .out_g, .out_last, .out_size,
    .out_ifft, .out_re(orr), .out_im(oi));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real er, ei, ang, d, mag;
    int  n, r1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_size  = fft_size_e'(t % 3);
      r1       = int'(stage1_radix(in_size));
      n        = 8 * int'(sym_cycles(in_size));
      in_g     = 2'($urandom % r1);
      in_last  = 1'($urandom);
      in_ifft  = 1'($urandom);
      for (int p = 0; p < NPATH; p++)
        for (int k = 0; k < 8; k++) begin
          ir[p][k] = W'($signed(22'($urandom)));
          ii[p][k] = W'($signed(22'($urandom)));
        end
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (!out_valid || out_g != in_g || out_last != in_last || out_size != in_size ||
          out_ifft != in_ifft) begin
        failures++;
        $display("FAIL: side-band signals not delayed by one clock");
      end
      for (int p = 0; p < NPATH; p++)
        for (int k = 0; k < 8; k++) begin
          ang = -2.0 * 3.14159265358979323846 * real'((p * (int'(in_g) + r1 * k)) % n) / real'(n);
          er  = real'(ir[p][k]) * $cos(ang) - real'(ii[p][k]) * $sin(ang);
          ei  = real'(ir[p][k]) * $sin(ang) + real'(ii[p][k]) * $cos(ang);
          mag = $sqrt(er * er + ei * ei);
          d   = $sqrt((real'(orr[p][k]) - er) ** 2 + (real'(oi[p][k]) - ei) ** 2);
          checks++;
          if (d > 2.0 + 1.0e-4 * mag) begin
            failures++;
            if (failures < 10) $display("FAIL: size=%0d g=%0d p=%0d k=%0d got (%0d,%0d) expected (%f,%f)",
                                        in_size, in_g, p, k, orr[p][k], oi[p][k], er, ei);
          end
        end
      @(negedge clk);
      checks++;
      if (out_valid) begin
        failures++;
        $display("FAIL: out_valid did not fall");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_shared_mul: checks the first-stage twiddle multipliers of one data path.
// For every size and row m the four outputs must equal the inputs times
// W256^e with e = 8*m*k (256 points), e = 16*m / 0 / 16*(m+4) for outputs
// 1..3 (128 points) or e = 0 (64 points), computed here in double
// precision; error <= 2 LSB plus 1e-4 of the magnitude. The result must
// appear one clock after the operands and hold while en is low.
module tb_shared_mul;
  import fft_pkg::*;
  localparam int IW = 18, OW = 19;
  int checks = 0, failures = 0;
  logic               clk = 1'b0;
  logic               en = 1'b0;
  fft_size_e          size = SZ_256;
  logic [2:0]         m = '0;
  logic signed [IW-1:0] yr [4], yi [4];
  logic signed [OW-1:0] zr [4], zi [4];

  shared_mul #(.IW(IW), .TW(16), .OW(OW)) dut (
    .clk, .en, .size, .m, .y_re(yr), .y_im(yi), .z_re(zr), .z_im(zi));

  always #5 clk = ~clk;

  function automatic int expo(fft_size_e s, int mm, int k);
    case (s)
      SZ_256:  return 8 * mm * k;
      SZ_128:  return (k == 1) ? 16 * mm : (k == 3) ? 16 * (mm + 4) : 0;
      default: return 0;
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real er, ei, ang, d, mag;
    for (int i = 0; i < 4; i++) begin
      yr[i] = '0; yi[i] = '0;
    end
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      en   = 1'b1;
      size = fft_size_e'(t % 3);
      m    = 3'($urandom);
      for (int i = 0; i < 4; i++) begin
        yr[i] = IW'($urandom);
        yi[i] = IW'($urandom);
      end
      @(negedge clk);
      en = 1'b0;
      for (int k = 0; k < 4; k++) begin
        ang = -2.0 * 3.14159265358979323846 * real'(expo(size, int'(m), k) % 256) / 256.0;
        er  = real'(yr[k]) * $cos(ang) - real'(yi[k]) * $sin(ang);
        ei  = real'(yr[k]) * $sin(ang) + real'(yi[k]) * $cos(ang);
        mag = $sqrt(er * er + ei * ei);
        d   = $sqrt((real'(zr[k]) - er) ** 2 + (real'(zi[k]) - ei) ** 2);
        checks++;
        if (d > 2.0 + 1.0e-4 * mag) begin
          failures++;
          if (failures < 10) $display("FAIL: size=%0d m=%0d k=%0d got (%0d,%0d) expected (%f,%f)",
                                      size, m, k, zr[k], zi[k], er, ei);
        end
      end
      // hold while en is low
      yr[0] = ~yr[0];
      @(negedge clk);
      checks++;
      if (zr[0] != OW'(~yr[0])) begin
        failures++;
        $display("FAIL: output changed while en was low");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

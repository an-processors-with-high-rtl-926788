// tb_r24_bu: checks the radix-2/4 butterfly in its three modes against
// integer reference formulas: the 4-point DFT y[k] = sum x[i]*(-j)^(i*k)
// (256 points), the pairs x0+-x1, x2+-x3 (128 points) and the bypass
// (64 points), on extreme and random 16-bit inputs.
module tb_r24_bu;
  import fft_pkg::*;
  int checks = 0, failures = 0;
  fft_size_e          size;
  logic signed [15:0] xr [4], xi [4];
  logic signed [17:0] yr [4], yi [4];

  r24_bu #(.IW(16)) dut (.size(size), .x_re(xr), .x_im(xi), .y_re(yr), .y_im(yi));

  // multiply (re, im) by (-j)^q
  task automatic rot(int re, int im, int q, output int o_re, output int o_im);
    case (q % 4)
      0: begin o_re = re;  o_im = im;  end
      1: begin o_re = im;  o_im = -re; end
      2: begin o_re = -re; o_im = -im; end
      default: begin o_re = -im; o_im = re; end
    endcase
  endtask

  task automatic check();
    int er [4], ei [4], r, i;
    #1;
    for (int k = 0; k < 4; k++) begin
      er[k] = 0; ei[k] = 0;
    end
    case (size)
      SZ_256:
        for (int k = 0; k < 4; k++)
          for (int n = 0; n < 4; n++) begin
            rot(int'(xr[n]), int'(xi[n]), n * k, r, i);
            er[k] += r; ei[k] += i;
          end
      SZ_128: begin
        er[0] = int'(xr[0]) + int'(xr[1]);  ei[0] = int'(xi[0]) + int'(xi[1]);
        er[1] = int'(xr[0]) - int'(xr[1]);  ei[1] = int'(xi[0]) - int'(xi[1]);
        er[2] = int'(xr[2]) + int'(xr[3]);  ei[2] = int'(xi[2]) + int'(xi[3]);
        er[3] = int'(xr[2]) - int'(xr[3]);  ei[3] = int'(xi[2]) - int'(xi[3]);
      end
      default: begin
        er[0] = int'(xr[0]);  ei[0] = int'(xi[0]);
      end
    endcase
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (int'(yr[k]) != er[k] || int'(yi[k]) != ei[k]) begin
        failures++;
        if (failures < 10) $display("FAIL: size=%0d k=%0d got (%0d,%0d) expected (%0d,%0d)",
                                    size, k, yr[k], yi[k], er[k], ei[k]);
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
    for (int s = 0; s < 3; s++) begin
      size = fft_size_e'(s);
      for (int n = 0; n < 4; n++) begin
        xr[n] = (n % 2 == 0) ? 16'sh8000 : 16'sh7fff;
        xi[n] = (n < 2) ? 16'sh7fff : 16'sh8000;
      end
      check();
      for (int t = 0; t < 1000; t++) begin
        for (int n = 0; n < 4; n++) begin
          xr[n] = 16'($urandom);
          xi[n] = 16'($urandom);
        end
        check();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

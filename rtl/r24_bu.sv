// r24_bu: radix-2/4 butterfly unit of the first stage (one data path).
//
// 256 points: one radix-4 DFT of x0..x3 (x(n), x(n+64), x(n+128), x(n+192)),
//   y[k] = sum_i x[i] * (-j)^(i*k), k = 0..3, done as two radix-2 phases:
//   a0 = x0+x2, a1 = x0-x2, b0 = x1+x3, b1 = -j(x1-x3);
//   y0 = a0+b0, y1 = a1+b1, y2 = a0-b0, y3 = a1-b1.
// 128 points: two radix-2 operations, y0/y1 = x0 +/- x1, y2/y3 = x2 +/- x3.
//  64 points: bypass, y0 = x0, y1..y3 = 0.
// The output grows by two bits (OW = IW+2), enough for four summed inputs.
// Combinational. One radix-4 or two radix-2 operations is the document's
// description of this unit; the adder arrangement is this design's.
module r24_bu
  import fft_pkg::*;
#(
  parameter int IW = 16,
  parameter int OW = IW + 2
) (
  input  fft_size_e            size,
  input  logic signed [IW-1:0] x_re [4],
  input  logic signed [IW-1:0] x_im [4],
  output logic signed [OW-1:0] y_re [4],
  output logic signed [OW-1:0] y_im [4]
);

  logic signed [OW-1:0] xr [4], xi [4];
  logic signed [OW-1:0] a0r, a0i, a1r, a1i, b0r, b0i, b1r, b1i;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      xr[i] = OW'(x_re[i]);
      xi[i] = OW'(x_im[i]);
    end
    // radix-4 first phase
    a0r = xr[0] + xr[2];  a0i = xi[0] + xi[2];
    a1r = xr[0] - xr[2];  a1i = xi[0] - xi[2];
    b0r = xr[1] + xr[3];  b0i = xi[1] + xi[3];
    // -j * (x1 - x3)
    b1r = xi[1] - xi[3];  b1i = xr[3] - xr[1];
    case (size)
      SZ_256: begin
        y_re[0] = a0r + b0r;  y_im[0] = a0i + b0i;
        y_re[1] = a1r + b1r;  y_im[1] = a1i + b1i;
        y_re[2] = a0r - b0r;  y_im[2] = a0i - b0i;
        y_re[3] = a1r - b1r;  y_im[3] = a1i - b1i;
      end
      SZ_128: begin
        y_re[0] = xr[0] + xr[1];  y_im[0] = xi[0] + xi[1];
        y_re[1] = xr[0] - xr[1];  y_im[1] = xi[0] - xi[1];
        y_re[2] = xr[2] + xr[3];  y_im[2] = xi[2] + xi[3];
        y_re[3] = xr[2] - xr[3];  y_im[3] = xi[2] - xi[3];
      end
      default: begin
        y_re[0] = xr[0];  y_im[0] = xi[0];
        for (int k = 1; k < 4; k++) begin
          y_re[k] = '0;
          y_im[k] = '0;
        end
      end
    endcase
  end

endmodule

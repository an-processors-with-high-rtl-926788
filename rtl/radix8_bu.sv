// radix8_bu: modified radix-8 butterfly unit without general multipliers.
//
// X[k] = sum_{n=0..7} x[n] * W8^(n*k), outputs in natural order. Three
// adder-tree phases (decimation in frequency):
//   phase 1: a_i = x_i + x_{i+4},  b_i = (x_i - x_{i+4}) * W8^i, i = 0..3
//   phase 2: radix-2 on pairs (0,2),(1,3) of a and b, the odd one times -j
//   phase 3: final radix-2 sums, unscrambled to natural order.
// The only non-trivial constants are W8^1 = (1-j)/sqrt2 and W8^3 = -(1+j)/sqrt2;
// multiplying by 1/sqrt2 is a fixed constant (K = round(2^16/sqrt2)) with
// rounding, which reduces to shifts and adds, so the unit holds no general
// multiplier. All arithmetic is carried at OW = IW+4 bits, which holds the
// largest possible output (|X| <= 8*sqrt2*max|x component|).
// Combinational. The document's second stage uses this BU without
// multipliers and describes its phases as adder trees; the exact phase
// split and the constant are this design's.
module radix8_bu #(
  parameter int IW = 19,
  parameter int OW = IW + 4
) (
  input  logic signed [IW-1:0] x_re [8],
  input  logic signed [IW-1:0] x_im [8],
  output logic signed [OW-1:0] y_re [8],
  output logic signed [OW-1:0] y_im [8]
);

  localparam int KW = 18;
  localparam logic signed [KW-1:0] K = 18'sd46341;  // round(65536/sqrt(2))

  // (v * K) / 2^16, rounded
  function automatic logic signed [OW-1:0] mul_k(input logic signed [OW-1:0] v);
    logic signed [OW+KW-1:0] prod;
    prod = (OW+KW)'(v) * (OW+KW)'(K) + (OW+KW)'(32768);
    return OW'(prod >>> 16);
  endfunction

  logic signed [OW-1:0] xr [8], xi [8];
  logic signed [OW-1:0] ar [4], ai [4], br [4], bi [4];
  logic signed [OW-1:0] tr, ti;
  logic signed [OW-1:0] cr [2], ci [2], dr [2], di [2];
  logic signed [OW-1:0] er [2], ei [2], fr [2], fi [2];

  always_comb begin
    for (int n = 0; n < 8; n++) begin
      xr[n] = OW'(x_re[n]);
      xi[n] = OW'(x_im[n]);
    end
    // phase 1
    for (int i = 0; i < 4; i++) begin
      ar[i] = xr[i] + xr[i+4];
      ai[i] = xi[i] + xi[i+4];
    end
    br[0] = xr[0] - xr[4];           bi[0] = xi[0] - xi[4];
    tr    = xr[1] - xr[5];           ti    = xi[1] - xi[5];
    br[1] = mul_k(tr + ti);          bi[1] = mul_k(ti - tr);     // * (1-j)/sqrt2
    br[2] = xi[2] - xi[6];           bi[2] = xr[6] - xr[2];      // * -j
    tr    = xr[3] - xr[7];           ti    = xi[3] - xi[7];
    br[3] = mul_k(ti - tr);          bi[3] = mul_k(-tr - ti);    // * -(1+j)/sqrt2
    // phase 2
    cr[0] = ar[0] + ar[2];           ci[0] = ai[0] + ai[2];
    cr[1] = ar[1] + ar[3];           ci[1] = ai[1] + ai[3];
    dr[0] = ar[0] - ar[2];           di[0] = ai[0] - ai[2];
    dr[1] = ai[1] - ai[3];           di[1] = ar[3] - ar[1];      // * -j
    er[0] = br[0] + br[2];           ei[0] = bi[0] + bi[2];
    er[1] = br[1] + br[3];           ei[1] = bi[1] + bi[3];
    fr[0] = br[0] - br[2];           fi[0] = bi[0] - bi[2];
    fr[1] = bi[1] - bi[3];           fi[1] = br[3] - br[1];      // * -j
    // phase 3, natural order
    y_re[0] = cr[0] + cr[1];         y_im[0] = ci[0] + ci[1];
    y_re[4] = cr[0] - cr[1];         y_im[4] = ci[0] - ci[1];
    y_re[2] = dr[0] + dr[1];         y_im[2] = di[0] + di[1];
    y_re[6] = dr[0] - dr[1];         y_im[6] = di[0] - di[1];
    y_re[1] = er[0] + er[1];         y_im[1] = ei[0] + ei[1];
    y_re[5] = er[0] - er[1];         y_im[5] = ei[0] - ei[1];
    y_re[3] = fr[0] + fr[1];         y_im[3] = fi[0] + fi[1];
    y_re[7] = fr[0] - fr[1];         y_im[7] = fi[0] - fi[1];
  end

endmodule

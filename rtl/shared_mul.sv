// shared_mul: the first-stage twiddle multipliers of one data path (SMSS).
//
// Under the shared multiplier scheduling scheme the twiddle factors that sit
// between the first and second stage are applied in the first stage, so the
// second-stage radix-8 BUs need no general multipliers. Three complex
// (Vedic) multipliers serve BU outputs 1..3 in every mode; output 0 always
// has the factor 1. With n2 = m the row of the operand set:
//   256 points: output k gets W32^(m*k)         = W256^(8*m*k)
//   128 points: output 1 gets W16^m             = W256^(16*m)
//               output 3 gets W16^(m+4)         = W256^(16*(m+4))
//               output 2 gets 1 (multiplier idle)
//    64 points: all factors are 1.
// The factor 1 is exact (2^FRAC), so an idle multiplier passes its operand.
// Output grows one bit (rotation of a complex value). The result is
// registered: one cycle from input to output. The placement of these
// multipliers in the first stage is the document's SMSS; the sharing across
// modes and the exponent arithmetic follow from the index mapping used here.
module shared_mul
  import fft_pkg::*;
#(
  parameter int IW = 18,
  parameter int TW = 16,
  parameter int OW = IW + 1
) (
  input  logic                 clk,
  input  logic                 en,
  input  fft_size_e            size,
  input  logic [2:0]           m,
  input  logic signed [IW-1:0] y_re [4],
  input  logic signed [IW-1:0] y_im [4],
  output logic signed [OW-1:0] z_re [4],
  output logic signed [OW-1:0] z_im [4]
);

  logic [7:0]           e   [1:3];
  logic signed [TW-1:0] wr  [1:3], wi [1:3];
  logic signed [OW-1:0] pr  [1:3], pm [1:3];

  always_comb begin
    case (size)
      SZ_256: begin
        e[1] = 8'(8 * m);
        e[2] = 8'(16 * m);
        e[3] = 8'(24 * m);
      end
      SZ_128: begin
        e[1] = 8'(16 * m);
        e[2] = 8'd0;
        e[3] = 8'(16 * (int'(m) + 4));
      end
      default: begin
        e[1] = 8'd0;
        e[2] = 8'd0;
        e[3] = 8'd0;
      end
    endcase
  end

  for (genvar k = 1; k < 4; k++) begin : g_mul
    twiddle_rom #(.TW(TW)) u_rom (.e(e[k]), .w_re(wr[k]), .w_im(wi[k]));
    cmplx_mult #(.AW(IW), .BW(TW), .FRAC(TW - 2), .OW(OW)) u_cm (
      .a_re(y_re[k]), .a_im(y_im[k]), .w_re(wr[k]), .w_im(wi[k]),
      .p_re(pr[k]), .p_im(pm[k])
    );
  end

  always_ff @(posedge clk) begin
    if (en) begin
      z_re[0] <= OW'(y_re[0]);
      z_im[0] <= OW'(y_im[0]);
      for (int k = 1; k < 4; k++) begin
        z_re[k] <= pr[k];
        z_im[k] <= pm[k];
      end
    end
  end

endmodule

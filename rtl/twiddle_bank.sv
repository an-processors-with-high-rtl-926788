// twiddle_bank: twiddle factor multipliers between the second and third stage.
//
// At each issue cycle the second stage delivers, for first-stage output
// k1 = g, an 8x8 block: path p (= n3) and radix-8 output k2. Each value is
// multiplied by W_N^(n3*(k1 + R1*k2)):
//   256 points: W256^(p*(g + 4*k2))
//   128 points: W128^(p*(g + 2*k2)) = W256^(2*p*(g + 2*k2))
//    64 points: W64^(p*k2)          = W256^(4*p*k2)
// with 64 complex Vedic multipliers, one per value. Outputs keep the input
// width W: the second-stage result is bounded by 32*sqrt2*2^(DW-1) in
// magnitude, well inside W = DW+7 bits, and a rotation does not change it.
// Registered: the side-band signals and products leave one cycle after
// the operands. The document places these general multipliers in the first
// phase of the third-stage modified radix-8 BU; here they form their own
// rank in front of that BU.
module twiddle_bank
  import fft_pkg::*;
#(
  parameter int W  = 23,
  parameter int TW = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [1:0]          in_g,
  input  logic                in_last,
  input  fft_size_e           in_size,
  input  logic                in_ifft,
  input  logic signed [W-1:0] in_re  [NPATH][8],
  input  logic signed [W-1:0] in_im  [NPATH][8],
  output logic                out_valid,
  output logic [1:0]          out_g,
  output logic                out_last,
  output fft_size_e           out_size,
  output logic                out_ifft,
  output logic signed [W-1:0] out_re [NPATH][8],
  output logic signed [W-1:0] out_im [NPATH][8]
);

  logic [7:0]           e  [NPATH][8];
  logic signed [TW-1:0] wr [NPATH][8], wi [NPATH][8];
  logic signed [W-1:0]  pr [NPATH][8], pm [NPATH][8];

  always_comb begin
    for (int p = 0; p < NPATH; p++) begin
      for (int k = 0; k < 8; k++) begin
        case (in_size)
          SZ_256:  e[p][k] = 8'(p * (int'(in_g) + 4 * k));
          SZ_128:  e[p][k] = 8'(2 * p * (int'(in_g) + 2 * k));
          default: e[p][k] = 8'(4 * p * k);
        endcase
      end
    end
  end

  for (genvar p = 0; p < NPATH; p++) begin : g_p
    for (genvar k = 0; k < 8; k++) begin : g_k
      twiddle_rom #(.TW(TW)) u_rom (.e(e[p][k]), .w_re(wr[p][k]), .w_im(wi[p][k]));
      cmplx_mult #(.AW(W), .BW(TW), .FRAC(TW - 2), .OW(W)) u_cm (
        .a_re(in_re[p][k]), .a_im(in_im[p][k]),
        .w_re(wr[p][k]),    .w_im(wi[p][k]),
        .p_re(pr[p][k]),    .p_im(pm[p][k])
      );
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_g     <= '0;
      out_last  <= 1'b0;
      out_size  <= SZ_256;
      out_ifft  <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_g     <= in_g;
      out_last  <= in_valid && in_last;
      out_size  <= in_size;
      out_ifft  <= in_ifft;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      out_re <= pr;
      out_im <= pm;
    end
  end

endmodule

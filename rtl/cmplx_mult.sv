// cmplx_mult: complex multiplier p = a * w built from four Vedic multipliers.
//
// re = ar*wr - ai*wi, im = ar*wi + ai*wr. The sum is rounded (add half an
// LSB, arithmetic shift) by FRAC bits, the fraction width of w, and cut to
// OW bits. The caller sizes OW so that the result cannot overflow: for a
// twiddle factor |w| <= 1, so OW = AW + 1 always suffices. Purely
// combinational. The four-multiplier form and rounding are this design's
// choice; the document says only that the complex multipliers use Vedic
// multipliers.
module cmplx_mult #(
  parameter int AW   = 19,
  parameter int BW   = 16,
  parameter int FRAC = 14,
  parameter int OW   = 20
) (
  input  logic signed [AW-1:0] a_re,
  input  logic signed [AW-1:0] a_im,
  input  logic signed [BW-1:0] w_re,
  input  logic signed [BW-1:0] w_im,
  output logic signed [OW-1:0] p_re,
  output logic signed [OW-1:0] p_im
);

  localparam int PW = AW + BW;

  logic signed [PW-1:0] rr, ii, ri, ir;
  logic signed [PW:0]   sre, sim;

  vedic_mult #(.AW(AW), .BW(BW)) u_rr (.a(a_re), .b(w_re), .p(rr));
  vedic_mult #(.AW(AW), .BW(BW)) u_ii (.a(a_im), .b(w_im), .p(ii));
  vedic_mult #(.AW(AW), .BW(BW)) u_ri (.a(a_re), .b(w_im), .p(ri));
  vedic_mult #(.AW(AW), .BW(BW)) u_ir (.a(a_im), .b(w_re), .p(ir));

  always_comb begin
    sre  = (PW+1)'(rr) - (PW+1)'(ii) + (PW+1)'(1 <<< (FRAC - 1));
    sim  = (PW+1)'(ri) + (PW+1)'(ir) + (PW+1)'(1 <<< (FRAC - 1));
    p_re = OW'(sre >>> FRAC);
    p_im = OW'(sim >>> FRAC);
  end

endmodule

// vedic_mult: signed AW x BW multiplier written after the Urdhva Tiryakbhyam
// ("vertically and crosswise") sutra of Vedic arithmetic.
//
// The operands are turned into magnitudes. Column k of the product is the sum
// of all crosswise bit products a[i]&b[j] with i+j = k plus the carry handed
// on from column k-1; the column's low bit is product bit k and the rest
// is the carry into column k+1. The sign is applied last. The document names
// the Vedic multiplier and the sutra as the multiplier of the processor; the
// column-wise formulation and the sign-magnitude handling are this design's.
// Purely combinational: p = a * b, full AW+BW-bit result.
module vedic_mult #(
  parameter int AW = 16,
  parameter int BW = 16
) (
  input  logic signed [AW-1:0]    a,
  input  logic signed [BW-1:0]    b,
  output logic signed [AW+BW-1:0] p
);

  logic [AW-1:0]    ma;
  logic [BW-1:0]    mb;
  logic [AW+BW-1:0] up;
  logic             neg;

  always_comb begin
    int unsigned col;
    int unsigned carry;
    ma    = a[AW-1] ? AW'(-a) : AW'(a);
    mb    = b[BW-1] ? BW'(-b) : BW'(b);
    neg   = a[AW-1] ^ b[BW-1];
    carry = 0;
    for (int k = 0; k < AW + BW - 1; k++) begin
      col = carry;
      for (int i = 0; i < AW; i++) begin
        if (k - i >= 0 && k - i < BW) col += 32'(ma[i] & mb[k-i]);
      end
      up[k] = col[0];
      carry = col >> 1;
    end
    up[AW+BW-1] = carry[0];
    p = neg ? -$signed(up) : $signed(up);
  end

endmodule

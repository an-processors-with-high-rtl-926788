// twiddle_rom: twiddle factor lookup W256^e = cos(2*pi*e/256) - j*sin(2*pi*e/256).
//
// The table is computed at elaboration from the formula in fft_pkg (no data
// file): w_re = round(2^FRAC*cos), w_im = round(-2^FRAC*sin), FRAC = TW-2.
// Combinational read: e in, factor out in the same cycle. The document shows
// twiddle factor multipliers but not how the factors are stored; the
// full-period table is this design's choice.
module twiddle_rom #(
  parameter int TW = 16
) (
  input  logic [7:0]           e,
  output logic signed [TW-1:0] w_re,
  output logic signed [TW-1:0] w_im
);
  import fft_pkg::*;

  localparam tw_arr_t TAB_RE = make_twiddles(TW - 2, 1'b0);
  localparam tw_arr_t TAB_IM = make_twiddles(TW - 2, 1'b1);

  always_comb begin
    w_re = TW'(TAB_RE[e]);
    w_im = TW'(TAB_IM[e]);
  end

endmodule

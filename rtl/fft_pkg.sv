// fft_pkg: shared constants, types and the twiddle-factor formula of the
// eight-parallel SMSS mixed-radix FFT/IFFT processor.
//
// Sizes are decomposed as N = R1 * 8 * 8: a first stage of radix R1
// (4 for 256 points, 2 for 128, 1 = bypass for 64), then two radix-8 stages.
// Eight samples enter and leave per clock (eight data paths). The twiddle
// table holds W256^e = exp(-j*2*pi*e/256) for e = 0..255; the smaller sizes
// use every 2nd or 4th entry. Twiddles are signed TW-bit numbers with
// TW-2 fraction bits so that +1.0 is exact. The 256/128 sizes, the eight
// paths and the radix-2/4, radix-8, radix-8 stage order follow the document;
// the widths, the Q format and the 64-point mode are this design's choices.
package fft_pkg;

  localparam int NPATH = 8;     // parallel data paths
  localparam int NMAX  = 256;   // largest FFT size
  localparam int NTW   = 256;   // twiddle table length (W256)

  // FFT size select, the size MUX control.
  typedef enum logic [1:0] {
    SZ_64  = 2'd0,
    SZ_128 = 2'd1,
    SZ_256 = 2'd2
  } fft_size_e;

  // Radix of the first stage for a size (1 means the stage is bypassed).
  function automatic int unsigned stage1_radix(fft_size_e s);
    case (s)
      SZ_256:  return 4;
      SZ_128:  return 2;
      default: return 1;
    endcase
  endfunction

  // Clock cycles one symbol occupies on the eight input paths (N/8).
  function automatic int unsigned sym_cycles(fft_size_e s);
    case (s)
      SZ_256:  return 32;
      SZ_128:  return 16;
      default: return 8;
    endcase
  endfunction

  // Twiddle table: entry e holds round(2^frac * cos(2*pi*e/NTW)) (re) or
  // round(-2^frac * sin(2*pi*e/NTW)) (im).
  typedef int tw_arr_t [NTW];

  function automatic tw_arr_t make_twiddles(int frac, bit imag);
    tw_arr_t t;
    real ang, sc;
    sc = real'(longint'(1) << frac);
    for (int e = 0; e < NTW; e++) begin
      ang  = 2.0 * 3.14159265358979323846 * real'(e) / real'(NTW);
      t[e] = imag ? int'($floor(-sc * $sin(ang) + 0.5))
                  : int'($floor(sc * $cos(ang) + 0.5));
    end
    return t;
  endfunction

endpackage

// input_buffer: input reordering of the first stage, all eight data paths.
//
// Data path p receives sample x(8t+p) of a symbol at its t-th valid cycle.
// Each path owns one tapped delay line; tap Dk holds the sample that entered
// k valid cycles earlier. A radix-2/4 butterfly unit (BU) needs samples 64
// apart, which sit on the same path 8 cycles apart, so the taps line them up:
//   256 points: the BU fires in cycles t = 24..31 (idle 0..23) and receives
//               D24, D16, D8, D0 = x(n), x(n+64), x(n+128), x(n+192),
//               n = 8m+p, m = t-24.
//   128 points: the BU fires in cycles t = 12..15 and does two radix-2
//               operations on D12, D4 = x(n), x(n+64) and D8, D0 =
//               x(n+32), x(n+96), n = 8m+p, m = t-12. Half the delay of 256.
//    64 points: no first-stage butterfly; every sample passes with m = t.
// With sel_ifft the imaginary part is negated (complex conjugate); the one
// value that cannot be negated, -2^(DW-1), becomes 2^(DW-1)-1.
// Size and direction are sampled with the first sample of a symbol and hold
// for the whole symbol; symbols may be back to back or have gaps between
// valid cycles. Outputs are registered: bu_valid rises one cycle after the
// valid input that completes a BU operand set. The 256-point idle/compute
// timing (D24/D16/D8 delays, t24..t31) follows the document's first-stage
// figure; the 128-point tap choice, the 64-point mode and the saturating
// conjugate are this design's.
module input_buffer
  import fft_pkg::*;
#(
  parameter int DW    = 16,
  parameter int DEPTH = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_re [NPATH],
  input  logic signed [DW-1:0] in_im [NPATH],
  input  fft_size_e            fft_size,
  input  logic                 sel_ifft,
  output logic                 bu_valid,
  output logic [2:0]           bu_m,
  output logic                 bu_last,
  output fft_size_e            bu_size,
  output logic                 bu_ifft,
  output logic signed [DW-1:0] bu_re [NPATH][4],
  output logic signed [DW-1:0] bu_im [NPATH][4]
);

  localparam logic signed [DW-1:0] MAXV = {1'b0, {(DW-1){1'b1}}};
  localparam logic signed [DW-1:0] MINV = {1'b1, {(DW-1){1'b0}}};

  logic signed [DW-1:0] dl_re [NPATH][DEPTH];
  logic signed [DW-1:0] dl_im [NPATH][DEPTH];
  logic signed [DW-1:0] x_re  [NPATH];
  logic signed [DW-1:0] x_im  [NPATH];

  logic [4:0]  cnt;
  fft_size_e   cur_size, size_now;
  logic        cur_ifft, ifft_now;
  logic        fire, last_fire;
  logic [2:0]  m;
  logic [4:0]  last_cnt;
  int unsigned tap [4];

  always_comb begin
    size_now = (cnt == 5'd0) ? fft_size : cur_size;
    ifft_now = (cnt == 5'd0) ? sel_ifft : cur_ifft;
    last_cnt = 5'(sym_cycles(size_now) - 1);
    for (int p = 0; p < NPATH; p++) begin
      x_re[p] = in_re[p];
      x_im[p] = ifft_now ? ((in_im[p] == MINV) ? MAXV : -in_im[p]) : in_im[p];
    end
    case (size_now)
      SZ_256: begin
        fire = (cnt >= 5'd24);
        m    = 3'(cnt - 5'd24);
        tap  = '{24, 16, 8, 0};
      end
      SZ_128: begin
        fire = (cnt >= 5'd12);
        m    = 3'(cnt - 5'd12);
        tap  = '{12, 4, 8, 0};
      end
      default: begin
        fire = 1'b1;
        m    = cnt[2:0];
        tap  = '{0, 0, 0, 0};
      end
    endcase
    last_fire = fire && (cnt == last_cnt);
  end

  // Counter, symbol settings and the delay lines.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      cur_size <= SZ_256;
      cur_ifft <= 1'b0;
    end else if (in_valid) begin
      cnt <= (cnt == last_cnt) ? 5'd0 : cnt + 5'd1;
      if (cnt == 5'd0) begin
        cur_size <= fft_size;
        cur_ifft <= sel_ifft;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int p = 0; p < NPATH; p++) begin
        dl_re[p][0] <= x_re[p];
        dl_im[p][0] <= x_im[p];
        for (int i = 1; i < DEPTH; i++) begin
          dl_re[p][i] <= dl_re[p][i-1];
          dl_im[p][i] <= dl_im[p][i-1];
        end
      end
    end
  end

  // Operand sets for the BUs.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bu_valid <= 1'b0;
      bu_m     <= '0;
      bu_last  <= 1'b0;
      bu_size  <= SZ_256;
      bu_ifft  <= 1'b0;
    end else begin
      bu_valid <= in_valid && fire;
      bu_m     <= m;
      bu_last  <= in_valid && last_fire;
      bu_size  <= size_now;
      bu_ifft  <= ifft_now;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && fire) begin
      for (int p = 0; p < NPATH; p++) begin
        for (int k = 0; k < 4; k++) begin
          if (size_now == SZ_64 && k != 0) begin
            bu_re[p][k] <= '0;
            bu_im[p][k] <= '0;
          end else if (tap[k] == 0) begin
            bu_re[p][k] <= x_re[p];
            bu_im[p][k] <= x_im[p];
          end else begin
            bu_re[p][k] <= dl_re[p][tap[k]-1];
            bu_im[p][k] <= dl_im[p][tap[k]-1];
          end
        end
      end
    end
  end

endmodule

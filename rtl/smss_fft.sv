// smss_fft: eight-parallel mixed-radix multipath delay commutator (MRMDC)
// FFT/IFFT processor with the shared multiplier scheduling scheme (SMSS),
// reconfigurable between 256, 128 and 64 points.
//
// N = R1*8*8 with n = 64*n1 + 8*n2 + n3 and k = k1 + R1*k2 + (N/8)*k3:
//   input_buffer  delay lines line up x(n), x(n+64), ... on each data path
//   r24_bu        first stage: one radix-4 (256) or two radix-2 (128) DFTs
//   shared_mul    first-stage twiddles W_{N/8}^(n2*k1) (moved here by SMSS)
//   s2_commutator collects the eight n2 values of each (n3, k1)
//   radix8_bu     second stage, no general multipliers, over n2 -> k2
//   twiddle_bank  W_N^(n3*(k1 + R1*k2)), 64 Vedic complex multipliers
//   radix8_bu     third stage across the eight paths, over n3 -> k3
//   output_buffer natural-order output, eight bins per cycle
// Data path p carries samples 8t+p at input and bins 8t+p at output, so a
// symbol takes N/8 valid cycles in and N/8 cycles out; symbols may follow
// each other without a gap (throughput 8 samples per clock). fft_size and
// sel_ifft are read with the first sample of each symbol. The IFFT is
// conj(FFT(conj(x))) without 1/N scaling. Widths grow so that no stage can
// overflow: DW-bit input, DW+9-bit output. Latency from the last input
// sample of a symbol to its first output beat is R1 + 8 cycles: 12, 10
// and 9 for 256, 128 and 64 points; more only while the previous symbol
// is still leaving the output buffer. The structure (eight paths, radix-2/4 then
// two radix-8 stages, shared multipliers in the first stage, conjugation
// for the IFFT, size selection) follows the document; the 64-point mode,
// widths, fixed-point formats and buffer designs are this design's own.
module smss_fft
  import fft_pkg::*;
#(
  parameter int DW = 16,
  parameter int TW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_re  [NPATH],
  input  logic signed [DW-1:0] in_im  [NPATH],
  input  fft_size_e            fft_size,
  input  logic                 sel_ifft,
  output logic                 out_valid,
  output logic                 out_first,
  output fft_size_e            out_size,
  output logic signed [DW+8:0] out_re [NPATH],
  output logic signed [DW+8:0] out_im [NPATH],
  output logic                 overflow
);

  localparam int W1 = DW + 3;    // after first stage and its twiddles
  localparam int W2 = DW + 7;    // after second stage
  localparam int W3 = DW + 11;   // after third stage (internal)
  localparam int WO = DW + 9;    // output

  // input buffer -> first stage
  logic                 bu_valid, bu_last, bu_ifft;
  logic [2:0]           bu_m;
  fft_size_e            bu_size;
  logic signed [DW-1:0] bu_re [NPATH][4], bu_im [NPATH][4];
  // first stage
  logic signed [DW+1:0] s1y_re [NPATH][4], s1y_im [NPATH][4];
  logic signed [W1-1:0] s1_re  [NPATH][4], s1_im  [NPATH][4];
  logic                 s1_valid, s1_last, s1_ifft;
  logic [2:0]           s1_m;
  fft_size_e            s1_size;
  // commutator -> second stage
  logic                 c_valid, c_last, c_ifft;
  logic [1:0]           c_g;
  fft_size_e            c_size;
  logic signed [W1-1:0] c_re  [NPATH][8], c_im [NPATH][8];
  logic signed [W2-1:0] s2_re [NPATH][8], s2_im [NPATH][8];
  // twiddles -> third stage
  logic                 t_valid, t_last, t_ifft;
  logic [1:0]           t_g;
  fft_size_e            t_size;
  logic signed [W2-1:0] t_re  [NPATH][8], t_im [NPATH][8];
  logic signed [W2-1:0] s3x_re [8][8], s3x_im [8][8];
  logic signed [W3-1:0] s3_re [8][8], s3_im [8][8];

  input_buffer #(.DW(DW)) u_in (
    .clk, .rst_n, .in_valid, .in_re, .in_im, .fft_size, .sel_ifft,
    .bu_valid, .bu_m, .bu_last, .bu_size, .bu_ifft, .bu_re, .bu_im
  );

  for (genvar p = 0; p < NPATH; p++) begin : g_stage1
    r24_bu #(.IW(DW)) u_bu (
      .size(bu_size), .x_re(bu_re[p]), .x_im(bu_im[p]),
      .y_re(s1y_re[p]), .y_im(s1y_im[p])
    );
    shared_mul #(.IW(DW + 2), .TW(TW)) u_mul (
      .clk, .en(bu_valid), .size(bu_size), .m(bu_m),
      .y_re(s1y_re[p]), .y_im(s1y_im[p]), .z_re(s1_re[p]), .z_im(s1_im[p])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_last  <= 1'b0;
      s1_m     <= '0;
      s1_size  <= SZ_256;
      s1_ifft  <= 1'b0;
    end else begin
      s1_valid <= bu_valid;
      s1_last  <= bu_valid && bu_last;
      s1_m     <= bu_m;
      s1_size  <= bu_size;
      s1_ifft  <= bu_ifft;
    end
  end

  s2_commutator #(.W(W1)) u_com (
    .clk, .rst_n,
    .in_valid(s1_valid), .in_m(s1_m), .in_last(s1_last), .in_size(s1_size),
    .in_ifft(s1_ifft), .in_re(s1_re), .in_im(s1_im),
    .out_valid(c_valid), .out_g(c_g), .out_last(c_last), .out_size(c_size),
    .out_ifft(c_ifft), .out_re(c_re), .out_im(c_im)
  );

  for (genvar p = 0; p < NPATH; p++) begin : g_stage2
    radix8_bu #(.IW(W1), .OW(W2)) u_bu (
      .x_re(c_re[p]), .x_im(c_im[p]), .y_re(s2_re[p]), .y_im(s2_im[p])
    );
  end

  twiddle_bank #(.W(W2), .TW(TW)) u_tw (
    .clk, .rst_n,
    .in_valid(c_valid), .in_g(c_g), .in_last(c_last), .in_size(c_size),
    .in_ifft(c_ifft), .in_re(s2_re), .in_im(s2_im),
    .out_valid(t_valid), .out_g(t_g), .out_last(t_last), .out_size(t_size),
    .out_ifft(t_ifft), .out_re(t_re), .out_im(t_im)
  );

  // The crossing between the second and third stage: BU q takes output
  // k2 = q of every path.
  always_comb begin
    for (int q = 0; q < 8; q++) begin
      for (int p = 0; p < NPATH; p++) begin
        s3x_re[q][p] = t_re[p][q];
        s3x_im[q][p] = t_im[p][q];
      end
    end
  end

  for (genvar q = 0; q < 8; q++) begin : g_stage3
    radix8_bu #(.IW(W2), .OW(W3)) u_bu (
      .x_re(s3x_re[q]), .x_im(s3x_im[q]), .y_re(s3_re[q]), .y_im(s3_im[q])
    );
  end

  output_buffer #(.IW(W3), .OW(WO)) u_out (
    .clk, .rst_n,
    .in_valid(t_valid), .in_g(t_g), .in_last(t_last), .in_size(t_size),
    .in_ifft(t_ifft), .in_re(s3_re), .in_im(s3_im),
    .out_valid, .out_first, .out_size, .out_re, .out_im, .overflow
  );

endmodule

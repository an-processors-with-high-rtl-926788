// output_buffer: output reordering of the processor (the output MUX and
// delay elements), back to eight natural-order data paths.
//
// The third stage delivers 64 results per issue cycle: BU q (= k2) output
// k3 for first-stage output g (= k1) is bin k = g + R1*q + (N/8)*k3
// (R1 = 4, 2, 1 and N/8 = 32, 16, 8 for 256, 128, 64 points). They are
// written into one of two banks of NMAX entries; when the last group of a
// symbol is written (in_last) the bank is handed to the reader, which sends
// bin 8t+p on path p in cycle t = 0..N/8-1, mirroring the input order.
// For an IFFT the imaginary parts are negated (complex conjugate); no 1/N
// scaling is applied. Results are cut from IW to OW bits, which holds the
// largest possible N-point result (N*sqrt2*2^(DW-1)). out_first marks t = 0.
// If a symbol completes while both banks are still full it is dropped and
// the sticky overflow flag is raised; a size change to a smaller size needs
// a gap of the larger symbol's length on the input to avoid this. Registered
// outputs: the first beat leaves two cycles after the last write. The
// document shows this reordering only as muxes and delays; the banked
// store and the natural output order are this design's choices.
module output_buffer
  import fft_pkg::*;
#(
  parameter int IW = 27,
  parameter int OW = 25
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [1:0]           in_g,
  input  logic                 in_last,
  input  fft_size_e            in_size,
  input  logic                 in_ifft,
  input  logic signed [IW-1:0] in_re  [8][8],   // [q][k3]
  input  logic signed [IW-1:0] in_im  [8][8],
  output logic                 out_valid,
  output logic                 out_first,
  output fft_size_e            out_size,
  output logic signed [OW-1:0] out_re [NPATH],
  output logic signed [OW-1:0] out_im [NPATH],
  output logic                 overflow
);

  logic signed [OW-1:0] mem_re [2][NMAX];
  logic signed [OW-1:0] mem_im [2][NMAX];
  fft_size_e            bank_size [2];
  logic                 bank_ifft [2];
  logic [1:0]           full;
  logic                 wb, rb, reading;
  logic [4:0]           t;
  logic [4:0]           t_last;
  int unsigned          r1, nb;

  always_comb begin
    r1     = stage1_radix(in_size);
    nb     = sym_cycles(in_size);
    t_last = 5'(sym_cycles(bank_size[rb]) - 1);
  end

  // writer
  always_ff @(posedge clk) begin
    if (in_valid && !full[wb]) begin
      for (int q = 0; q < 8; q++) begin
        for (int k3 = 0; k3 < 8; k3++) begin
          mem_re[wb][8'(int'(in_g) + r1 * q + nb * k3)] <= OW'(in_re[q][k3]);
          mem_im[wb][8'(int'(in_g) + r1 * q + nb * k3)] <= OW'(in_im[q][k3]);
        end
      end
      bank_size[wb] <= in_size;
      bank_ifft[wb] <= in_ifft;
    end
  end

  logic       wr_done, rd_done;
  logic [1:0] full_nxt;

  always_comb begin
    wr_done  = in_valid && in_last && !full[wb];
    rd_done  = reading && (t == t_last);
    full_nxt = full;
    if (wr_done) full_nxt[wb] = 1'b1;
    if (rd_done) full_nxt[rb] = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full      <= '0;
      wb        <= 1'b0;
      rb        <= 1'b0;
      reading   <= 1'b0;
      t         <= '0;
      overflow  <= 1'b0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_size  <= SZ_256;
    end else begin
      full <= full_nxt;
      if (in_valid && full[wb]) overflow <= 1'b1;
      if (wr_done) wb <= ~wb;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      if (reading) begin
        out_valid <= 1'b1;
        out_first <= (t == 5'd0);
        out_size  <= bank_size[rb];
        if (rd_done) begin
          // the other bank follows without a gap if it is already full
          t       <= '0;
          reading <= full_nxt[~rb];
          rb      <= ~rb;
        end else begin
          t <= t + 5'd1;
        end
      end else if (full[rb]) begin
        reading <= 1'b1;
        t       <= '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (reading) begin
      for (int p = 0; p < NPATH; p++) begin
        out_re[p] <= mem_re[rb][8 * t + 5'(p)];
        out_im[p] <= bank_ifft[rb] ? -mem_im[rb][8 * t + 5'(p)] : mem_im[rb][8 * t + 5'(p)];
      end
    end
  end

endmodule

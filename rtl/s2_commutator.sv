// s2_commutator: delay commutator between the first and second stage.
//
// A second-stage radix-8 BU combines, for one data path p and one
// first-stage output k1, the eight values with n2 = 0..7. These leave the
// first stage of path p one row m at a time, so they are collected here:
//   256 points: row m gives (k1 = 0..3, n2 = m); full after m = 7, 4 groups.
//   128 points: row m gives BU outputs 0,1 -> (k1 = 0,1, n2 = m) and
//               outputs 2,3 -> (k1 = 0,1, n2 = m+4); full after m = 3, 2 groups.
//    64 points: row m gives (k1 = 0, n2 = m); full after m = 7, 1 group.
// The store is double buffered: while one bank is issued to the radix-8 BUs,
// one group (k1 = g) per cycle on all eight paths at once, the next symbol
// fills the other. Output registered; the first group leaves one cycle
// after the row that filled the bank. The document shows delay commutators
// between the stages without their insides; the double-buffered register
// bank is this design's realisation.
module s2_commutator
  import fft_pkg::*;
#(
  parameter int W = 19
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [2:0]          in_m,
  input  logic                in_last,
  input  fft_size_e           in_size,
  input  logic                in_ifft,
  input  logic signed [W-1:0] in_re  [NPATH][4],
  input  logic signed [W-1:0] in_im  [NPATH][4],
  output logic                out_valid,
  output logic [1:0]          out_g,
  output logic                out_last,
  output fft_size_e           out_size,
  output logic                out_ifft,
  output logic signed [W-1:0] out_re [NPATH][8],
  output logic signed [W-1:0] out_im [NPATH][8]
);

  // bank, path, k1, n2
  logic signed [W-1:0] st_re [2][NPATH][4][8];
  logic signed [W-1:0] st_im [2][NPATH][4][8];
  fft_size_e           bank_size [2];
  logic                bank_ifft [2];

  logic       wb;          // bank being written
  logic       rb;          // bank being issued
  logic       issuing;
  logic [1:0] g;
  logic [1:0] g_last;

  always_comb g_last = 2'(stage1_radix(bank_size[rb]) - 1);

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int p = 0; p < NPATH; p++) begin
        case (in_size)
          SZ_256: begin
            for (int k = 0; k < 4; k++) begin
              st_re[wb][p][k][in_m] <= in_re[p][k];
              st_im[wb][p][k][in_m] <= in_im[p][k];
            end
          end
          SZ_128: begin
            st_re[wb][p][0][in_m]      <= in_re[p][0];
            st_im[wb][p][0][in_m]      <= in_im[p][0];
            st_re[wb][p][1][in_m]      <= in_re[p][1];
            st_im[wb][p][1][in_m]      <= in_im[p][1];
            st_re[wb][p][0][in_m + 4]  <= in_re[p][2];
            st_im[wb][p][0][in_m + 4]  <= in_im[p][2];
            st_re[wb][p][1][in_m + 4]  <= in_re[p][3];
            st_im[wb][p][1][in_m + 4]  <= in_im[p][3];
          end
          default: begin
            st_re[wb][p][0][in_m] <= in_re[p][0];
            st_im[wb][p][0][in_m] <= in_im[p][0];
          end
        endcase
      end
      bank_size[wb] <= in_size;
      bank_ifft[wb] <= in_ifft;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb        <= 1'b0;
      rb        <= 1'b0;
      issuing   <= 1'b0;
      g         <= '0;
      out_valid <= 1'b0;
      out_g     <= '0;
      out_last  <= 1'b0;
      out_size  <= SZ_256;
      out_ifft  <= 1'b0;
    end else begin
      if (in_valid && in_last) wb <= ~wb;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      if (issuing) begin
        out_valid <= 1'b1;
        out_g     <= g;
        out_last  <= (g == g_last);
        out_size  <= bank_size[rb];
        out_ifft  <= bank_ifft[rb];
        if (g == g_last) begin
          g       <= '0;
          rb      <= ~rb;
          issuing <= in_valid && in_last;
        end else begin
          g <= g + 2'd1;
        end
      end else if (in_valid && in_last) begin
        issuing <= 1'b1;
        g       <= '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (issuing) begin
      for (int p = 0; p < NPATH; p++) begin
        for (int n = 0; n < 8; n++) begin
          out_re[p][n] <= st_re[rb][p][g][n];
          out_im[p][n] <= st_im[rb][p][g][n];
        end
      end
    end
  end

endmodule

// tb_s2_commutator: checks the commutator between the first and second
// stage. Rows of first-stage results (valid, m, last, size) are written as
// the first stage produces them; each issued group g must hold, on path p,
// element n2: row n2 output g (256 and 64 points), or row n2 output g for
// n2 < 4 and row n2-4 output g+2 for n2 >= 4 (128 points). Groups must come
// one per clock starting the clock after the last row, R1 of them (4, 2, 1),
// with out_last on the final one, also when the next symbol's rows are
// already being written.
module tb_s2_commutator;
  import fft_pkg::*;
  localparam int W = 19;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_last = 1'b0, in_ifft = 1'b0;
  logic [2:0] in_m = '0;
  fft_size_e in_size = SZ_256;
  logic signed [W-1:0] in_re [NPATH][4], in_im [NPATH][4];
  logic out_valid, out_last, out_ifft;
  logic [1:0] out_g;
  fft_size_e out_size;
  logic signed [W-1:0] out_re [NPATH][8], out_im [NPATH][8];

  s2_commutator #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  // rows of the symbols in flight: [symbol][row][path][output]
  int        rr [4][8][NPATH][4], ri [4][8][NPATH][4];
  fft_size_e sz [4];
  bit        inv [4];
  int        wr_ptr = 0, rd_ptr = 0, grp = 0;
  longint    cycle = 0, last_row_cycle [4];

  always @(posedge clk) cycle <= cycle + 1;

  task automatic send(fft_size_e s, bit ifft, int gap);
    int w = wr_ptr % 4;
    int rows = (s == SZ_128) ? 4 : 8;
    sz[w] = s;
    inv[w] = ifft;
    wr_ptr++;
    for (int m = 0; m < rows; m++) begin
      in_valid <= 1'b1;
      in_m     <= 3'(m);
      in_last  <= (m == rows - 1);
      in_size  <= s;
      in_ifft  <= ifft;
      for (int p = 0; p < NPATH; p++)
        for (int k = 0; k < 4; k++) begin
          rr[w][m][p][k] = int'($signed(19'($urandom)));
          ri[w][m][p][k] = int'($signed(19'($urandom)));
          in_re[p][k] <= W'(rr[w][m][p][k]);
          in_im[p][k] <= W'(ri[w][m][p][k]);
        end
      @(posedge clk);
      if (gap > 0) begin
        in_valid <= 1'b0;
        repeat (gap) @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    in_last  <= 1'b0;
  endtask

  // the cycle (seen on the falling edge) in which the last row is offered
  always @(negedge clk) if (in_valid && in_last) last_row_cycle[(wr_ptr - 1) % 4] = cycle;

  always @(negedge clk) begin
    if (out_valid) begin
      int r, ng, er, ei;
      r  = rd_ptr % 4;
      ng = int'(stage1_radix(sz[r]));
      checks++;
      if (rd_ptr >= wr_ptr || int'(out_g) != grp || out_size != sz[r] || out_ifft != inv[r] ||
          out_last != (grp == ng - 1) || cycle != last_row_cycle[r] + longint'(grp) + 2) begin
        failures++;
        $display("FAIL: group %0d of symbol %0d: g %0d size %0d last %0d at cycle %0d",
                 grp, rd_ptr, out_g, out_size, out_last, cycle);
      end
      for (int p = 0; p < NPATH; p++)
        for (int n = 0; n < 8; n++) begin
          if (sz[r] == SZ_128 && n >= 4) begin
            er = rr[r][n-4][p][grp+2];
            ei = ri[r][n-4][p][grp+2];
          end else begin
            er = rr[r][n][p][grp];
            ei = ri[r][n][p][grp];
          end
          checks++;
          if (int'(out_re[p][n]) != er || int'(out_im[p][n]) != ei) begin
            failures++;
            if (failures < 10) $display("FAIL: sym %0d g %0d p %0d n %0d got %0d expected %0d",
                                        rd_ptr, grp, p, n, out_re[p][n], er);
          end
        end
      grp++;
      if (grp == ng) begin
        grp = 0;
        rd_ptr++;
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NPATH; p++)
      for (int k = 0; k < 4; k++) begin
        in_re[p][k] = '0; in_im[p][k] = '0;
      end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    send(SZ_256, 1'b0, 3);
    send(SZ_128, 1'b1, 3);
    send(SZ_64, 1'b0, 0);     // 64-point rows back to back
    send(SZ_64, 1'b1, 0);
    send(SZ_256, 1'b1, 0);    // next symbol starts while groups issue
    send(SZ_128, 1'b0, 0);
    send(SZ_64, 1'b0, 0);
    repeat (10) @(posedge clk);
    checks++;
    if (rd_ptr != wr_ptr) begin
      failures++;
      $display("FAIL: %0d symbols not issued", wr_ptr - rd_ptr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

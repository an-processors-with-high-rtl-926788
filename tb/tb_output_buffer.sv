// tb_output_buffer: checks the output reordering. Third-stage groups are
// written as the pipeline delivers them, with input (q, k3) of group g
// carrying a value unique to bin k = g + R1*q + (N/8)*k3. The reader must
// send bin 8t+p on path p at beat t, N/8 beats per symbol without a gap,
// out_first on beat 0, the size tag, conjugated imaginary parts for an
// IFFT, consecutive symbols back to back, and a sticky overflow when a
// symbol completes while both banks are full.
module tb_output_buffer;
  import fft_pkg::*;
  localparam int IW = 27, OW = 25;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_last = 1'b0, in_ifft = 1'b0;
  logic [1:0] in_g = '0;
  fft_size_e in_size = SZ_256;
  logic signed [IW-1:0] in_re [8][8], in_im [8][8];
  logic out_valid, out_first, overflow;
  fft_size_e out_size;
  logic signed [OW-1:0] out_re [NPATH], out_im [NPATH];

  output_buffer #(.IW(IW), .OW(OW)) dut (.*);

  always #5 clk = ~clk;

  fft_size_e sz [8];
  bit        inv [8];
  int        wr_ptr = 0, rd_ptr = 0, beat = 0, n_b2b = 0;
  bit        prev_valid = 1'b0, check_on = 1'b1;

  function automatic int val_re(int sym, int k);
    return 1000 * (sym % 8) + k - 4000;
  endfunction
  function automatic int val_im(int sym, int k);
    return -3 * k - 7 * (sym % 8) + 5;
  endfunction

  task automatic send(fft_size_e s, bit ifft, int gap_after);
    int r1 = int'(stage1_radix(s));
    int nb = int'(sym_cycles(s));
    sz[wr_ptr % 8]  = s;
    inv[wr_ptr % 8] = ifft;
    for (int g = 0; g < r1; g++) begin
      in_valid <= 1'b1;
      in_g     <= 2'(g);
      in_last  <= (g == r1 - 1);
      in_size  <= s;
      in_ifft  <= ifft;
      for (int q = 0; q < 8; q++)
        for (int k3 = 0; k3 < 8; k3++) begin
          in_re[q][k3] <= IW'(val_re(wr_ptr, g + r1 * q + nb * k3));
          in_im[q][k3] <= IW'(val_im(wr_ptr, g + r1 * q + nb * k3));
        end
      @(posedge clk);
    end
    wr_ptr++;
    in_valid <= 1'b0;
    in_last  <= 1'b0;
    repeat (gap_after) @(posedge clk);
  endtask

  always @(negedge clk) begin
    prev_valid <= out_valid;
    if (out_valid && check_on) begin
      int r, ei;
      r = rd_ptr % 8;
      checks++;
      if (out_first != (beat == 0) || out_size != sz[r] || rd_ptr >= wr_ptr) begin
        failures++;
        $display("FAIL: beat %0d of symbol %0d: first %0d size %0d", beat, rd_ptr, out_first, out_size);
      end
      if (beat == 0 && prev_valid) n_b2b++;
      for (int p = 0; p < NPATH; p++) begin
        ei = inv[r] ? -val_im(rd_ptr, 8 * beat + p) : val_im(rd_ptr, 8 * beat + p);
        checks++;
        if (int'(out_re[p]) != val_re(rd_ptr, 8 * beat + p) || int'(out_im[p]) != ei) begin
          failures++;
          if (failures < 10) $display("FAIL: sym %0d beat %0d p %0d got (%0d,%0d)", rd_ptr, beat, p,
                                      out_re[p], out_im[p]);
        end
      end
      beat++;
      if (beat == int'(sym_cycles(sz[r]))) begin
        beat = 0;
        rd_ptr++;
      end
    end else if (check_on && beat != 0) begin
      failures++;
      $display("FAIL: gap inside an output symbol");
      beat = 0;
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
    for (int q = 0; q < 8; q++)
      for (int k = 0; k < 8; k++) begin
        in_re[q][k] = '0; in_im[q][k] = '0;
      end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // symbols spaced as the input rate allows: N/8 cycles each
    send(SZ_256, 1'b0, 28);
    send(SZ_256, 1'b1, 28);
    send(SZ_128, 1'b0, 40);
    send(SZ_128, 1'b1, 14);
    send(SZ_64, 1'b0, 40);
    send(SZ_64, 1'b1, 7);
    send(SZ_64, 1'b0, 7);
    repeat (60) @(posedge clk);
    checks++;
    if (rd_ptr != wr_ptr || overflow) begin
      failures++;
      $display("FAIL: %0d symbols missing, overflow %0d", wr_ptr - rd_ptr, overflow);
    end
    checks++;
    if (n_b2b == 0) begin
      failures++;
      $display("FAIL: no back-to-back output symbols");
    end
    // three symbols at once: the third finds both banks full
    check_on = 1'b0;
    send(SZ_256, 1'b0, 0);
    send(SZ_64, 1'b0, 0);
    send(SZ_64, 1'b0, 0);
    @(posedge clk);
    checks++;
    if (!overflow) begin
      failures++;
      $display("FAIL: overflow not flagged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

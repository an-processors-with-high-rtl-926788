// tb_input_buffer: checks the first-stage input reordering. Random symbols
// of 256, 128 and 64 points, FFT and IFFT, some with idle cycles, are fed
// eight samples per valid cycle (path p gets x(8t+p)). Every BU operand set
// is compared with the expected samples: x(n+64i), i = 0..3 (256 points),
// x(n), x(n+64), x(n+32), x(n+96) (128 points), or x(n) alone (64 points),
// n = 8m+p, conjugated for an IFFT. Also checked: 8, 4 or 8 sets per
// symbol, rows m in order, bu_last on the final set, and that the 256-point
// sets come in the last 8 of the 32 input cycles (idle period 0..23).
module tb_input_buffer;
  import fft_pkg::*;
  localparam int DW = 16;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, sel_ifft = 1'b0;
  logic signed [DW-1:0] in_re [NPATH], in_im [NPATH];
  fft_size_e fft_size = SZ_256;
  logic bu_valid, bu_last, bu_ifft;
  logic [2:0] bu_m;
  fft_size_e bu_size;
  logic signed [DW-1:0] bu_re [NPATH][4], bu_im [NPATH][4];

  input_buffer #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;

  // symbols in flight
  int        xr [4][NMAX], xi [4][NMAX];
  fft_size_e sz [4];
  bit        inv [4];
  int        wr_ptr = 0, rd_ptr = 0, fires = 0, beats_in = 0;

  function automatic int conj_im(int v, bit c);
    if (!c) return v;
    return (v == -32768) ? 32767 : -v;
  endfunction

  task automatic send(fft_size_e s, bit ifft, int gap_pct);
    int n = 8 * int'(sym_cycles(s));
    int w = wr_ptr % 4;
    for (int i = 0; i < n; i++) begin
      xr[w][i] = int'($signed(16'($urandom)));
      xi[w][i] = (i == 5) ? -32768 : int'($signed(16'($urandom)));
    end
    sz[w]  = s;
    inv[w] = ifft;
    wr_ptr++;
    for (int t = 0; t < n / 8; t++) begin
      if (t > 0 && ($urandom % 100) < gap_pct) begin
        in_valid <= 1'b0;
        repeat (1 + $urandom % 2) @(posedge clk);
      end
      in_valid <= 1'b1;
      fft_size <= s;
      sel_ifft <= ifft;
      for (int p = 0; p < NPATH; p++) begin
        in_re[p] <= DW'(xr[w][8*t+p]);
        in_im[p] <= DW'(xi[w][8*t+p]);
      end
      @(posedge clk);
      fft_size <= fft_size_e'((int'(s) + 1) % 3);
      sel_ifft <= ~ifft;
    end
    in_valid <= 1'b0;
  endtask

  // count valid input beats of the symbol being filled (no-gap timing check)
  always @(posedge clk) if (in_valid) beats_in <= beats_in + 1;

  always @(negedge clk) begin
    if (bu_valid) begin
      int r, n, nfire, idx [4];
      r     = rd_ptr % 4;
      nfire = (sz[r] == SZ_128) ? 4 : 8;
      checks++;
      if (rd_ptr >= wr_ptr || bu_size != sz[r] || bu_ifft != inv[r] || int'(bu_m) != fires ||
          bu_last != (fires == nfire - 1)) begin
        failures++;
        $display("FAIL: set %0d of symbol %0d: size %0d m %0d last %0d", fires, rd_ptr,
                 bu_size, bu_m, bu_last);
      end
      for (int p = 0; p < NPATH; p++) begin
        n = 8 * int'(bu_m) + p;
        case (sz[r])
          SZ_256:  idx = '{n, n + 64, n + 128, n + 192};
          SZ_128:  idx = '{n, n + 64, n + 32, n + 96};
          default: idx = '{n, -1, -1, -1};
        endcase
        for (int i = 0; i < 4; i++) begin
          int er, ei;
          er = (idx[i] < 0) ? 0 : xr[r][idx[i]];
          ei = (idx[i] < 0) ? 0 : conj_im(xi[r][idx[i]], inv[r]);
          checks++;
          if (int'(bu_re[p][i]) != er || int'(bu_im[p][i]) != ei) begin
            failures++;
            if (failures < 10) $display("FAIL: sym %0d m %0d p %0d i %0d got (%0d,%0d) expected (%0d,%0d)",
                                        rd_ptr, bu_m, p, i, bu_re[p][i], bu_im[p][i], er, ei);
          end
        end
      end
      fires++;
      if (fires == nfire) begin
        fires = 0;
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
    int c0;
    for (int p = 0; p < NPATH; p++) begin
      in_re[p] = '0; in_im[p] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // 256 points without gaps: the first set must follow input beat 25
    c0 = beats_in;
    fork
      send(SZ_256, 1'b0, 0);
      begin
        @(negedge clk iff bu_valid);
        checks++;
        if (beats_in - c0 != 25) begin
          failures++;
          $display("FAIL: first operand set after %0d beats, expected 25", beats_in - c0);
        end
      end
    join
    send(SZ_128, 1'b0, 0);
    send(SZ_64, 1'b0, 0);
    send(SZ_256, 1'b1, 0);
    send(SZ_128, 1'b1, 30);
    send(SZ_64, 1'b1, 30);
    send(SZ_256, 1'b0, 20);
    send(SZ_64, 1'b0, 0);
    send(SZ_128, 1'b0, 0);
    repeat (5) @(posedge clk);
    checks++;
    if (rd_ptr != wr_ptr) begin
      failures++;
      $display("FAIL: %0d symbols incomplete", wr_ptr - rd_ptr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

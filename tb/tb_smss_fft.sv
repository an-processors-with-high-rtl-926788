// tb_smss_fft: end-to-end test of the eight-parallel FFT/IFFT processor at its
// default widths (DW = TW = 16).
//
// Random full-scale symbols are sent in 256-, 128- and 64-point FFT and IFFT
// modes, back to back, with idle cycles inside symbols and with size
// changes. Each output bin is compared with a double-precision DFT
// computed here (X[k] = sum x[n] exp(-+j*2*pi*n*k/N), the IFFT unscaled);
// the tolerance is 20 + 1e-3 * ||x||. Also checked: the output size tag,
// N/8 consecutive output beats per symbol, a fixed latency from the last
// input beat to the first output beat (R1 + 8 cycles: 12, 10 and 9 for 256, 128 and 64 points, later only if
// the previous symbol is still being sent), and that
// a symbol arriving while both output banks are full raises overflow.
// Every mechanism (radix-4, two radix-2, bypass, IFFT, input gaps,
// back-to-back symbols, size switch, overflow) must occur at least once.
module tb_smss_fft;
  import fft_pkg::*;

  localparam int DW = 16;
  localparam int WO = DW + 9;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 in_valid = 1'b0;
  logic signed [DW-1:0] in_re [NPATH];
  logic signed [DW-1:0] in_im [NPATH];
  fft_size_e            fft_size = SZ_256;
  logic                 sel_ifft = 1'b0;
  logic                 out_valid, out_first, overflow;
  fft_size_e            out_size;
  logic signed [WO-1:0] out_re [NPATH];
  logic signed [WO-1:0] out_im [NPATH];

  smss_fft dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef real spec_t [NMAX];
  // expected spectra of the symbols in flight, a ring of 8
  spec_t     exp_re_r [8];
  spec_t     exp_im_r [8];
  int        wr_ptr = 0, rd_ptr = 0;
  fft_size_e exp_sz_q [$];
  real       tol_q    [$];
  longint    last_in_q [$];

  // mechanism counters
  int n_r4 = 0, n_r2 = 0, n_byp = 0, n_ifft = 0, n_gap = 0, n_b2b = 0;
  int n_switch = 0, n_ovf = 0;
  fft_size_e prev_size = SZ_256;
  bit        first_sym = 1'b1;
  real       max_err = 0.0;

  function automatic int size_n(fft_size_e s);
    return 8 * int'(sym_cycles(s));
  endfunction

  task automatic send_symbol(fft_size_e s, bit ifft, int gap_pct);
    int    n = size_n(s);
    real   xr [NMAX], xi [NMAX];
    spec_t er, ei;
    real   e2 = 0.0, ang, sg;
    for (int i = 0; i < n; i++) begin
      xr[i] = real'($signed(16'($urandom)));
      xi[i] = real'($signed(16'($urandom)));
      e2 += xr[i] * xr[i] + xi[i] * xi[i];
    end
    sg = ifft ? 1.0 : -1.0;
    for (int k = 0; k < n; k++) begin
      er[k] = 0.0;
      ei[k] = 0.0;
      for (int i = 0; i < n; i++) begin
        ang = sg * 2.0 * 3.14159265358979323846 * real'((i * k) % n) / real'(n);
        er[k] += xr[i] * $cos(ang) - xi[i] * $sin(ang);
        ei[k] += xr[i] * $sin(ang) + xi[i] * $cos(ang);
      end
    end
    exp_re_r[wr_ptr % 8] = er;
    exp_im_r[wr_ptr % 8] = ei;
    wr_ptr++;
    exp_sz_q.push_back(s);
    tol_q.push_back(20.0 + 1.0e-3 * $sqrt(e2));
    case (s)
      SZ_256:  n_r4++;
      SZ_128:  n_r2++;
      default: n_byp++;
    endcase
    if (ifft) n_ifft++;
    if (!first_sym && s != prev_size) n_switch++;
    prev_size = s;
    first_sym = 1'b0;
    for (int t = 0; t < n / 8; t++) begin
      if (t > 0 && gap_pct > 0 && ($urandom % 100) < gap_pct) begin
        in_valid <= 1'b0;
        n_gap++;
        repeat (1 + $urandom % 3) @(posedge clk);
      end
      in_valid <= 1'b1;
      fft_size <= s;
      sel_ifft <= ifft;
      for (int p = 0; p < NPATH; p++) begin
        in_re[p] <= DW'(longint'(xr[8*t+p]));
        in_im[p] <= DW'(longint'(xi[8*t+p]));
      end
      @(posedge clk);
    end
    last_in_q.push_back(cycle - 1);
    in_valid <= 1'b0;
    // change the size/direction lines: only the first beat may count
    fft_size <= SZ_64;
    sel_ifft <= ~ifft;
  endtask

  task automatic idle(int n);
    in_valid <= 1'b0;
    repeat (n) @(posedge clk);
  endtask

  // output monitor
  spec_t     cur_re, cur_im;
  real       cur_tol;
  int        beat = 0, beats = 0;
  bit        in_sym = 1'b0;
  bit        prev_out_valid = 1'b0;
  bit        check_off = 1'b0;
  longint    prev_end = 0;
  int        k;
  real       dr, di, err;

  // sampled on the falling edge, half a cycle after the outputs change
  always @(negedge clk) begin
    prev_out_valid <= out_valid;
    if (rst_n && !check_off) begin
      if (in_sym && !out_valid) begin
        failures++;
        $display("FAIL: output beat missing inside a symbol at cycle %0d", cycle);
        in_sym = 1'b0;
      end
      if (out_valid) begin
        if (out_first) begin
          longint lat;
          longint exp_lat;
          if (in_sym) begin
            failures++;
            $display("FAIL: new symbol before the previous one ended");
          end
          if (prev_out_valid) n_b2b++;
          if (rd_ptr == wr_ptr) begin
            failures++;
            $display("FAIL: unexpected output symbol");
          end else begin
            fft_size_e es;
            cur_re  = exp_re_r[rd_ptr % 8];
            cur_im  = exp_im_r[rd_ptr % 8];
            rd_ptr++;
            cur_tol = tol_q.pop_front();
            es      = exp_sz_q.pop_front();
            beats   = int'(sym_cycles(es));
            lat     = cycle - last_in_q.pop_front();
            // pipeline latency R1 + 8, unless the previous symbol is still
            // being read out
            exp_lat = longint'(stage1_radix(es)) + 8;
            if (prev_end + 1 - (cycle - lat) > exp_lat) exp_lat = prev_end + 1 - (cycle - lat);
            checks++;
            if (out_size != es) begin
              failures++;
              $display("FAIL: size tag %0d, expected %0d", out_size, es);
            end
            checks++;
            if (lat != exp_lat) begin
              failures++;
              $display("FAIL: latency %0d cycles, expected %0d", lat, exp_lat);
            end
          end
          beat   = 0;
          in_sym = 1'b1;
        end
        if (in_sym) begin
          for (int p = 0; p < NPATH; p++) begin
            k   = 8 * beat + p;
            dr  = real'(out_re[p]) - cur_re[k];
            di  = real'(out_im[p]) - cur_im[k];
            err = $sqrt(dr * dr + di * di);
            if (err > max_err) max_err = err;
            checks++;
            if (err > cur_tol) begin
              failures++;
              if (failures < 20)
                $display("FAIL: bin %0d got (%0d,%0d) expected (%0.1f,%0.1f)",
                         k, out_re[p], out_im[p], cur_re[k], cur_im[k]);
            end
          end
          beat++;
          if (beat == beats) begin
            in_sym   = 1'b0;
            prev_end = cycle;
          end
        end else begin
          failures++;
          $display("FAIL: out_valid without out_first");
        end
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NPATH; p++) begin
      in_re[p] = '0;
      in_im[p] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    // back-to-back 256-point FFTs
    send_symbol(SZ_256, 1'b0, 0);
    send_symbol(SZ_256, 1'b0, 0);
    send_symbol(SZ_256, 1'b0, 0);
    idle(40);
    // 128-point, back to back, then 64-point
    send_symbol(SZ_128, 1'b0, 0);
    send_symbol(SZ_128, 1'b0, 0);
    idle(20);
    send_symbol(SZ_64, 1'b0, 0);
    send_symbol(SZ_64, 1'b0, 0);
    send_symbol(SZ_64, 1'b0, 0);
    // growing sizes need no gap
    send_symbol(SZ_128, 1'b1, 0);
    send_symbol(SZ_256, 1'b1, 0);
    idle(40);
    send_symbol(SZ_64, 1'b1, 0);
    idle(10);
    // idle cycles inside symbols
    send_symbol(SZ_256, 1'b0, 20);
    send_symbol(SZ_128, 1'b1, 30);
    idle(30);
    send_symbol(SZ_64, 1'b0, 40);
    idle(60);
    checks++;
    if (rd_ptr != wr_ptr || in_sym) begin
      failures++;
      $display("FAIL: %0d symbols never came out", wr_ptr - rd_ptr);
    end
    checks++;
    if (overflow) begin
      failures++;
      $display("FAIL: overflow raised in legal traffic");
    end
    // provoke an overflow: a long symbol followed at once by short ones
    check_off = 1'b1;
    send_symbol(SZ_256, 1'b0, 0);
    send_symbol(SZ_64, 1'b0, 0);
    send_symbol(SZ_64, 1'b0, 0);
    send_symbol(SZ_64, 1'b0, 0);
    idle(60);
    if (overflow) n_ovf++;
    $display("mechanisms: radix4=%0d radix2x2=%0d bypass=%0d ifft=%0d gaps=%0d back_to_back=%0d switch=%0d overflow=%0d",
             n_r4, n_r2, n_byp, n_ifft, n_gap, n_b2b, n_switch, n_ovf);
    $display("largest error %0.2f LSB", max_err);
    checks++; if (n_r4 == 0)     begin failures++; $display("FAIL: no radix-4 symbol"); end
    checks++; if (n_r2 == 0)     begin failures++; $display("FAIL: no radix-2 symbol"); end
    checks++; if (n_byp == 0)    begin failures++; $display("FAIL: no bypass symbol"); end
    checks++; if (n_ifft == 0)   begin failures++; $display("FAIL: no IFFT symbol"); end
    checks++; if (n_gap == 0)    begin failures++; $display("FAIL: no input gap"); end
    checks++; if (n_b2b == 0)    begin failures++; $display("FAIL: no back-to-back output"); end
    checks++; if (n_switch == 0) begin failures++; $display("FAIL: no size switch"); end
    checks++; if (n_ovf == 0)    begin failures++; $display("FAIL: overflow never flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

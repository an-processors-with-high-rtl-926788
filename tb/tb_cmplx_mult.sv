// tb_cmplx_mult: checks the complex multiplier (19-bit data, 16-bit
// factors with 14 fraction bits, 20-bit result) against a 64-bit integer
// model of round((a*w) / 2^14), on random operands and on unit factors,
// which must pass the operand unchanged.
module tb_cmplx_mult;
  localparam int AW = 19, BW = 16, FRAC = 14, OW = 20;
  int checks = 0, failures = 0;

  logic signed [AW-1:0] ar, ai;
  logic signed [BW-1:0] wr, wi;
  logic signed [OW-1:0] pr, pim;

  cmplx_mult #(.AW(AW), .BW(BW), .FRAC(FRAC), .OW(OW)) dut (
    .a_re(ar), .a_im(ai), .w_re(wr), .w_im(wi), .p_re(pr), .p_im(pim));

  task automatic check(logic signed [AW-1:0] a_r, logic signed [AW-1:0] a_i,
                       logic signed [BW-1:0] w_r, logic signed [BW-1:0] w_i);
    longint er, ei;
    ar = a_r; ai = a_i; wr = w_r; wi = w_i;
    #1;
    er = (longint'(a_r) * w_r - longint'(a_i) * w_i + (64'sd1 <<< (FRAC - 1))) >>> FRAC;
    ei = (longint'(a_r) * w_i + longint'(a_i) * w_r + (64'sd1 <<< (FRAC - 1))) >>> FRAC;
    checks++;
    if (longint'(pr) != er || longint'(pim) != ei) begin
      failures++;
      if (failures < 10)
        $display("FAIL: (%0d,%0d)*(%0d,%0d) = (%0d,%0d), got (%0d,%0d)",
                 a_r, a_i, w_r, w_i, er, ei, pr, pim);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [AW-1:0] x, y;
    for (int i = 0; i < 200; i++) begin
      x = AW'($urandom);
      y = AW'($urandom);
      check(x, y, 16'sd16384, 16'sd0);
      checks++;
      if (pr != OW'(x) || pim != OW'(y)) failures++;
      check(x, y, 16'sd0, -16'sd16384);
    end
    for (int i = 0; i < 3000; i++) begin
      logic signed [BW-1:0] r, q;
      r = BW'($signed(15'($urandom)) + 0);
      q = BW'($signed(15'($urandom)) + 0);
      check(AW'($urandom), AW'($urandom), r, q);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_vedic_mult: checks the Urdhva Tiryakbhyam multiplier against the
// language's own signed multiplication, for 19x16 bits (the width used
// after the first stage) and 8x8 bits, on the extreme operands and on
// 3000 random pairs per width.
module tb_vedic_mult;
  int checks = 0, failures = 0;

  logic signed [18:0] a1;
  logic signed [15:0] b1;
  logic signed [34:0] p1;
  logic signed [7:0]  a2, b2;
  logic signed [15:0] p2;

  vedic_mult #(.AW(19), .BW(16)) dut1 (.a(a1), .b(b1), .p(p1));
  vedic_mult #(.AW(8),  .BW(8))  dut2 (.a(a2), .b(b2), .p(p2));

  task automatic check1(logic signed [18:0] a, logic signed [15:0] b);
    longint ref_p;
    a1 = a; b1 = b;
    #1;
    ref_p = longint'(a) * longint'(b);
    checks++;
    if (longint'(p1) != ref_p) begin
      failures++;
      if (failures < 10) $display("FAIL: %0d * %0d = %0d, got %0d", a, b, ref_p, p1);
    end
  endtask

  task automatic check2(logic signed [7:0] a, logic signed [7:0] b);
    int ref_p;
    a2 = a; b2 = b;
    #1;
    ref_p = int'(a) * int'(b);
    checks++;
    if (int'(p2) != ref_p) begin
      failures++;
      if (failures < 10) $display("FAIL: %0d * %0d = %0d, got %0d", a, b, ref_p, p2);
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
    check1(19'sh40000, 16'sh8000);
    check1(19'sh3ffff, 16'sh7fff);
    check1(19'sh40000, 16'sh7fff);
    check1(0, 16'sh8000);
    check1(-1, -1);
    for (int i = 0; i < 3000; i++) check1(19'($urandom), 16'($urandom));
    check2(-128, -128);
    check2(127, -128);
    for (int i = 0; i < 3000; i++) check2(8'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

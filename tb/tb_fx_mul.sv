// tb_fx_mul: self-checking testbench of the fixed-point multiplier.
//
// Two instances, at the 16 x 16 width of the normal and square paths and the
// 13 x 16 width of the Rayleigh path, are fed random signed operands and the
// extreme values; their products must equal the 64-bit integer product here.
module tb_fx_mul;
  logic signed [15:0] a16, b16, c16;
  logic signed [12:0] a13;
  logic signed [31:0] p16;
  logic signed [28:0] p13;
  int checks = 0;
  int failures = 0;

  fx_mul #(.A_W(16), .B_W(16)) dut16 (.a(a16), .b(b16), .p(p16));
  fx_mul #(.A_W(13), .B_W(16)) dut13 (.a(a13), .b(c16), .p(p13));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic signed [15:0] x, logic signed [15:0] y,
                     logic signed [12:0] s, logic signed [15:0] z);
    longint w16, w13;
    a16 = x; b16 = y; a13 = s; c16 = z;
    #1;
    w16 = longint'(x) * longint'(y);
    w13 = longint'(s) * longint'(z);
    checks += 2;
    if (longint'(p16) != w16) begin
      failures++;
      $display("FAIL: %0d * %0d = %0d expected %0d", x, y, p16, w16);
    end
    if (longint'(p13) != w13) begin
      failures++;
      $display("FAIL: %0d * %0d = %0d expected %0d", s, z, p13, w13);
    end
  endtask

  initial begin
    run(16'sh7fff, 16'sh7fff, 13'sh0fff, 16'sh7fff);
    run(-16'sh8000, -16'sh8000, -13'sh1000, -16'sh8000);
    run(-16'sh8000, 16'sh7fff, 13'sh0fff, -16'sh8000);
    run(16'sh12d7, 16'sd6270, 13'sh0200, 16'sh12d7);
    for (int i = 0; i < 3000; i++) begin
      run(16'($urandom), 16'($urandom), 13'($urandom), 16'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

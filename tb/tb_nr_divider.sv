// tb_nr_divider: self-checking testbench of the 30-bit non-restoring divider.
//
// Random dividends and non-zero divisors, plus edge cases (smallest and
// largest divisor, zero and full-scale dividend, dividend smaller than the
// divisor), are applied; the quotient must equal integer division.
module tb_nr_divider;
  logic [29:0] n, q;
  logic [11:0] d;
  int checks = 0;
  int failures = 0;

  nr_divider dut (.n(n), .d(d), .q(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [29:0] x, logic [11:0] y);
    logic [29:0] want;
    n = x; d = y;
    #1;
    want = x / 30'(y);
    checks++;
    if (q != want) begin
      failures++;
      $display("FAIL: %0d / %0d = %0d expected %0d", x, y, q, want);
    end
  endtask

  initial begin
    run(30'd0, 12'd1);
    run('1, 12'd1);
    run('1, 12'hfff);
    run(30'd5, 12'd7);
    run(30'd279090436, 12'h200);
    for (int i = 0; i < 5000; i++) begin
      run(30'($urandom), 12'($urandom_range(1, 4095)));
    end
    for (int i = 0; i < 1000; i++) begin
      run(30'($urandom_range(0, 4095)), 12'($urandom_range(1, 4095)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

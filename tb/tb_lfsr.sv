// tb_lfsr: self-checking testbench of the 12-bit LFSR.
//
// Compares the register every cycle with a bit-level model written from the
// feedback polynomial x^12 + x^6 + x^4 + x + 1 (stage k is bit k-1, stage 1
// takes the feedback), checks the first states of the published trace
// (800, 001, 003, 007, 00f, 01e), that the state is never zero, and that the
// sequence visits all 4095 non-zero states and repeats after exactly 4095
// clocks.
module tb_lfsr;
  logic        clk = 1'b0;
  logic [11:0] q;
  int checks = 0;
  int failures = 0;

  lfsr dut (.clk(clk), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [11:0] model_next(logic [11:0] s);
    logic fb;
    fb = s[11] ^ s[5] ^ s[3] ^ s[0];   // stages 12, 6, 4, 1
    return {s[10:0], fb};
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [11:0] expect_q;
  logic [11:0] trace [6] = '{12'h800, 12'h001, 12'h003, 12'h007, 12'h00f, 12'h01e};
  bit          seen [4096];
  int          period;
  logic [11:0] start;

  initial begin
    expect_q = 12'h800;
    #1;
    for (int i = 0; i < 6; i++) begin
      check(q == trace[i], $sformatf("trace step %0d: q=%h expected %h", i, q, trace[i]));
      @(posedge clk); #1;
    end
    // restart the model from the current state and follow a full period
    expect_q = q;
    start    = q;
    period   = 0;
    foreach (seen[i]) seen[i] = 1'b0;
    do begin
      check(q == expect_q, $sformatf("q=%h model=%h", q, expect_q));
      check(q != 12'h000, "state is zero");
      check(!seen[q], $sformatf("state %h repeated before the period ended", q));
      seen[q] = 1'b1;
      expect_q = model_next(expect_q);
      @(posedge clk); #1;
      period++;
    end while (q != start && period < 5000);
    check(period == 4095, $sformatf("period %0d, expected 4095", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_lut_circuit: self-checking testbench of the two-term look-up circuit.
//
// Random U1/U2 values are applied each cycle; one clock later y1 must equal
// sqrt(-2 ln U1) in 4.12 and y2 sin(2 pi U2) in 2.14, to within one LSB of
// rounding, computed here with real arithmetic. The entries that the
// published simulation trace exposes are also checked exactly:
// y1(800)=12d7, y1(001)=4142, y1(003)=3ccc, y1(007)=391e, y1(00f)=3598 and
// y2(100)=6270, y2(200)=11585, y2(400)=16384, y2(800)=0, y2(001)=25.
module tb_lut_circuit;
  logic               clk = 1'b0;
  logic [11:0]        u1, u2;
  logic [15:0]        y1;
  logic signed [15:0] y2;
  int checks = 0;
  int failures = 0;
  int bank_hits [4];

  lut_circuit dut (.clk(clk), .u1(u1), .u2(u2), .y1(y1), .y2(y2));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit close(int got, real want);
    return (real'(got) - want) <= 1.0 && (want - real'(got)) <= 1.0;
  endfunction

  logic [11:0] p1 [5] = '{12'h800, 12'h001, 12'h003, 12'h007, 12'h00f};
  logic [15:0] e1 [5] = '{16'h12d7, 16'h4142, 16'h3ccc, 16'h391e, 16'h3598};
  logic [11:0] p2 [5] = '{12'h100, 12'h200, 12'h400, 12'h800, 12'h001};
  int          e2 [5] = '{6270, 11585, 16384, 0, 25};

  initial begin
    logic [11:0] a1, a2;
    real w1, w2;
    for (int i = 0; i < 5; i++) begin
      u1 = p1[i]; u2 = p2[i];
      @(posedge clk); #1;
      check(y1 == e1[i], $sformatf("y1(%h)=%h expected %h", p1[i], y1, e1[i]));
      check(int'(y2) == e2[i], $sformatf("y2(%h)=%0d expected %0d", p2[i], y2, e2[i]));
    end
    for (int i = 0; i < 4000; i++) begin
      a1 = 12'($urandom_range(1, 4095));
      a2 = 12'($urandom_range(0, 4095));
      u1 = a1; u2 = a2;
      bank_hits[a1[1:0]]++;
      @(posedge clk); #1;
      w1 = $sqrt(-2.0 * $ln(real'(a1) / 4096.0)) * 4096.0;
      w2 = $sin(2.0 * 3.141592653589793 * real'(a2) / 4096.0) * 16384.0;
      check(close(int'(y1), w1), $sformatf("y1(%h)=%0d expected %f", a1, y1, w1));
      check(close(int'(y2), w2), $sformatf("y2(%h)=%0d expected %f", a2, y2, w2));
    end
    foreach (bank_hits[b]) check(bank_hits[b] > 0, $sformatf("bank %0d never selected", b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

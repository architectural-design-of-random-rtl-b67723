// tb_lut_bram: self-checking testbench of one 1k x 16 table bank.
//
// Two banks are instantiated, bank 1 of the sqrt(-2 ln u) table and bank 3
// of the sin(2 pi u) table. Every word is read in turn, with the address
// changed each cycle; each result must appear exactly one clock after its
// address and equal, to within one LSB of rounding, the value computed here
// with real arithmetic for table index 4*addr + bank.
module tb_lut_bram;
  import rng_pkg::*;
  logic        clk = 1'b0;
  logic [9:0]  addr;
  logic [15:0] dout_ln;
  logic [15:0] dout_sin;
  int checks = 0;
  int failures = 0;

  lut_bram #(.FUNC(SQRT_LN), .BANK(1)) dut_ln  (.clk(clk), .addr(addr), .dout(dout_ln));
  lut_bram #(.FUNC(SIN_2PI), .BANK(3)) dut_sin (.clk(clk), .addr(addr), .dout(dout_sin));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_close(int got, real want, string what);
    checks++;
    if ((real'(got) - want) > 1.0 || (want - real'(got)) > 1.0) begin
      failures++;
      $display("FAIL: %s got %0d expected %f", what, got, want);
    end
  endtask

  initial begin
    real u;
    addr = 10'd0;
    @(posedge clk); #1;
    for (int a = 0; a < 1024; a++) begin
      addr = 10'((a + 1) % 1024);   // next address already applied
      u = real'(4 * a + 1) / 4096.0;
      check_close(int'(dout_ln), $sqrt(-2.0 * $ln(u)) * 4096.0, $sformatf("sqrt-ln bank1 word %0d", a));
      u = real'(4 * a + 3) / 4096.0;
      check_close(int'($signed(dout_sin)), $sin(2.0 * 3.141592653589793 * u) * 16384.0,
                  $sformatf("sin bank3 word %0d", a));
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

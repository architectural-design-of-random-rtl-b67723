// tb_rng_top: end-to-end self-checking testbench of the generator.
//
// Runs the generator at its default parameters for two full LFSR periods
// (8190 clocks). A reference model written here steps its own copies of the
// two LFSRs, evaluates sqrt(-2 ln U1) and sin(2 pi U2) with real arithmetic
// rounded to 4.12 and 2.14, and forms the four samples; every clock all four
// outputs must match it exactly, with the uniform output one clock ahead of
// the other three.
//
// The first five clocks, with lambda = sigma = 2, must reproduce the
// published simulation trace: uniform 001 003 007 00f 01e; normal 01cd6dd2
// 0b892bc2 0f330000 00000000 00053bd8; rayleigh 0025ae00 00828400 00799800
// 00723c00 006b3000; exponential 0000b178 at the first and 00065f2f at the
// fourth clock.
//
// Lambda and sigma change every 1000 clocks. The test counts, and fails if
// any never happened: LFSR wrap-around, each of the four RAM banks selected
// in both tables, negative and positive normal samples, lambda/sigma
// changes, and one new sample of every distribution per clock.
module tb_rng_top;
  logic               clk = 1'b0;
  logic [11:0]        lamda;
  logic [12:0]        sigma;
  logic [11:0]        uniform;
  logic signed [31:0] normal;
  logic [29:0]        exponential;
  logic [28:0]        rayleigh;

  int checks = 0;
  int failures = 0;

  rng_top dut (
    .clk(clk), .lamda(lamda), .sigma(sigma),
    .uniform(uniform), .normal(normal), .exponential(exponential), .rayleigh(rayleigh)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic logic [11:0] lfsr_next(logic [11:0] s);
    return {s[10:0], s[11] ^ s[5] ^ s[3] ^ s[0]};
  endfunction

  function automatic longint ref_y1(logic [11:0] u);
    return longint'($floor($sqrt(-2.0 * $ln(real'(u) / 4096.0)) * 4096.0 + 0.5));
  endfunction

  function automatic longint ref_y2(logic [11:0] u);
    return longint'($floor($sin(2.0 * 3.141592653589793 * real'(u) / 4096.0) * 16384.0 + 0.5));
  endfunction

  // published trace, lambda = sigma = 2
  logic [11:0] tr_uni  [5] = '{12'h001, 12'h003, 12'h007, 12'h00f, 12'h01e};
  logic [31:0] tr_norm [5] = '{32'h01cd6dd2, 32'h0b892bc2, 32'h0f330000, 32'h00000000, 32'h00053bd8};
  logic [28:0] tr_rayl [5] = '{29'h0025ae00, 29'h00828400, 29'h00799800, 29'h00723c00, 29'h006b3000};

  logic [11:0] lam_set [8] = '{12'h200, 12'h100, 12'h080, 12'h001, 12'hfff, 12'h333, 12'h01a, 12'h7c0};
  logic [12:0] sig_set [8] = '{13'h0200, 13'h0100, 13'h1fff, 13'h0001, 13'h0080, 13'h0555, 13'h0a00, 13'h0fff};

  initial begin
    logic [11:0] m1, m2, p1, p2;
    longint y1, y2, sq, w_norm, w_exp, w_rayl;
    int wraps, neg_norm, pos_norm, param_changes, samples;
    int bank1 [4];
    int bank2 [4];
    logic [11:0] prev_uni;

    lamda = 12'h200;
    sigma = 13'h0200;
    m1 = 12'h800;           // model LFSR states, power-up values
    m2 = 12'h100;
    wraps = 0; neg_norm = 0; pos_norm = 0; param_changes = 0; samples = 0;
    #1;
    check(uniform == m1, $sformatf("power-up uniform %h", uniform));
    prev_uni = uniform;

    for (int c = 0; c < 8190; c++) begin
      p1 = m1; p2 = m2;                       // values the tables are reading
      bank1[p1[1:0]]++;
      bank2[p2[1:0]]++;
      m1 = lfsr_next(m1);
      m2 = lfsr_next(m2);
      @(posedge clk); #1;
      samples++;

      y1 = ref_y1(p1);
      y2 = ref_y2(p2);
      sq = y1 * y1;
      w_norm = y1 * y2;
      w_exp  = ((sq >> 1) << 1) / longint'(lamda);
      w_rayl = longint'($signed(sigma)) * y1;

      check(uniform == m1, $sformatf("uniform %h expected %h", uniform, m1));
      check(uniform != prev_uni, "uniform did not advance");
      prev_uni = uniform;
      check(longint'(normal) == w_norm, $sformatf("normal %h expected %h (U1=%h U2=%h)", normal, w_norm, p1, p2));
      check(longint'(exponential) == w_exp, $sformatf("exponential %h expected %h (U1=%h lambda=%h)", exponential, w_exp, p1, lamda));
      check(longint'($signed(rayleigh)) == w_rayl, $sformatf("rayleigh %h expected %h", rayleigh, w_rayl));
      if (normal < 0) neg_norm++;
      if (normal > 0) pos_norm++;
      if (m1 == 12'h800) wraps++;

      if (c < 5) $display("trace %0d: %h %h %h %h", c, uniform, normal, exponential, rayleigh);
      if (c < 5) begin
        check(uniform == tr_uni[c], $sformatf("trace %0d uniform %h", c, uniform));
        check(normal == tr_norm[c], $sformatf("trace %0d normal %h", c, normal));
        check(rayleigh == tr_rayl[c], $sformatf("trace %0d rayleigh %h", c, rayleigh));
        if (c == 0) check(exponential == 30'h0000b178, $sformatf("trace 0 exponential %h", exponential));
        if (c == 3) check(exponential == 30'h00065f2f, $sformatf("trace 3 exponential %h", exponential));
      end

      // new lambda/sigma take effect for the next sample (outputs after the
      // tables are combinational)
      if (c % 1000 == 999) begin
        lamda = lam_set[((c + 1) / 1000) % 8];
        sigma = sig_set[((c + 1) / 1000) % 8];
        param_changes++;
        #1;
        w_exp  = ((sq >> 1) << 1) / longint'(lamda);
        w_rayl = longint'($signed(sigma)) * y1;
        check(longint'(exponential) == w_exp, "exponential after lambda change");
        check(longint'($signed(rayleigh)) == w_rayl, "rayleigh after sigma change");
      end
    end

    $display("samples=%0d wraps=%0d negative_normal=%0d positive_normal=%0d param_changes=%0d",
             samples, wraps, neg_norm, pos_norm, param_changes);
    $display("bank hits U1: %0d %0d %0d %0d  U2: %0d %0d %0d %0d",
             bank1[0], bank1[1], bank1[2], bank1[3], bank2[0], bank2[1], bank2[2], bank2[3]);
    check(samples == 8190, "one sample per clock");
    check(wraps == 2, $sformatf("LFSR wrapped %0d times, expected 2", wraps));
    check(neg_norm > 0, "no negative normal sample");
    check(pos_norm > 0, "no positive normal sample");
    check(param_changes > 0, "lambda/sigma never changed");
    foreach (bank1[b]) check(bank1[b] > 0 && bank2[b] > 0, $sformatf("bank %0d never selected", b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

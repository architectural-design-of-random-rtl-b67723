// tb_rng_chisq: goodness-of-fit test of the four generated distributions.
//
// Runs the generator at its default parameters with lambda = 2 and
// sigma = 2, collects 1000 consecutive samples of each distribution and
// applies Pearson's chi-square test at the 5% significance level, with
// equiprobable nbins: 6 nbins (5 degrees of freedom) for the uniform and
// normal outputs, 7 nbins (6 degrees of freedom) for the exponential and
// Rayleigh outputs. Bin edges are the theoretical quantiles:
//   uniform      k/6
//   normal       Phi^-1(k/6) = +-0.96742, +-0.43073, 0
//   exponential  -ln(1 - k/7) / lambda
//   Rayleigh     sigma * sqrt(-2 ln(1 - k/7))
// A statistic above the critical value (11.070 for 5, 12.592 for 6 degrees
// of freedom) counts as a failure. Sample means are printed as well.
module tb_rng_chisq;
  localparam int N = 1000;

  logic               clk = 1'b0;
  logic [11:0]        lamda = 12'h200;    // 2.0 in 4.8
  logic [12:0]        sigma = 13'h0200;   // 2.0 in 5.8
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
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real su [N];
  real sn [N];
  real se [N];
  real sr [N];

  // Pearson statistic; prob[b] is the expected fraction of bin b, or all
  // bins are equiprobable when prob is empty
  function automatic real chisq(real s [N], real edges [], int nbins, real prob []);
    int  cnt [];
    real e, x;
    int  k;
    cnt = new[nbins];
    foreach (s[i]) begin
      k = 0;
      while (k < nbins - 1 && s[i] >= edges[k]) k++;
      cnt[k]++;
    end
    x = 0.0;
    foreach (cnt[b]) begin
      e = real'(N) * ((prob.size() == 0) ? 1.0 / real'(nbins) : prob[b]);
      x += (real'(cnt[b]) - e) * (real'(cnt[b]) - e) / e;
    end
    return x;
  endfunction

  task automatic judge(string name, real stat, int dof, real crit, real s [N]);
    real mean;
    mean = 0.0;
    foreach (s[i]) mean += s[i];
    mean /= real'(N);
    $display("%-12s dof=%0d chi2=%7.3f critical=%6.3f mean=%8.4f %s", name, dof, stat, crit,
             mean, (stat <= crit) ? "accept" : "REJECT");
    checks++;
    if (stat > crit) failures++;
  endtask

  initial begin
    real eu [], en [], eq [], ee [], er [], pn [], none [];
    eu = new[5];
    en = new[5];
    ee = new[6];
    er = new[6];
    for (int k = 1; k <= 5; k++) eu[k-1] = real'(k) / 6.0;
    en = '{-2.0, -1.0, 0.0, 1.0, 2.0};
    pn = '{0.0227501, 0.1359052, 0.3413447, 0.3413447, 0.1359052, 0.0227501};
    eq = '{-0.96742, -0.43073, 0.0, 0.43073, 0.96742};
    for (int k = 1; k <= 6; k++) begin
      ee[k-1] = -$ln(1.0 - real'(k) / 7.0) / 2.0;
      er[k-1] = 2.0 * $sqrt(-2.0 * $ln(1.0 - real'(k) / 7.0));
    end

    @(posedge clk); #1;
    for (int i = 0; i < N; i++) begin
      su[i] = real'(uniform) / 4096.0;
      sn[i] = real'(normal) / 67108864.0;       // 2^26
      se[i] = real'(exponential) / 131072.0;    // 2^17
      sr[i] = real'(rayleigh) / 1048576.0;      // 2^20
      @(posedge clk); #1;
    end

    judge("uniform",     chisq(su, eu, 6, none), 5, 11.070, su);
    judge("normal",      chisq(sn, en, 6, pn),   5, 11.070, sn);
    judge("exponential", chisq(se, ee, 7, none), 6, 12.592, se);
    judge("rayleigh",    chisq(sr, er, 7, none), 6, 12.592, sr);
    $display("normal with equiprobable bins (not judged): chi2=%7.3f", chisq(sn, eq, 6, none));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

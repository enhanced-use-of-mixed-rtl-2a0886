// tb_trng_sets: runs the four built-in parameter sets (J01, J02, J22, J23),
// each with the normal (NM) and the jittery (JT) clock-manager settings, and
// compares the distributions of their counts.
//
// Eight complete generators run from one 100 MHz reference, in count mode.
// For each, the testbench collects the first NRES counts after lock through
// the top's rnd_valid / rnd_count port and works out the mean, the standard
// deviation and the min-entropy of the LSB, H = -log2(max(p0, p1)). It prints
// one line per generator, then checks:
//   - every count lies within N/2 +- 40, and the mean within N/2 +- 4
//     (N = 434, 440, 899, 960; the duty cycle of Clk_A is one half);
//   - results arrive every N Clk_B periods (the spacing in reference cycles
//     is checked against N * t_B / 10 ns, +-2 cycles for the crossing and
//     the jitter);
//   - for every set the JT counts spread more than the NM counts, which is the
//     purpose of the jittery settings;
//   - the JT LSB of J23 has a min-entropy above 0.8;
//   - the serial line drops counts (overflow_cnt) exactly for the sets whose
//     results come faster than the 3 Mbit/s line carries two bytes (J02).
// Jitter in the clock models is only the documented J23 table, applied to
// every set with the factor floor(64/M) of its Clk_A, so the figures printed
// show the trend, not silicon values. The lock time is shortened to 16
// reference cycles; everything else is at the top's defaults. The four sets,
// the NM/JT comparison and the min-entropy measure follow the published
// evaluation; the sample size and the pass thresholds are this testbench's.
module tb_trng_sets;

  timeunit 1ps;
  timeprecision 1fs;

  import trng_pkg::*;

  localparam int NRES = 1000;
  localparam int NG   = 8;

  logic clk_in = 1'b0;
  always #5000 clk_in = ~clk_in;

  logic rst = 1'b1;

  logic [NG-1:0] lk, v, txd, b;
  logic [15:0]   c   [NG];
  logic [15:0]   ov  [NG];
  logic [15:0]   dr  [NG];

  // Generator g: set g/2, method NM for even g and JT for odd g.
  for (genvar g = 0; g < NG; g++) begin : g_gen
    localparam param_set_e SET = param_set_e'(g / 2);
    localparam method_e    MTH = (g % 2 == 0) ? METHOD_NM : METHOD_JT;
    trng_top #(.PARAM_SET(SET), .METHOD(MTH), .LOCK_CYCLES(16)) u_top (
      .clk_in(clk_in), .rst(rst), .send_count(1'b1), .uart_txd(txd[g]),
      .locked(lk[g]), .rnd_valid(v[g]), .rnd_count(c[g]), .rnd_bit(b[g]),
      .overflow_cnt(ov[g]), .drop_cnt(dr[g]));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("FAIL %s at %0t", msg, $realtime);
    end
  endtask

  // Collected counts and the reference cycle of each result.
  int  cnt [NG][NRES];
  int  cyc [NG][NRES];
  int  nres [NG];
  int  ncyc = 0;

  always @(posedge clk_in) begin
    ncyc <= ncyc + 1;
    for (int g = 0; g < NG; g++)
      if (!rst && lk[g] && v[g] && nres[g] < NRES) begin
        cnt[g][nres[g]] = int'(c[g]);
        cyc[g][nres[g]] = ncyc;
        nres[g]++;
      end
  end

  function automatic bit all_done();
    for (int g = 0; g < NG; g++) if (nres[g] < NRES) return 1'b0;
    return 1'b1;
  endfunction

  real mean [NG], sdev [NG], hmin [NG];

  task automatic evaluate();
    for (int g = 0; g < NG; g++) begin
      mmcm_pair_t p;
      int  n, ones, lo, hi;
      real s, s2, t_b, gap, p1;
      string nm;
      p   = select_set(param_set_e'(g / 2), (g % 2 == 0) ? METHOD_NM : METHOD_JT);
      n   = int'(ratio_n(p));
      t_b = out_period_ps(p.b, 10000.0);
      nm  = $sformatf("%s %s", param_set_e'(g / 2) == SET_J01 ? "J01" :
                               param_set_e'(g / 2) == SET_J02 ? "J02" :
                               param_set_e'(g / 2) == SET_J22 ? "J22" : "J23",
                      (g % 2 == 0) ? "NM" : "JT");
      s = 0.0; s2 = 0.0; ones = 0; lo = 1 << 30; hi = 0;
      // the first result may come from a window cut short by the lock
      for (int i = 1; i < NRES; i++) begin
        s  += real'(cnt[g][i]);
        s2 += real'(cnt[g][i]) * real'(cnt[g][i]);
        ones += cnt[g][i] & 1;
        if (cnt[g][i] < lo) lo = cnt[g][i];
        if (cnt[g][i] > hi) hi = cnt[g][i];
        check(cnt[g][i] >= n / 2 - 40 && cnt[g][i] <= n / 2 + 40,
              $sformatf("%s count %0d near N/2 = %0d", nm, cnt[g][i], n / 2));
        if (i >= 2) begin
          gap = real'(cyc[g][i] - cyc[g][i-1]);
          check(gap > real'(n) * t_b / 10000.0 - 2.0 && gap < real'(n) * t_b / 10000.0 + 2.0,
                $sformatf("%s result spacing %0.0f cycles, expected %0.1f", nm, gap,
                          real'(n) * t_b / 10000.0));
        end
      end
      mean[g] = s / real'(NRES - 1);
      sdev[g] = $sqrt(s2 / real'(NRES - 1) - mean[g] * mean[g]);
      p1      = real'(ones) / real'(NRES - 1);
      hmin[g] = -$ln(p1 > 0.5 ? p1 : 1.0 - p1) / $ln(2.0);
      check(mean[g] > real'(n) / 2.0 - 4.0 && mean[g] < real'(n) / 2.0 + 4.0,
            $sformatf("%s mean %f near N/2", nm, mean[g]));
      $display("%s  N=%0d  counts %0d..%0d  mean %8.3f  stdev %6.3f  LSB min-entropy %5.3f",
               nm, n, lo, hi, mean[g], sdev[g], hmin[g]);
    end
    for (int s = 0; s < NG / 2; s++)
      check(sdev[2*s+1] > sdev[2*s],
            $sformatf("set %0d: JT stdev %f above NM stdev %f", s, sdev[2*s+1], sdev[2*s]));
    check(hmin[7] > 0.8, $sformatf("J23 JT LSB min-entropy %f above 0.8", hmin[7]));
  endtask

  initial begin
    for (int g = 0; g < NG; g++) nres[g] = 0;
    repeat (10) @(posedge clk_in);
    rst = 1'b0;
    repeat (40) @(posedge clk_in);
    check(&lk, "all generators locked");
    while (!all_done()) @(posedge clk_in);
    evaluate();
    // Two bytes of 10 line bits per count: the 3 Mbit/s line keeps up only
    // while N * t_B >= 20 / 3 MHz. J02 (N = 440 at 95.2 MHz) is too fast.
    for (int g = 0; g < NG; g++) begin
      mmcm_pair_t p;
      bit         fast;
      p    = select_set(param_set_e'(g / 2), (g % 2 == 0) ? METHOD_NM : METHOD_JT);
      fast = real'(ratio_n(p)) * out_period_ps(p.b, 10000.0) < 20.0 * 1.0e12 / 3.0e6;
      check(dr[g] == 0, "no result lost in the clock crossing");
      check((ov[g] != 0) == fast, $sformatf("generator %0d: serial overflow %0d, line too slow %0d",
                                            g, ov[g], fast));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

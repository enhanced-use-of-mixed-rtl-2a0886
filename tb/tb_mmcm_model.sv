// tb_mmcm_model: self-checking testbench of the behavioural MMCM model.
//
// A 100 MHz reference drives three instances: the J23 Clk_A and Clk_B
// settings of the jittery method (M = 62, D = 8, Q = 8 and M = 60, D = 8,
// Q = 7.75) and the J01 Clk_A setting of the normal method (M = 7.5, D = 1,
// Q = 15.5). Checks: locked rises after LOCK_CYCLES reference edges and not
// before; the mean output period over many cycles matches
// 10 ns * D * Q / M (computed here from the numbers, not from the model); no
// single period strays further than the peak-to-peak jitter; the two J23
// clocks slip by one Clk_A period every N = 960 Clk_B periods; the period
// does vary when jitter is set; pwrdwn stops the clock and drops locked.
module tb_mmcm_model;

  timeunit 1ps;
  timeprecision 1fs;

  int checks   = 0;
  int failures = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", msg, $realtime);
    end
  endtask

  logic clk_in = 1'b0;
  always #5000 clk_in = ~clk_in;

  logic rst = 1'b1, pwrdwn = 1'b0;
  logic ca, cb, cj, la, lb, lj;

  mmcm_model #(.M8(496), .D(8), .Q8(64), .JITTER_PP_PS(427.425), .LOCK_CYCLES(20), .SEED(5))
    u_a (.clkin1(clk_in), .rst(rst), .pwrdwn(1'b0), .clkout0(ca), .locked(la));
  mmcm_model #(.M8(480), .D(8), .Q8(62), .JITTER_PP_PS(427.425), .LOCK_CYCLES(20), .SEED(6))
    u_b (.clkin1(clk_in), .rst(rst), .pwrdwn(1'b0), .clkout0(cb), .locked(lb));
  mmcm_model #(.M8(60), .D(1), .Q8(124), .JITTER_PP_PS(0.0), .LOCK_CYCLES(20), .SEED(7))
    u_j (.clkin1(clk_in), .rst(rst), .pwrdwn(pwrdwn), .clkout0(cj), .locked(lj));

  // Expected periods [ps].
  localparam real PA = 10000.0 * 8.0 * 8.0 / 62.0;     // 10322.58
  localparam real PB = 10000.0 * 8.0 * 7.75 / 60.0;    // 10333.33
  localparam real PJ = 10000.0 * 1.0 * 15.5 / 7.5;     // 20666.67

  real ta0, tb0, tj0, ta1, tb1, tj1, ta_prev, pmin, pmax;
  int  na = 0, nb = 0, nj = 0;
  bit  meas = 0;

  // First and last rising edge while measuring, and the number of edges.
  always @(posedge ca) if (meas) begin
    if (na == 0) ta0 = $realtime;
    else begin
      if ($realtime - ta_prev < pmin) pmin = $realtime - ta_prev;
      if ($realtime - ta_prev > pmax) pmax = $realtime - ta_prev;
    end
    ta_prev = $realtime;
    ta1 = $realtime;
    na++;
  end
  always @(posedge cb) if (meas) begin if (nb == 0) tb0 = $realtime; tb1 = $realtime; nb++; end
  always @(posedge cj) if (meas) begin if (nj == 0) tj0 = $realtime; tj1 = $realtime; nj++; end

  initial begin
    pmin = 1.0e9; pmax = 0.0;
    repeat (3) @(posedge clk_in);
    check(!la && !lb && !lj && !ca && !cb, "outputs idle in reset");
    rst = 1'b0;
    repeat (10) @(posedge clk_in);
    check(!la && !lj, "not locked before LOCK_CYCLES");
    repeat (15) @(posedge clk_in);
    check(la && lb && lj, "locked after LOCK_CYCLES");
    meas = 1;
    // about four full sweeps of N = 960 Clk_B periods
    #(40_000_000);
    meas = 0;
    begin
      real mean_a, mean_b, mean_j, n_est;
      mean_a = (ta1 - ta0) / real'(na - 1);
      mean_b = (tb1 - tb0) / real'(nb - 1);
      mean_j = (tj1 - tj0) / real'(nj - 1);
      n_est  = mean_a / (mean_b - mean_a);
      $display("mean periods: A %f B %f J %f ps; A min %f max %f; N %f",
               mean_a, mean_b, mean_j, pmin, pmax, n_est);
      check(mean_a > PA - 0.5 && mean_a < PA + 0.5, "J23 JT Clk_A period");
      check(mean_b > PB - 0.5 && mean_b < PB + 0.5, "J23 JT Clk_B period");
      check(mean_j > PJ - 0.01 && mean_j < PJ + 0.01, "J01 NM Clk_A period");
      check(pmin > PA - 427.5 && pmax < PA + 427.5, "period within peak-to-peak jitter");
      check(pmax - pmin > 50.0, "jitter present");
      // f_A : f_B = 961 : 960 for the J23 pair
      check(n_est > 920.0 && n_est < 1000.0, "J23 frequency ratio gives N = 960");
    end
    // power-down stops the J01 clock
    pwrdwn = 1'b1;
    repeat (4) @(posedge clk_in);
    nj = 0; meas = 1;
    repeat (20) @(posedge clk_in);
    meas = 0;
    check(nj == 0 && !lj && !cj, "power-down stops output");
    check(la && lb, "other instances unaffected");
    pwrdwn = 1'b0;
    repeat (30) @(posedge clk_in);
    check(lj, "relocked after power-down");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(100_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

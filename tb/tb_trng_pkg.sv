// tb_trng_pkg: checks the parameter-selection functions of trng_pkg against
// the reference parameter tables of the design.
//
// For the sets J01, J02, J22 and J23: the normal MMCM settings derived from
// the DCM pairs (M, D = 1, Q for Clk_A and Clk_B), the jittery settings
// (M and D scaled by floor(64/M), Q kept), the factor floor(64/M) itself,
// the frequency ratio N (434 for J01 and 960 for J23, whose clocks are
// 48.39/48.28 MHz and 96.875/96.774 MHz), that the jittery method leaves N
// unchanged, and the jitter assumed for each method.
module tb_trng_pkg;

  timeunit 1ps;
  timeprecision 1fs;

  import trng_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // Expected values, in eighths: {M8a, Da, Q8a, M8b, Db, Q8b}.
  typedef int unsigned row_t [6];
  row_t nm_exp [4];
  row_t jt_exp [4];
  int unsigned n_exp [4];

  function automatic bit same(mmcm_pair_t p, row_t r);
    return p.a.m8 == 16'(r[0]) && p.a.d == 16'(r[1]) && p.a.q8 == 16'(r[2]) &&
           p.b.m8 == 16'(r[3]) && p.b.d == 16'(r[4]) && p.b.q8 == 16'(r[5]);
  endfunction

  initial begin
    //             M_A    D_A  Q_A      M_B    D_B  Q_B
    nm_exp[0] = '{ 7.5*8, 1, 15.5*8,  7.0*8, 1, 14.5*8};
    nm_exp[1] = '{10.5*8, 1, 11.0*8, 10.0*8, 1, 10.5*8};
    nm_exp[2] = '{ 7.5*8, 1,  7.75*8, 7.25*8, 1, 7.5*8};
    nm_exp[3] = '{ 7.75*8, 1, 8.0*8,  7.5*8, 1,  7.75*8};
    jt_exp[0] = '{60*8, 8, 15.5*8, 63*8, 9, 14.5*8};
    jt_exp[1] = '{63*8, 6, 11.0*8, 60*8, 6, 10.5*8};
    jt_exp[2] = '{60*8, 8,  7.75*8, 58*8, 8, 7.5*8};
    jt_exp[3] = '{62*8, 8,  8.0*8, 60*8, 8,  7.75*8};
    // N from the clock ratio: J01 435:434, J02 441:440, J22 900:899, J23 961:960
    n_exp = '{434, 440, 899, 960};

    for (int i = 0; i < 4; i++) begin
      param_set_e id;
      mmcm_pair_t nm, jt;
      id = param_set_e'(i);
      nm = select_set(id, METHOD_NM);
      jt = select_set(id, METHOD_JT);
      check(same(nm, nm_exp[i]), $sformatf("set %0d normal parameters", i));
      check(same(jt, jt_exp[i]), $sformatf("set %0d jittery parameters", i));
      check(ratio_n(nm) == n_exp[i], $sformatf("set %0d N = %0d", i, ratio_n(nm)));
      check(ratio_n(jt) == ratio_n(nm), $sformatf("set %0d jittery keeps N", i));
      check(jt.a.m8 <= 16'(M8_MAX) && jt.b.m8 <= 16'(M8_MAX), "jittery M within 64");
    end

    check(d_max(select_set(SET_J23, METHOD_NM).a) == 8, "J23 D_max = 8");
    check(d_max(select_set(SET_J01, METHOD_NM).b) == 9, "J01 Clk_B D_max = 9");
    check(d_max(select_set(SET_J02, METHOD_NM).a) == 6, "J02 Clk_A D_max = 6");
    begin
      real pa;
      pa = out_period_ps(select_set(SET_J23, METHOD_JT).a, 10000.0);
      check(pa > 10322.5 && pa < 10322.6, "J23 Clk_A 96.875 MHz");
      pa = out_period_ps(select_set(SET_J01, METHOD_NM).a, 10000.0);
      check(pa > 20666.6 && pa < 20666.7, "J01 Clk_A 48.39 MHz");
    end
    check(default_jitter_pp_ps(SET_J23, METHOD_JT) == 427.425, "jittery J23 jitter");
    check(default_jitter_pp_ps(SET_J23, METHOD_NM) == 141.837, "normal J23 jitter");
    check(j23_jitter_pp_ps(4) == 273.577, "jitter at factor 4");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

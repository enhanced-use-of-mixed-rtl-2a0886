// tb_trng_top: end-to-end testbench of the MMCM-based TRNG.
//
// Three copies of the whole design run from one 100 MHz reference, each with a
// scoreboard (trng_checker) that recomputes every count from its own sampling
// of Clk_A, checks the result rate and decodes the serial line:
//   u_jt  the jittery J23 set (N = 960), window of one full sweep; it runs in
//         count mode, switches to LSB mode for 16 results (two packed bytes)
//         and back, so both output formats and the mode switch are exercised;
//   u_nm  the normal J23 set (same frequencies, less jitter), count mode; the
//         spread of its counts must be smaller than that of u_jt, which is the
//         point of the jittery parameter selection;
//   u_div the jittery J23 set with the window cut to N/8 = 120 samples: one
//         result per 1.24 us, faster than two bytes fit through the 3 Mbit/s
//         line, so the formatter must drop results and count them;
//   u_tff the jittery J23 set built with the T flip-flop alone (FULL_COUNT =
//         0), the build whose size the hardware cost refers to, in LSB mode:
//         each result must be the LSB of the testbench's own count.
// The lock time is shortened to 16 reference cycles. At the end the
// testbench requires that locking, both output formats, the mode switch and
// the overflow each happened at least once, and that the T flip-flop build
// delivered packed bytes.
module tb_trng_top;

  timeunit 1ps;
  timeprecision 1fs;

  import trng_pkg::*;

  logic clk_in = 1'b0;
  always #5000 clk_in = ~clk_in;

  logic rst = 1'b1;
  logic mode_jt = 1'b1;

  // ------------------------------------------------------------------ DUTs
  logic        txd_jt, txd_nm, txd_div, txd_tff;
  logic        lk_jt, lk_nm, lk_div, lk_tff;
  logic        v_jt, v_nm, v_div, v_tff;
  logic [15:0] c_jt, c_nm, c_div, c_tff;
  logic        b_jt, b_nm, b_div, b_tff;
  logic [15:0] ov_jt, ov_nm, ov_div, dr_jt, dr_nm, dr_div, ov_tff, dr_tff;

  trng_top #(.PARAM_SET(SET_J23), .METHOD(METHOD_JT), .LOCK_CYCLES(16)) u_jt (
    .clk_in(clk_in), .rst(rst), .send_count(mode_jt), .uart_txd(txd_jt),
    .locked(lk_jt), .rnd_valid(v_jt), .rnd_count(c_jt), .rnd_bit(b_jt),
    .overflow_cnt(ov_jt), .drop_cnt(dr_jt));

  trng_top #(.PARAM_SET(SET_J23), .METHOD(METHOD_NM), .LOCK_CYCLES(16)) u_nm (
    .clk_in(clk_in), .rst(rst), .send_count(1'b1), .uart_txd(txd_nm),
    .locked(lk_nm), .rnd_valid(v_nm), .rnd_count(c_nm), .rnd_bit(b_nm),
    .overflow_cnt(ov_nm), .drop_cnt(dr_nm));

  trng_top #(.PARAM_SET(SET_J23), .METHOD(METHOD_JT), .SAMPLES_DIV(8), .LOCK_CYCLES(16)) u_div (
    .clk_in(clk_in), .rst(rst), .send_count(1'b1), .uart_txd(txd_div),
    .locked(lk_div), .rnd_valid(v_div), .rnd_count(c_div), .rnd_bit(b_div),
    .overflow_cnt(ov_div), .drop_cnt(dr_div));

  trng_top #(.PARAM_SET(SET_J23), .METHOD(METHOD_JT), .FULL_COUNT(1'b0), .LOCK_CYCLES(16)) u_tff (
    .clk_in(clk_in), .rst(rst), .send_count(1'b0), .uart_txd(txd_tff),
    .locked(lk_tff), .rnd_valid(v_tff), .rnd_count(c_tff), .rnd_bit(b_tff),
    .overflow_cnt(ov_tff), .drop_cnt(dr_tff));

  // ----------------------------------------------------------- scoreboards
  localparam real TB_PS = 10000.0 * 8.0 * 7.75 / 60.0;

  int  ck[4], fl[4], nres[4], nw[4], nlb[4], nrx[4], nms[4];
  real mn[4], sd[4];

  trng_checker #(.WINDOW(960), .TB_PS(TB_PS)) chk_jt (
    .clk_in(clk_in), .rst(rst || !lk_jt), .cs_rst(u_jt.rst_b || !lk_jt), .clk_a(u_jt.clk_a), .clk_b(u_jt.clk_b), .cs_valid(u_jt.cs_valid),
    .rnd_valid(v_jt), .rnd_count(c_jt), .send_count(mode_jt), .uart_txd(txd_jt),
    .overflow_cnt(ov_jt), .checks(ck[0]), .failures(fl[0]), .n_results(nres[0]),
    .n_count_words(nw[0]), .n_lsb_bytes(nlb[0]), .n_rx_bytes(nrx[0]),
    .n_mode_switch(nms[0]), .mean(mn[0]), .stdev(sd[0]));

  trng_checker #(.WINDOW(960), .TB_PS(TB_PS)) chk_nm (
    .clk_in(clk_in), .rst(rst || !lk_nm), .cs_rst(u_nm.rst_b || !lk_nm), .clk_a(u_nm.clk_a), .clk_b(u_nm.clk_b), .cs_valid(u_nm.cs_valid),
    .rnd_valid(v_nm), .rnd_count(c_nm), .send_count(1'b1), .uart_txd(txd_nm),
    .overflow_cnt(ov_nm), .checks(ck[1]), .failures(fl[1]), .n_results(nres[1]),
    .n_count_words(nw[1]), .n_lsb_bytes(nlb[1]), .n_rx_bytes(nrx[1]),
    .n_mode_switch(nms[1]), .mean(mn[1]), .stdev(sd[1]));

  trng_checker #(.WINDOW(120), .TB_PS(TB_PS), .FULL_SWEEP(1'b0), .DROPS_OK(1'b1)) chk_div (
    .clk_in(clk_in), .rst(rst || !lk_div), .cs_rst(u_div.rst_b || !lk_div), .clk_a(u_div.clk_a), .clk_b(u_div.clk_b), .cs_valid(u_div.cs_valid),
    .rnd_valid(v_div), .rnd_count(c_div), .send_count(1'b1), .uart_txd(txd_div),
    .overflow_cnt(ov_div), .checks(ck[2]), .failures(fl[2]), .n_results(nres[2]),
    .n_count_words(nw[2]), .n_lsb_bytes(nlb[2]), .n_rx_bytes(nrx[2]),
    .n_mode_switch(nms[2]), .mean(mn[2]), .stdev(sd[2]));

  trng_checker #(.WINDOW(960), .TB_PS(TB_PS), .LSB_ONLY(1'b1)) chk_tff (
    .clk_in(clk_in), .rst(rst || !lk_tff), .cs_rst(u_tff.rst_b || !lk_tff), .clk_a(u_tff.clk_a), .clk_b(u_tff.clk_b), .cs_valid(u_tff.cs_valid),
    .rnd_valid(v_tff), .rnd_count(c_tff), .send_count(1'b0), .uart_txd(txd_tff),
    .overflow_cnt(ov_tff), .checks(ck[3]), .failures(fl[3]), .n_results(nres[3]),
    .n_count_words(nw[3]), .n_lsb_bytes(nlb[3]), .n_rx_bytes(nrx[3]),
    .n_mode_switch(nms[3]), .mean(mn[3]), .stdev(sd[3]));

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", msg, $realtime);
    end
  endtask

  int n_lock = 0;
  always @(posedge lk_jt) n_lock++;

  task automatic wait_results(input int n);
    int target;
    target = nres[0] + n;
    while (nres[0] < target) @(posedge clk_in);
    @(negedge clk_in);
  endtask

  task automatic report();
    #1;
    checks   += ck[0] + ck[1] + ck[2] + ck[3];
    failures += fl[0] + fl[1] + fl[2] + fl[3];
    $display("results jt/nm/div: %0d %0d %0d; serial bytes %0d %0d %0d; dropped (div) %0d",
             nres[0], nres[1], nres[2], nrx[0], nrx[1], nrx[2], ov_div);
    $display("count mean/stdev: JT %f/%f  NM %f/%f", mn[0], sd[0], mn[1], sd[1]);
    $display("mechanisms: lock %0d, count words %0d, LSB bytes %0d, mode switches %0d, overflow %0d",
             n_lock, nw[0], nlb[0], nms[0], ov_div);
    $display("T flip-flop build: %0d results, %0d packed bytes, LSB mean %f",
             nres[3], nlb[3], mn[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (10) @(posedge clk_in);
    check(!lk_jt && !lk_nm && !lk_div && !lk_tff, "not locked in reset");
    rst = 1'b0;
    repeat (40) @(posedge clk_in);
    check(lk_jt && lk_nm && lk_div && lk_tff, "locked");
    check(!u_jt.rst_b, "Clk_B logic out of reset after lock");
    wait_results(20);
    mode_jt = 1'b0;
    wait_results(16);
    mode_jt = 1'b1;
    wait_results(8);
    // the serial line needs 6.7 us for the two bytes of the last result
    wait_results(1);
    #(7_500_000);
    chk_jt.finish_checks();
    chk_nm.finish_checks();
    chk_div.finish_checks();
    chk_tff.finish_checks();
    check(n_lock >= 1, "mechanism: lock");
    check(nw[0] >= 20 && nlb[0] == 2, "mechanism: count and LSB formats");
    check(nms[0] >= 2, "mechanism: mode switch");
    check(nlb[3] >= 4, "mechanism: T flip-flop build delivers packed bits");
    check(ov_div > 0, "mechanism: overflow of the serial line");
    check(nres[2] > 6 * nres[0], "shortened window raises the result rate");
    check(sd[0] > sd[1], "jittery set spreads the counts more than the normal set");
    check(dr_jt == 0 && dr_nm == 0 && dr_div == 0 && dr_tff == 0,
          "no result lost in the clock crossing");
    report();
    $finish;
  end

  initial begin
    #(2_000_000_000);
    failures++;
    $display("watchdog expired");
    report();
    $finish;
  end

endmodule

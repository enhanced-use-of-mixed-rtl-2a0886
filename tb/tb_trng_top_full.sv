// tb_trng_top_full: the design at its default parameters (J23 set, jittery
// method, window N = 960, 100 MHz reference, 3 Mbit/s serial line).
//
// After reset and lock it collects ten counter values in count mode, then
// sixteen random bits in LSB mode, all checked by trng_checker: each count
// against the testbench's own sampling of Clk_A, the spacing of the results
// (960 Clk_B periods, 9.92 us, i.e. about 0.1 Msample/s), counts near 480,
// and every byte on the serial line.
module tb_trng_top_full;

  timeunit 1ps;
  timeprecision 1fs;

  logic clk_in = 1'b0;
  always #5000 clk_in = ~clk_in;

  logic        rst = 1'b1;
  logic        send_count = 1'b1;
  logic        txd, lk, v, b;
  logic [15:0] c, ov, dr;

  trng_top dut (
    .clk_in(clk_in), .rst(rst), .send_count(send_count), .uart_txd(txd),
    .locked(lk), .rnd_valid(v), .rnd_count(c), .rnd_bit(b),
    .overflow_cnt(ov), .drop_cnt(dr));

  int  ck, fl, nres, nw, nlb, nrx, nms;
  real mn, sd;

  trng_checker #(.WINDOW(960), .TB_PS(10000.0 * 8.0 * 7.75 / 60.0)) chk (
    .clk_in(clk_in), .rst(rst || !lk), .cs_rst(dut.rst_b || !lk), .clk_a(dut.clk_a),
    .clk_b(dut.clk_b), .cs_valid(dut.cs_valid), .rnd_valid(v), .rnd_count(c),
    .send_count(send_count), .uart_txd(txd), .overflow_cnt(ov), .checks(ck),
    .failures(fl), .n_results(nres), .n_count_words(nw), .n_lsb_bytes(nlb),
    .n_rx_bytes(nrx), .n_mode_switch(nms), .mean(mn), .stdev(sd));

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", msg, $realtime);
    end
  endtask

  task automatic wait_results(input int n);
    int target;
    target = nres + n;
    while (nres < target) @(posedge clk_in);
    @(negedge clk_in);
  endtask

  task automatic report();
    #1;
    checks   += ck;
    failures += fl;
    $display("results %0d, serial bytes %0d, count mean %f stdev %f", nres, nrx, mn, sd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (10) @(posedge clk_in);
    rst = 1'b0;
    repeat (70) @(posedge clk_in);
    check(lk, "both clock managers locked");
    wait_results(10);
    send_count = 1'b0;
    wait_results(16);
    #(7_500_000);
    chk.finish_checks();
    check(nw == 10 && nlb == 2, "ten counts and two packed bytes");
    check(dr == 0 && ov == 0, "nothing dropped");
    report();
    $finish;
  end

  initial begin
    #(1_000_000_000);
    failures++;
    $display("watchdog expired");
    report();
    $finish;
  end

endmodule

// trng_checker: end-to-end scoreboard for trng_top, shared by the top-level
// testbenches.
//
// It watches the two sampled clocks, the sampler's window pulse, the results
// in the reference clock domain and the serial line, and checks:
//   * every result equals the number of '1's the testbench itself saw when
//     sampling Clk_A at the last WINDOW rising edges of Clk_B;
//   * consecutive results are WINDOW Clk_B periods apart (the generation rate),
//     within one reference period and the clock jitter;
//   * with a full-sweep window, every count lies near WINDOW/2;
//   * with LSB_ONLY set (a design built with the T flip-flop alone), the
//     result is only the LSB of that number, and the upper bits are zero;
//   * the serial line carries, as 8N1 frames at 3 Mbit/s decoded here, exactly
//     the bytes the results imply (two bytes per result in count mode, packed
//     LSBs in LSB mode); when DROPS_OK is set, only the number of bytes is
//     checked against the results and the overflow counter.
// Counters of what happened are outputs, so the testbench can require that
// every mechanism was exercised.
module trng_checker #(
  parameter int unsigned WINDOW     = 960,
  parameter real         TB_PS      = 10333.333,   // Clk_B period
  parameter bit          FULL_SWEEP = 1'b1,
  parameter bit          DROPS_OK   = 1'b0,
  parameter bit          LSB_ONLY   = 1'b0
) (
  input  logic        clk_in,
  input  logic        rst,        // reference-domain reset of the design
  input  logic        cs_rst,     // Clk_B-domain reset of the design
  input  logic        clk_a,
  input  logic        clk_b,
  input  logic        cs_valid,
  input  logic        rnd_valid,
  input  logic [15:0] rnd_count,
  input  logic        send_count,
  input  logic        uart_txd,
  input  logic [15:0] overflow_cnt,
  output int          checks,
  output int          failures,
  output int          n_results,
  output int          n_count_words,
  output int          n_lsb_bytes,
  output int          n_rx_bytes,
  output int          n_mode_switch,
  output real         mean,
  output real         stdev
);

  timeunit 1ps;
  timeprecision 1fs;

  localparam real BIT_PS = 1.0e12 / 3.0e6;

  initial begin
    checks = 0; failures = 0; n_results = 0; n_count_words = 0;
    n_lsb_bytes = 0; n_rx_bytes = 0; n_mode_switch = 0;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", msg, $realtime);
    end
  endtask

  // Reference sampler and window sums.
  bit hist[$];
  int exp_counts[$];
  always @(posedge clk_b) begin
    hist.push_back(clk_a);
    if (hist.size() > WINDOW + 4) void'(hist.pop_front());
  end
  always @(negedge clk_b) if (cs_valid && !cs_rst) begin
    int s;
    s = 0;
    for (int i = hist.size() - 1 - int'(WINDOW); i < hist.size() - 1; i++) s += hist[i];
    exp_counts.push_back(s);
  end

  // Results.
  real    t_last = -1.0;
  real    sum = 0.0, sumsq = 0.0;
  byte unsigned exp_bytes[$];
  byte unsigned pack;
  int     nbits = 0;
  logic   mode_q = 1'b1;
  int     n_exp_total = 0;

  always @(posedge clk_in) begin
    if (send_count !== mode_q) begin
      nbits = 0;
      n_mode_switch++;
      mode_q = send_count;
    end
    if (rnd_valid && !rst) begin
      int e;
      check(exp_counts.size() > 0, "result without a window");
      e = (exp_counts.size() > 0) ? exp_counts.pop_front() : -1;
      if (LSB_ONLY && e >= 0) e = e % 2;
      check(int'(rnd_count) == e, $sformatf("count %0d expected %0d", rnd_count, e));
      if (FULL_SWEEP && !LSB_ONLY)
        check(rnd_count > 16'(WINDOW * 4 / 10) && rnd_count < 16'(WINDOW * 6 / 10),
              $sformatf("count %0d near %0d", rnd_count, WINDOW / 2));
      check(rnd_count <= 16'(WINDOW), "count within window");
      if (t_last >= 0.0)
        check($realtime - t_last > real'(WINDOW) * TB_PS - 11000.0 &&
              $realtime - t_last < real'(WINDOW) * TB_PS + 11000.0,
              $sformatf("result interval %f ps", $realtime - t_last));
      t_last = $realtime;
      n_results++;
      sum   += real'(rnd_count);
      sumsq += real'(rnd_count) * real'(rnd_count);
      mean  = sum / real'(n_results);
      stdev = (n_results > 1) ? $sqrt((sumsq - sum * sum / real'(n_results)) / real'(n_results - 1)) : 0.0;
      if (send_count) begin
        exp_bytes.push_back(rnd_count[7:0]);
        exp_bytes.push_back(rnd_count[15:8]);
        n_exp_total += 2;
        n_count_words++;
      end else begin
        pack[nbits] = rnd_count[0];
        nbits++;
        if (nbits == 8) begin
          exp_bytes.push_back(pack);
          n_exp_total++;
          n_lsb_bytes++;
          nbits = 0;
        end
      end
    end
  end

  // Serial receiver.
  initial begin
    forever begin
      byte unsigned b;
      @(negedge uart_txd);
      #(BIT_PS * 0.5);
      check(uart_txd == 1'b0, "start bit");
      for (int i = 0; i < 8; i++) begin
        #(BIT_PS);
        b[i] = uart_txd;
      end
      #(BIT_PS);
      check(uart_txd == 1'b1, "stop bit");
      n_rx_bytes++;
      if (!DROPS_OK) begin
        check(exp_bytes.size() > 0, "unexpected serial byte");
        if (exp_bytes.size() > 0) begin
          byte unsigned e;
          e = exp_bytes.pop_front();
          check(b == e, $sformatf("serial byte %02x expected %02x", b, e));
        end
      end
    end
  end

  // Final accounting, called by the testbench when the line has had time to
  // send the bytes of the last result.
  task automatic finish_checks();
    if (DROPS_OK)
      // bytes still queued (at most a full FIFO and the frame on the line)
      check(n_exp_total - (n_rx_bytes + 2 * int'(overflow_cnt)) inside {[0:10]},
            $sformatf("bytes %0d + 2*dropped %0d vs %0d", n_rx_bytes, overflow_cnt, n_exp_total));
    else begin
      check(exp_bytes.size() == 0, $sformatf("%0d bytes never sent", exp_bytes.size()));
      check(overflow_cnt == 0, "no overflow expected");
    end
  endtask

endmodule

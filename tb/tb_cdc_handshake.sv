// tb_cdc_handshake: self-checking testbench of the toggle-handshake clock
// crossing.
//
// Source clock 10.333 ns, destination clock 10 ns, unrelated phases. Words sent
// with gaps of at least 12 source cycles must all arrive, in order, each with a
// single dst_valid pulse, within five destination cycles. Words sent on
// consecutive source cycles cannot all pass: every one must then either arrive
// or be flagged on src_drop, never both and never neither.
module tb_cdc_handshake;

  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", msg, $realtime);
    end
  endtask

  logic sclk = 1'b0, dclk = 1'b0;
  always #5166.667 sclk = ~sclk;
  initial begin
    #1234;
    forever #5000 dclk = ~dclk;
  end

  logic        srst = 1'b1, drst = 1'b1;
  logic        s_valid = 1'b0, s_drop, d_valid;
  logic [15:0] s_data = '0, d_data;

  cdc_handshake #(.WIDTH(16)) dut (
    .src_clk(sclk), .src_rst(srst), .src_valid(s_valid), .src_data(s_data),
    .src_drop(s_drop), .dst_clk(dclk), .dst_rst(drst), .dst_valid(d_valid),
    .dst_data(d_data));

  logic [15:0] sent[$];
  real         t_sent[$];
  int n_rx = 0, n_drop = 0, n_sent = 0;
  bit  burst = 0;

  // Destination monitor.
  always @(posedge dclk) if (!drst && d_valid) begin
    n_rx++;
    if (!burst) begin
      check(sent.size() > 0, "unexpected word");
      if (sent.size() > 0) begin
        logic [15:0] e;
        real t0;
        e  = sent.pop_front();
        t0 = t_sent.pop_front();
        check(d_data == e, $sformatf("word %04x expected %04x", d_data, e));
        check($realtime - t0 < 5.0 * 10000.0 + 1.0, "latency within five cycles");
      end
    end
  end
  always @(posedge sclk) if (!srst && s_drop) n_drop++;

  initial begin
    repeat (4) @(posedge sclk);
    @(negedge sclk);
    srst = 1'b0;
    drst = 1'b0;
    repeat (4) @(negedge sclk);
    for (int i = 0; i < 100; i++) begin
      s_data  = 16'($urandom);
      s_valid = 1'b1;
      sent.push_back(s_data);
      t_sent.push_back($realtime);
      @(negedge sclk);
      s_valid = 1'b0;
      repeat (11 + $urandom % 8) @(negedge sclk);
    end
    check(sent.size() == 0 && n_rx == 100, $sformatf("received %0d of 100", n_rx));
    check(n_drop == 0, "no drop with gaps");
    // burst
    burst = 1'b1;
    n_rx = 0; n_drop = 0;
    for (int i = 0; i < 40; i++) begin
      s_data  = 16'(i);
      s_valid = 1'b1;
      @(negedge sclk);
    end
    s_valid = 1'b0;
    repeat (20) @(negedge sclk);
    check(n_rx + n_drop == 40, $sformatf("burst: %0d arrived + %0d dropped", n_rx, n_drop));
    check(n_drop > 0 && n_rx > 0, "burst both passes and drops");
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

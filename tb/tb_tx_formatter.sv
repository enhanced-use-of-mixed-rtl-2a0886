// tb_tx_formatter: self-checking testbench of the result-to-byte formatter.
//
// Phases: (1) count mode with a sink that is mostly ready: every result must
// come out as its low byte then its high byte, in order; (2) LSB mode: the
// LSBs of 64 results must come out packed eight to a byte, first bit in bit 0;
// (3) overflow: with the sink stalled, a FIFO of 8 bytes takes four results in
// count mode, the next six are dropped and counted, and after the stall the
// first four come out intact; then in LSB mode one more packed byte is dropped
// and counted; (4) a mode change in the middle of a byte discards the partial
// byte. Expected bytes are built here from the results sent.
module tb_tx_formatter;

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

  logic clk = 1'b0;
  always #5000 clk = ~clk;

  logic        rst = 1'b1, send_count = 1'b1, s_valid = 1'b0, m_ready = 1'b0;
  logic [9:0]  s_count = '0;
  logic [7:0]  m_data;
  logic        m_valid;
  logic [15:0] overflow_cnt;

  tx_formatter #(.CNT_W(10), .FIFO_DEPTH(8)) dut (
    .clk(clk), .rst(rst), .send_count(send_count), .s_valid(s_valid),
    .s_count(s_count), .m_data(m_data), .m_valid(m_valid), .m_ready(m_ready),
    .overflow_cnt(overflow_cnt));

  byte unsigned exp_q[$];
  int n_out = 0;
  bit random_ready = 1'b0;

  always @(posedge clk) begin
    if (m_valid && m_ready) begin
      check(exp_q.size() > 0, "unexpected byte");
      if (exp_q.size() > 0) begin
        byte unsigned e;
        e = exp_q.pop_front();
        check(m_data == e, $sformatf("byte %02x expected %02x", m_data, e));
      end
      n_out++;
    end
    if (random_ready) m_ready <= ($urandom % 4) != 0;
  end

  // Inputs change at the falling edge, one result per call.
  task automatic send(input logic [9:0] v);
    s_count = v;
    s_valid = 1'b1;
    @(negedge clk);
    s_valid = 1'b0;
  endtask

  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    idle(3);
    rst = 1'b0;
    idle(3);
    // (1) count mode
    random_ready = 1'b1;
    for (int i = 0; i < 50; i++) begin
      logic [9:0] v;
      v = 10'($urandom);
      exp_q.push_back(v[7:0]);
      exp_q.push_back({6'b0, v[9:8]});
      send(v);
      idle(5);
    end
    idle(20);
    check(exp_q.size() == 0, "count mode drained");
    check(overflow_cnt == 0, "no overflow in count mode");
    // (2) LSB mode
    send_count = 1'b0;
    idle(3);
    for (int i = 0; i < 8; i++) begin
      logic [9:0] v [8];
      byte unsigned b;
      for (int j = 0; j < 8; j++) begin
        v[j] = 10'($urandom);
        b[j] = v[j][0];
      end
      exp_q.push_back(b);
      for (int j = 0; j < 8; j++) begin
        send(v[j]);
        idle(1);
      end
    end
    idle(20);
    check(exp_q.size() == 0, "LSB mode drained");
    check(overflow_cnt == 0, "no overflow in LSB mode");
    // (3) overflow in count mode
    random_ready = 1'b0;
    m_ready = 1'b0;
    send_count = 1'b1;
    idle(3);
    for (int i = 0; i < 10; i++) begin
      logic [9:0] v;
      v = 10'(100 + i);
      if (i < 4) begin
        exp_q.push_back(v[7:0]);
        exp_q.push_back({6'b0, v[9:8]});
      end
      send(v);
    end
    idle(2);
    check(overflow_cnt == 6, $sformatf("overflow count %0d expected 6", overflow_cnt));
    m_ready = 1'b1;
    idle(20);
    check(exp_q.size() == 0, "first results survive the overflow");
    // overflow in LSB mode: fill the FIFO with 8 packed bytes, drop a ninth
    m_ready = 1'b0;
    send_count = 1'b0;
    idle(3);
    for (int i = 0; i < 9; i++) begin
      byte unsigned b;
      b = 8'($urandom);
      if (i < 8) exp_q.push_back(b);
      for (int j = 0; j < 8; j++) send({9'b0, b[j]});
    end
    idle(2);
    check(overflow_cnt == 7, $sformatf("overflow count %0d expected 7", overflow_cnt));
    m_ready = 1'b1;
    idle(20);
    check(exp_q.size() == 0, "packed bytes survive the overflow");
    // (4) mode change discards a partial byte
    for (int j = 0; j < 3; j++) send(10'h1);
    send_count = 1'b1;
    idle(3);
    send_count = 1'b0;
    idle(3);
    begin
      byte unsigned b;
      b = 8'hA5;
      exp_q.push_back(b);
      for (int j = 0; j < 8; j++) send({9'b0, b[j]});
    end
    idle(20);
    check(exp_q.size() == 0, "fresh byte after mode change");
    check(n_out == 100 + 8 + 8 + 8 + 1, $sformatf("bytes out %0d", n_out));
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

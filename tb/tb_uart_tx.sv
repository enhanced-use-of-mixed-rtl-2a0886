// tb_uart_tx: self-checking testbench of the serial transmitter.
//
// A 100 MHz clock drives the transmitter at 3 Mbit/s. Random bytes are sent,
// some back to back and some with idle gaps. An independent receiver in the
// testbench waits for each falling start edge, samples the line in the middle
// of each of the ten bit periods (1/3 us each, from the nominal rate, not from
// the transmitter) and checks start bit, data and stop bit against the byte
// sent. The time from accepting a byte to being ready again must be ten bit
// periods (333.3 cycles, so 333 or 334 cycles plus the accept cycle), and the
// line must idle high.
module tb_uart_tx;

  timeunit 1ps;
  timeprecision 1fs;

  localparam real BIT_PS = 1.0e12 / 3.0e6;   // 333333.3 ps

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

  logic       rst = 1'b1;
  logic [7:0] data = '0;
  logic       valid = 1'b0;
  logic       ready, txd;

  uart_tx #(.CLK_HZ(100_000_000), .BAUD(3_000_000)) dut (
    .clk(clk), .rst(rst), .data(data), .valid(valid), .ready(ready), .txd(txd));

  byte unsigned sent[$];
  int n_rx = 0;

  // Independent receiver.
  initial begin
    forever begin
      byte unsigned b, exp;
      @(negedge txd);
      #(BIT_PS * 0.5);
      check(txd == 1'b0, "start bit");
      for (int i = 0; i < 8; i++) begin
        #(BIT_PS);
        b[i] = txd;
      end
      #(BIT_PS);
      check(txd == 1'b1, "stop bit");
      check(sent.size() > 0, "byte expected");
      if (sent.size() > 0) begin
        exp = sent.pop_front();
        check(b == exp, $sformatf("data %02x expected %02x", b, exp));
      end
      n_rx++;
    end
  end

  // Frame length in clock cycles.
  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (3) @(posedge clk);
    check(txd == 1'b1 && ready, "idle after reset");
    for (int n = 0; n < 40; n++) begin
      longint t0;
      while (!ready) @(posedge clk);
      data  <= 8'($urandom);
      valid <= 1'b1;
      @(posedge clk);
      sent.push_back(data);
      t0 = cyc;
      valid <= 1'b0;
      @(posedge clk);
      while (!ready) @(posedge clk);
      check(cyc - t0 >= 333 && cyc - t0 <= 335,
            $sformatf("frame took %0d cycles", cyc - t0));
      if (n % 3 == 2) repeat ($urandom % 50) @(posedge clk);
    end
    repeat (200) @(posedge clk);
    check(n_rx == 40, $sformatf("received %0d of 40 bytes", n_rx));
    check(txd == 1'b1, "idle high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(400_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_cs_counter: self-checking testbench of the coherent-sampling counter.
//
// Two jittery clocks with f_A : f_B = (N+1) : N are generated here directly
// (edges on an absolute grid plus a random offset), N = 6 as in the textbook
// 7 : 6 example and N = 48 for a longer sweep. The testbench records Clk_A at
// every Clk_B rising edge itself and, for every valid pulse, compares the
// reported sum with the sum of the last WINDOW recorded samples, checks that
// lsb is its bit 0, that a T-flip-flop build (FULL_COUNT = 0) reports the
// same LSB, and that valid pulses exactly every WINDOW Clk_B cycles. It also
// checks the count stays near N/2 when the window is one full sweep.
module tb_cs_counter;

  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned N1 = 6;
  localparam int unsigned N2 = 48;
  localparam int unsigned W3 = 12;     // window of N2/4 samples

  localparam real TB_PS  = 10_000.0;   // Clk_B period

  int checks   = 0;
  int failures = 0;

  // ------------------------------------------------------------ clock gens
  logic clk_b = 1'b0;
  logic clk_a1 = 1'b0, clk_a2 = 1'b0;

  function automatic real jit(real pp);
    return (real'($urandom % 1001) / 1000.0 - 0.5) * pp;
  endfunction

  task automatic gen(ref logic c, input real period, input real pp, input real phase);
    longint k = 0;
    real t;
    forever begin
      k++;
      t = phase + real'(k) * period / 2.0 + jit(pp);
      #(t - $realtime);
      c = ~c;
    end
  endtask

  initial gen(clk_b, TB_PS, 40.0, 123.0);
  initial gen(clk_a1, TB_PS * real'(N1) / real'(N1 + 1), 300.0, 0.0);
  initial gen(clk_a2, TB_PS * real'(N2) / real'(N2 + 1), 300.0, 0.0);

  logic rst = 1'b1;

  // ------------------------------------------------------------------ DUTs
  logic [$clog2(N1+1)-1:0] c1;  logic l1, v1;
  logic [$clog2(N2+1)-1:0] c2;  logic l2, v2;
  logic [$clog2(N2+1)-1:0] c2t; logic l2t, v2t;
  logic [$clog2(W3+1)-1:0] c3;  logic l3, v3;

  cs_counter #(.WINDOW(N1)) dut1 (.clk_b(clk_b), .rst(rst), .clk_a(clk_a1),
                                  .count(c1), .lsb(l1), .valid(v1));
  cs_counter #(.WINDOW(N2)) dut2 (.clk_b(clk_b), .rst(rst), .clk_a(clk_a2),
                                  .count(c2), .lsb(l2), .valid(v2));
  cs_counter #(.WINDOW(N2), .FULL_COUNT(1'b0)) dut2t (.clk_b(clk_b), .rst(rst),
                                  .clk_a(clk_a2), .count(c2t), .lsb(l2t), .valid(v2t));
  cs_counter #(.WINDOW(W3)) dut3 (.clk_b(clk_b), .rst(rst), .clk_a(clk_a2),
                                  .count(c3), .lsb(l3), .valid(v3));

  // ------------------------------------------------------- reference model
  bit  h1[$], h2[$];
  longint cyc = 0;
  always @(posedge clk_b) begin
    h1.push_back(clk_a1);
    h2.push_back(clk_a2);
    cyc++;
  end

  function automatic int sum_last(ref bit h[$], input int w);
    int s = 0;
    // the newest entry is the sample of the edge that raised valid
    for (int i = h.size() - 1 - w; i < h.size() - 1; i++) s += h[i];
    return s;
  endfunction

  longint last_v1 = -1, last_v2 = -1, last_v3 = -1;
  int n_v1 = 0, n_v2 = 0, n_v3 = 0;
  int nonflat = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", msg, cyc);
    end
  endtask

  always @(negedge clk_b) if (!rst) begin
    if (v1) begin
      check(int'(c1) == sum_last(h1, N1), $sformatf("N=6 count %0d exp %0d", c1, sum_last(h1, N1)));
      check(l1 == c1[0], "N=6 lsb");
      if (last_v1 >= 0) check(cyc - last_v1 == N1, "N=6 window period");
      last_v1 = cyc; n_v1++;
    end
    if (v2) begin
      check(int'(c2) == sum_last(h2, N2), $sformatf("N=48 count %0d exp %0d", c2, sum_last(h2, N2)));
      check(l2 == c2[0], "N=48 lsb");
      check(v2t && l2t == c2[0] && c2t == {{($bits(c2t)-1){1'b0}}, c2[0]}, "T-FF build lsb");
      // a full sweep holds about half ones (duty cycle 1/2)
      check(c2 >= N2/2 - 3 && c2 <= N2/2 + 3, $sformatf("N=48 count %0d near N/2", c2));
      if (last_v2 >= 0) check(cyc - last_v2 == N2, "N=48 window period");
      last_v2 = cyc; n_v2++;
    end
    if (v3) begin
      check(int'(c3) == sum_last(h2, W3), $sformatf("W=12 count %0d exp %0d", c3, sum_last(h2, W3)));
      if (c3 != 0 && c3 != W3) nonflat++;
      if (last_v3 >= 0) check(cyc - last_v3 == W3, "W=12 window period");
      last_v3 = cyc; n_v3++;
    end
    if (!v2) check(!v2t, "T-FF build valid only with full build");
  end

  // ------------------------------------------------------------- sequence
  initial begin
    repeat (5) @(posedge clk_b);
    @(negedge clk_b) rst = 1'b0;
    repeat (48 * 60) @(posedge clk_b);
    // reset in the middle of a window restarts the window
    @(negedge clk_b) rst = 1'b1;
    repeat (3) @(posedge clk_b);
    @(negedge clk_b) rst = 1'b0;
    last_v1 = -1; last_v2 = -1; last_v3 = -1;
    repeat (48 * 20) @(posedge clk_b);
    check(n_v1 > 400 && n_v2 > 70 && n_v3 > 280, "enough windows observed");
    check(nonflat > 0, "short windows with an edge inside");
    $display("windows: N=6 %0d, N=48 %0d, W=12 %0d", n_v1, n_v2, n_v3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(TB_PS * 20000.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

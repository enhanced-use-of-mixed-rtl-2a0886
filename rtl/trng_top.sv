// trng_top: coherent-sampling true random number generator built from two
// mixed-mode clock managers (MMCMs).
//
// Both MMCMs are driven by the same reference clock clk_in (100 MHz) and are
// set so that Clk_A is slightly faster than Clk_B, f_A : f_B = (N+1) : N. A
// flip-flop clocked by Clk_B samples Clk_A; over N samples it sweeps one period
// of Clk_A, and the number of '1's in a window is about N/2 with a jitter-driven
// spread; its LSB is the random bit (cs_counter). The parameter set is chosen
// at elaboration from trng_pkg: PARAM_SET picks one of the reference sets and
// METHOD picks the normal port (NM) or the jittery set (JT), in which M and D of
// both MMCMs are scaled by floor(64/M) to raise the MMCM jitter at unchanged
// frequency. The default, J23 with JT, gives Clk_A = 62/(8*8) * 100 MHz =
// 96.875 MHz and Clk_B = 60/(8*7.75) * 100 MHz = 96.774 MHz, N = 960. The
// count window is N / SAMPLES_DIV samples: SAMPLES_DIV = 1 counts over a full
// sweep; a larger value shortens the window (and raises the bit rate) by that
// factor.
//
// Each result crosses from the Clk_B domain into the clk_in domain through a
// toggle handshake (cdc_handshake), appears on rnd_valid/rnd_count/rnd_bit and
// is formatted (tx_formatter) for a 3 Mbit/s serial line (uart_tx): whole counts
// when send_count = 1, packed LSBs when send_count = 0.
//
// Ports, clk_in domain unless noted: rst (synchronous, active high; also resets
// both MMCMs), send_count, uart_txd, locked (both MMCMs locked), rnd_valid (one
// cycle per result), rnd_count, rnd_bit, overflow_cnt (results dropped because
// the serial line was busy), drop_cnt (Clk_B domain: results lost in the
// crossing, which cannot happen while the window is longer than the handshake).
// The Clk_B logic is held in reset until both MMCMs report lock. The reset
// synchronizer has a power-up value of '1' (the flip-flops' configuration-time
// state on an FPGA), so it is asserted from the first Clk_B edge; lint notes
// that a variable with an initial value is also written in a clocked process,
// which is intended here.
// The MMCMs are behavioural models here; on an FPGA the vendor primitive is
// instantiated with the same M, D and Q. The clock relations, the sum-of-ones
// window, the LSB output and the 3 Mbit/s serial line follow the design; reset
// sequencing, the crossing and the byte format are this implementation's.
module trng_top
  import trng_pkg::*;
#(
  parameter param_set_e  PARAM_SET       = SET_J23,
  parameter method_e     METHOD          = METHOD_JT,
  parameter int unsigned SAMPLES_DIV     = 1,
  parameter bit          FULL_COUNT      = 1'b1,
  parameter real         CLKIN_PERIOD_PS = 10000.0,
  parameter int unsigned CLK_HZ          = F_IN_HZ,
  parameter int unsigned BAUD            = 3_000_000,
  parameter int unsigned FIFO_DEPTH      = 8,
  parameter int unsigned LOCK_CYCLES     = 64,
  parameter real         JITTER_A_PS     = default_jitter_pp_ps(PARAM_SET, METHOD),
  parameter real         JITTER_B_PS     = JITTER_A_PS
) (
  input  logic        clk_in,
  input  logic        rst,
  input  logic        send_count,
  output logic        uart_txd,
  output logic        locked,
  output logic        rnd_valid,
  output logic [15:0] rnd_count,
  output logic        rnd_bit,
  output logic [15:0] overflow_cnt,
  output logic [15:0] drop_cnt
);

  timeunit 1ps;
  timeprecision 1fs;

  localparam mmcm_pair_t  CFG    = select_set(PARAM_SET, METHOD);
  localparam int unsigned N      = ratio_n(CFG);
  localparam int unsigned WINDOW = N / SAMPLES_DIV;
  localparam int unsigned CNT_W  = $clog2(WINDOW + 1);

  initial begin
    if (N == 0) $error("trng_top: Clk_A is not faster than Clk_B");
    if (WINDOW < 8) $error("trng_top: window of %0d samples is too short", WINDOW);
  end

  // ---------------------------------------------------------------- clocks
  logic clk_a, clk_b, locked_a, locked_b;

  mmcm_model #(
    .M8(32'(CFG.a.m8)), .D(32'(CFG.a.d)), .Q8(32'(CFG.a.q8)),
    .CLKIN_PERIOD_PS(CLKIN_PERIOD_PS), .JITTER_PP_PS(JITTER_A_PS),
    .LOCK_CYCLES(LOCK_CYCLES), .SEED(1)
  ) u_mmcm_a (
    .clkin1(clk_in), .rst(rst), .pwrdwn(1'b0), .clkout0(clk_a), .locked(locked_a)
  );

  mmcm_model #(
    .M8(32'(CFG.b.m8)), .D(32'(CFG.b.d)), .Q8(32'(CFG.b.q8)),
    .CLKIN_PERIOD_PS(CLKIN_PERIOD_PS), .JITTER_PP_PS(JITTER_B_PS),
    .LOCK_CYCLES(LOCK_CYCLES), .SEED(2)
  ) u_mmcm_b (
    .clkin1(clk_in), .rst(rst), .pwrdwn(1'b0), .clkout0(clk_b), .locked(locked_b)
  );

  assign locked = locked_a && locked_b;

  // Clk_B-domain reset: a two-flop synchronizer of !locked, released two Clk_B
  // edges after both MMCMs lock. Clk_B runs for LOCK_CYCLES reference cycles
  // before lock, so the reset always reaches the Clk_B logic. The synchronizer
  // powers up asserted (flip-flop initial value), so the Clk_B logic is held
  // from the first Clk_B edge and never runs from its power-up state.
  logic [1:0] rst_b_sync = 2'b11;
  logic       rst_b;
  always_ff @(posedge clk_b) rst_b_sync <= {rst_b_sync[0], !locked};
  assign rst_b = rst_b_sync[1];

  // ---------------------------------------------------- coherent sampling
  logic [CNT_W-1:0] cs_count;
  logic             cs_lsb;
  logic             cs_valid;

  cs_counter #(.WINDOW(WINDOW), .FULL_COUNT(FULL_COUNT)) u_cs (
    .clk_b(clk_b), .rst(rst_b), .clk_a(clk_a),
    .count(cs_count), .lsb(cs_lsb), .valid(cs_valid)
  );

  // ------------------------------------------------------ domain crossing
  logic src_drop;

  cdc_handshake #(.WIDTH(16)) u_cdc (
    .src_clk(clk_b), .src_rst(rst_b), .src_valid(cs_valid),
    .src_data(FULL_COUNT ? 16'(cs_count) : 16'(cs_lsb)), .src_drop(src_drop),
    .dst_clk(clk_in), .dst_rst(rst || !locked), .dst_valid(rnd_valid), .dst_data(rnd_count)
  );

  assign rnd_bit = rnd_count[0];

  always_ff @(posedge clk_b) begin
    if (rst_b)                             drop_cnt <= '0;
    else if (src_drop && drop_cnt != '1)   drop_cnt <= drop_cnt + 16'd1;
  end

  // ------------------------------------------------------- serial output
  logic [7:0] tx_data;
  logic       tx_valid, tx_ready;

  tx_formatter #(.CNT_W(16), .FIFO_DEPTH(FIFO_DEPTH)) u_fmt (
    .clk(clk_in), .rst(rst), .send_count(send_count),
    .s_valid(rnd_valid), .s_count(rnd_count),
    .m_data(tx_data), .m_valid(tx_valid), .m_ready(tx_ready),
    .overflow_cnt(overflow_cnt)
  );

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clk(clk_in), .rst(rst), .data(tx_data), .valid(tx_valid),
    .ready(tx_ready), .txd(uart_txd)
  );

endmodule

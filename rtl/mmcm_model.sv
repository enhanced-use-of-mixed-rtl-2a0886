// mmcm_model: behavioural model of a mixed-mode clock manager (MMCM) output.
// This is a behavioural model, not synthesizable logic: on an FPGA the vendor
// clock-manager primitive takes its place.
//
// The real part divides the reference by D, locks a VCO to M times that
// (phase-frequency detector, charge pump, loop filter, VCO, feedback divider
// /M) and divides the VCO by Q, so
//     f_PFD = f_IN / D,  f_VCO = M/D * f_IN,  f_OUT = M/(D*Q) * f_IN.
// The model does not simulate the loop. It derives the output period from the
// declared reference period (CLKIN_PERIOD_PS, like the primitive's CLKIN1
// period attribute) and toggles clkout0 on an ideal grid of half periods
// anchored to the first reference edge after reset, each edge displaced by a
// random offset with a triangular distribution bounded by +/- JITTER_PP_PS/2.
// Edges are placed at absolute times, so rounding never accumulates and the
// long-run frequency ratio of two instances is exact; the random edge jitter
// is what the coherent sampler turns into entropy. The duty cycle is 1/2.
//
// M and Q are given in eighths (M8, Q8) because the part allows fractional
// values in steps of 1/8. Elaboration checks the part's limits
// 1 <= D <= 106, 2 <= M <= 64, 1 <= Q <= 128 and the speed-grade -1 frequency
// ranges 10..450 MHz (PFD), 600..1200 MHz (VCO), 4.68..800 MHz (output).
//
// Ports: clkin1 reference clock; rst (active high) and pwrdwn (power-down)
// both stop the output and drop locked; locked rises LOCK_CYCLES reference
// rising edges after both are released (the lock time is this model's
// choice). clkout0 starts toggling with the first reference edge after release.
module mmcm_model #(
  parameter int unsigned M8              = 496,      // M = 62.00
  parameter int unsigned D               = 8,
  parameter int unsigned Q8              = 64,       // Q = 8.00
  parameter real         CLKIN_PERIOD_PS = 10000.0,  // 100 MHz
  parameter real         JITTER_PP_PS    = 427.425,
  parameter int unsigned LOCK_CYCLES     = 64,
  parameter int unsigned SEED            = 1
) (
  input  logic clkin1,
  input  logic rst,
  input  logic pwrdwn,
  output logic clkout0,
  output logic locked
);

  timeunit 1ps;
  timeprecision 1fs;

  localparam real OUT_PERIOD_PS = CLKIN_PERIOD_PS * real'(D) * real'(Q8) / real'(M8);
  localparam real HALF_PS       = OUT_PERIOD_PS / 2.0;
  localparam real F_IN_MHZ      = 1.0e6 / CLKIN_PERIOD_PS;
  localparam real F_PFD_MHZ     = F_IN_MHZ / real'(D);
  localparam real F_VCO_MHZ     = F_PFD_MHZ * real'(M8) / 8.0;
  localparam real F_OUT_MHZ     = F_VCO_MHZ * 8.0 / real'(Q8);

  initial begin
    if (D < 1 || D > trng_pkg::D_MAX_LIMIT)
      $error("mmcm_model: D=%0d outside 1..106", D);
    if (M8 < trng_pkg::M8_MIN || M8 > trng_pkg::M8_MAX)
      $error("mmcm_model: M=%0d/8 outside 2..64", M8);
    if (Q8 < trng_pkg::Q8_MIN || Q8 > trng_pkg::Q8_MAX)
      $error("mmcm_model: Q=%0d/8 outside 1..128", Q8);
    if (F_PFD_MHZ < 10.0 || F_PFD_MHZ > 450.0)
      $error("mmcm_model: f_PFD=%f MHz outside 10..450", F_PFD_MHZ);
    if (F_VCO_MHZ < 600.0 || F_VCO_MHZ > 1200.0)
      $error("mmcm_model: f_VCO=%f MHz outside 600..1200", F_VCO_MHZ);
    if (F_OUT_MHZ < 4.68 || F_OUT_MHZ > 800.0)
      $error("mmcm_model: f_OUT=%f MHz outside 4.68..800", F_OUT_MHZ);
  end

  // Triangular random offset in [-JITTER_PP_PS/2, +JITTER_PP_PS/2].
  function automatic real edge_jitter();
    real u1, u2;
    u1 = real'($urandom % 1_000_001) / 1.0e6;
    u2 = real'($urandom % 1_000_001) / 1.0e6;
    return (u1 + u2 - 1.0) * JITTER_PP_PS / 2.0;
  endfunction

  wire running = !rst && !pwrdwn;

  // Lock indication.
  int unsigned lock_cnt;
  initial begin
    lock_cnt = 0;
    locked   = 1'b0;
  end
  always @(posedge clkin1 or negedge running) begin
    if (!running) begin
      lock_cnt <= 0;
      locked   <= 1'b0;
    end else if (lock_cnt < LOCK_CYCLES) begin
      lock_cnt <= lock_cnt + 1;
      locked   <= (lock_cnt + 1 >= LOCK_CYCLES);
    end
  end

  // Output clock generator.
  real         t0, target;
  longint      k;
  initial begin
    clkout0    = 1'b0;
    void'($urandom(SEED));
    forever begin
      wait (running);
      @(posedge clkin1);
      t0 = $realtime;
      k  = 0;
      while (running) begin
        k      = k + 1;
        target = t0 + real'(k) * HALF_PS + edge_jitter();
        #(target - $realtime);
        if (running) clkout0 = ~clkout0;
      end
      clkout0 = 1'b0;
    end
  end

endmodule

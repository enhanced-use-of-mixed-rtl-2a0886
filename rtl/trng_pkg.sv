// trng_pkg: parameter sets and parameter-selection arithmetic for the
// MMCM-based coherent-sampling TRNG.
//
// Two clocks Clk_A and Clk_B are synthesized from one reference clock f_IN by
// two mixed-mode clock managers. Each MMCM is set by a divider D (integer), a
// multiplier M and an output divider Q; M and Q may be fractional in steps of
// 1/8, so they are carried here in eighths (M8 = 8*M, Q8 = 8*Q). The output
// frequency is f_OUT = M / (D*Q) * f_IN.
//
// The functions below reproduce the parameter selection of the design:
//   nm_from_dcm  - "normal" port of an older DCM pair (multiplier M, divisor
//                  D) to an MMCM: Q takes the role of the DCM divisor, D = 1,
//                  and M and Q are both halved (M <= 24) or quartered (M > 24).
//   jt_from_nm   - "jittery" set: M and D are both multiplied by
//                  D_max = floor(64 / M), the largest factor the M <= 64 limit
//                  allows; f_OUT is unchanged but the MMCM jitter grows.
//   ratio_n      - N of the frequency ratio f_A : f_B = (N+1) : N, i.e. the
//                  number of Clk_B samples that sweep one Clk_A period.
// The DCM pairs of the four sets J01, J02, J22 and J23 and the peak-to-peak
// jitter of the J23 Clk_A output versus D_max are the design's reference data;
// everything else (types, encodings) is this implementation's choice.
package trng_pkg;

  timeunit 1ps;
  timeprecision 1fs;

  // One MMCM setting; M and Q in eighths.
  typedef struct packed {
    logic [15:0] m8;
    logic [15:0] d;
    logic [15:0] q8;
  } mmcm_cfg_t;

  // One DCM setting of the older design: f_OUT = M / D * f_IN.
  typedef struct packed {
    logic [15:0] m;
    logic [15:0] d;
  } dcm_cfg_t;

  typedef struct packed {
    mmcm_cfg_t a;
    mmcm_cfg_t b;
  } mmcm_pair_t;

  typedef struct packed {
    dcm_cfg_t a;
    dcm_cfg_t b;
  } dcm_pair_t;

  // Parameter sets for which the reference DCM values are known.
  typedef enum logic [1:0] {
    SET_J01 = 2'd0,
    SET_J02 = 2'd1,
    SET_J22 = 2'd2,
    SET_J23 = 2'd3
  } param_set_e;

  // Parameter-selection method.
  typedef enum logic [1:0] {
    METHOD_NM = 2'd0,   // normal: direct port of the DCM pair
    METHOD_JT = 2'd1    // jittery: M and D scaled by D_max
  } method_e;

  // MMCM limits: 1 <= D <= 106, 2 <= M <= 64, 1 <= Q <= 128.
  localparam int unsigned M8_MIN = 16;
  localparam int unsigned M8_MAX = 512;
  localparam int unsigned D_MAX_LIMIT = 106;
  localparam int unsigned Q8_MIN = 8;
  localparam int unsigned Q8_MAX = 1024;

  // Reference clock of the design, 100 MHz.
  localparam int unsigned F_IN_HZ = 100_000_000;

  function automatic dcm_pair_t dcm_set(param_set_e id);
    dcm_pair_t p;
    case (id)
      SET_J01: begin p.a = '{m: 16'd15, d: 16'd31}; p.b = '{m: 16'd14, d: 16'd29}; end
      SET_J02: begin p.a = '{m: 16'd21, d: 16'd22}; p.b = '{m: 16'd20, d: 16'd21}; end
      SET_J22: begin p.a = '{m: 16'd30, d: 16'd31}; p.b = '{m: 16'd29, d: 16'd30}; end
      default: begin p.a = '{m: 16'd31, d: 16'd32}; p.b = '{m: 16'd30, d: 16'd31}; end
    endcase
    return p;
  endfunction

  function automatic mmcm_cfg_t nm_from_dcm(dcm_cfg_t c);
    mmcm_cfg_t r;
    int unsigned div;
    div  = (c.m <= 16'd24) ? 2 : 4;
    r.m8 = 16'((32'(c.m) * 8) / div);
    r.q8 = 16'((32'(c.d) * 8) / div);
    r.d  = 16'd1;
    return r;
  endfunction

  // D_max = floor(64 / M) = floor(512 / M8).
  function automatic int unsigned d_max(mmcm_cfg_t c);
    return M8_MAX / 32'(c.m8);
  endfunction

  function automatic mmcm_cfg_t jt_from_nm(mmcm_cfg_t c);
    mmcm_cfg_t r;
    int unsigned k;
    k    = d_max(c);
    r.m8 = 16'(32'(c.m8) * k);
    r.d  = 16'(32'(c.d) * k);
    r.q8 = c.q8;
    return r;
  endfunction

  function automatic mmcm_pair_t select_set(param_set_e id, method_e method);
    dcm_pair_t  dp;
    mmcm_pair_t mp;
    dp   = dcm_set(id);
    mp.a = nm_from_dcm(dp.a);
    mp.b = nm_from_dcm(dp.b);
    if (method == METHOD_JT) begin
      mp.a = jt_from_nm(mp.a);
      mp.b = jt_from_nm(mp.b);
    end
    return mp;
  endfunction

  // f_A / f_B = (M8a * Db * Q8b) / (Da * Q8a * M8b) = (N+1) / N.
  // Returns N = den / (num - den); 0 when f_A <= f_B.
  function automatic int unsigned ratio_n(mmcm_pair_t p);
    longint unsigned num, den;
    num = longint'(p.a.m8) * longint'(p.b.d) * longint'(p.b.q8);
    den = longint'(p.a.d) * longint'(p.a.q8) * longint'(p.b.m8);
    if (num <= den) return 0;
    return 32'(den / (num - den));
  endfunction

  // Output period in picoseconds for a reference period in picoseconds.
  function automatic real out_period_ps(mmcm_cfg_t c, real clkin_period_ps);
    return clkin_period_ps * real'(c.d) * real'(c.q8) / real'(c.m8);
  endfunction

  // Peak-to-peak jitter [ps] of the J23 Clk_A output (f_OUT = 96.875 MHz)
  // when M and D are both scaled by k = 1..8.
  function automatic real j23_jitter_pp_ps(int unsigned k);
    case (k)
      1: return 141.837;
      2: return 184.566;
      3: return 229.787;
      4: return 273.577;
      5: return 305.392;
      6: return 343.210;
      7: return 383.515;
      default: return 427.425;
    endcase
  endfunction

  // Jitter assumed for a parameter set: the J23 table entry for the factor
  // the method applies to M and D (1 for the normal method).
  function automatic real default_jitter_pp_ps(param_set_e id, method_e method);
    dcm_pair_t dp;
    dp = dcm_set(id);
    if (method == METHOD_JT) return j23_jitter_pp_ps(d_max(nm_from_dcm(dp.a)));
    return j23_jitter_pp_ps(1);
  endfunction

endpackage

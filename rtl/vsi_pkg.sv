// vsi_pkg: types, constants and small float helpers shared by the
// real-time inverter simulator.
//
// All model quantities are IEEE-754 single-precision words (fp32_t).  The
// coefficient record coef_t collects every constant the host precomputes:
// the ADC switch coefficients of the trapezoidal switch model, the RL filter
// coefficients, the constant inverse nodal matrix and the controller
// coefficients.  Device arrays are indexed 0..5 = switches S1..S6 and
// 6..11 = diodes D1..D6.  Phase a uses S1 (upper) / S4 (lower), phase b
// S3 / S6, phase c S5 / S2, the numbering of the nodal equations.
//
// The default coefficients (COEF_DEFAULT) follow from: time step 10 us,
// PLL PI gains Kp = 2.85, Ki = 1268.35, centre frequency 628 rad/s and a
// 380 V DC link (given values), and from these chosen values: switch
// Ls = 1 uH, Cs = 100 uF, Rs = 0.15 ohm (conductance G = dt/2Ls = 5 S for both
// states), filter L = 5 mH, R = 0.1 ohm, outer PI gains and inner P gain.
package vsi_pkg;

  typedef logic [31:0] fp32_t;

  localparam int NDEV = 12;   // 6 switches + 6 diodes
  localparam int NNODE = 5;   // v0, vLa, vLb, vLc, idc

  // Frequently used float constants
  localparam fp32_t F_ZERO     = 32'h0000_0000;
  localparam fp32_t F_ONE      = 32'h3f80_0000;
  localparam fp32_t F_HALF     = 32'h3f00_0000;
  localparam fp32_t F_1P5      = 32'h3fc0_0000;
  localparam fp32_t F_2_3      = 32'h3f2a_aaab;  // 2/3
  localparam fp32_t F_1_3      = 32'h3eaa_aaab;  // 1/3
  localparam fp32_t F_INV_SQ3  = 32'h3f13_cd3a;  // 1/sqrt(3)
  localparam fp32_t F_SQ3_2    = 32'h3f5d_b3d7;  // sqrt(3)/2
  localparam fp32_t F_TWO_PI   = 32'h40c9_0fdb;  // 2*pi
  localparam fp32_t F_PH24     = 32'h4a22_f983;  // 2^24 / (2*pi)

  // Host-written coefficients
  typedef struct packed {
    fp32_t a1_on;     // dt/(2Ls)
    fp32_t a2_on;     // 1
    fp32_t a1_off;    // -2Cs/(2CsRs+dt)   (sign of eq. (1) folded in)
    fp32_t a2_off;    // (2CsRs-dt)/(2CsRs+dt)
    fp32_t g;         // device conductance, equal in both states
    fp32_t a1_f;      // dt/(R dt + L)
    fp32_t a2_f;      // L/(R dt + L)
    fp32_t dt;        // step size
    fp32_t wn;        // PLL centre frequency
    fp32_t pll_a1;    // dt/2 Ki + Kp
    fp32_t pll_a2;    // dt/2 Ki - Kp
    fp32_t pll_a3;    // 1
    fp32_t vdc_a1;
    fp32_t vdc_a2;
    fp32_t vdc_a3;
    fp32_t q_a1;
    fp32_t q_a2;
    fp32_t q_a3;
    fp32_t kp_i;      // inner current-loop proportional gain
    fp32_t kmod;      // 2 / Vdc_ref, voltage to modulation index
    fp32_t [NNODE-1:0][NNODE-1:0] ginv;  // inverse nodal matrix, [row][col]
  } coef_t;

  localparam int NCOEF = 20 + NNODE*NNODE;

  // Inverse of the nodal matrix for Gt = G_S + G_D = 10 S:
  //   v0  = I5
  //   vLx = I(x)/(2Gt) + I5/2
  //   idc = -I1 - (I2+I3+I4)/2 + 1.5 Gt I5
  localparam fp32_t F_INV2GT = 32'h3d4c_cccd;  // 0.05
  localparam fp32_t F_M1     = 32'hbf80_0000;  // -1
  localparam fp32_t F_MHALF  = 32'hbf00_0000;  // -0.5
  localparam fp32_t F_15     = 32'h4170_0000;  // 15

  localparam coef_t COEF_DEFAULT = '{
    a1_on:  32'h40a0_0000,   // 5
    a2_on:  32'h3f80_0000,   // 1
    a1_off: 32'hc0a0_0000,   // -5
    a2_off: 32'h3f00_0000,   // 0.5
    g:      32'h40a0_0000,   // 5 S
    a1_f:   32'h3b03_0bb9,   // 1.9996e-3
    a2_f:   32'h3f7f_f2e5,   // 0.99980004
    dt:     32'h3727_c5ac,   // 1e-5
    wn:     32'h441d_0000,   // 628
    pll_a1: 32'h4036_ce4e,   // 2.85634175
    pll_a2: 32'hc035_fe7f,   // -2.84365825
    pll_a3: 32'h3f80_0000,   // 1
    vdc_a1: 32'h3f00_0347,   // Kp 0.5, Ki 10: 0.50005
    vdc_a2: 32'hbeff_f972,   // -0.49995
    vdc_a3: 32'h3f80_0000,
    q_a1:   32'h3a03_2336,   // Kp 5e-4, Ki 0.05: 5.0025e-4
    q_a2:   32'hba03_01a8,   // -4.9975e-4
    q_a3:   32'h3f80_0000,
    kp_i:   32'h4120_0000,   // 10
    kmod:   32'h3bac_7692,   // 2/380
    // Packed literals list the highest index first: rows 4..0, and inside
    // each row columns 4..0 (column 4 multiplies I5 = Vdc).
    ginv: '{
      '{F_15,   F_MHALF,  F_MHALF,  F_MHALF,  F_M1  },  // row 4: idc
      '{F_HALF, F_INV2GT, F_ZERO,   F_ZERO,   F_ZERO},  // row 3: vLc
      '{F_HALF, F_ZERO,   F_INV2GT, F_ZERO,   F_ZERO},  // row 2: vLb
      '{F_HALF, F_ZERO,   F_ZERO,   F_INV2GT, F_ZERO},  // row 1: vLa
      '{F_ONE,  F_ZERO,   F_ZERO,   F_ZERO,   F_ZERO}   // row 0: v0
    }
  };

  function automatic logic fp_is_pos(input fp32_t x);
    return !x[31] && (x[30:23] != 8'd0);
  endfunction

  function automatic fp32_t fp_neg(input fp32_t x);
    return {~x[31], x[30:0]};
  endfunction

  // Float to signed integer of value x * 2^frac, truncated toward zero and
  // saturated to W bits (W <= 32).
  function automatic logic signed [31:0] fp_to_fix(input fp32_t x, input int frac, input int w);
    logic [7:0]  e;
    logic [23:0] m;
    int          sh;
    logic [63:0] mag;
    logic [63:0] lim;
    e  = x[30:23];
    m  = {1'b1, x[22:0]};
    sh = int'(e) - 127 - 23 + frac;
    if (e == 8'd0) mag = '0;
    else if (sh >= 40) mag = '1;
    else if (sh >= 0) mag = 64'(m) << sh;
    else if (sh > -24) mag = 64'(m) >> (-sh);
    else mag = '0;
    lim = (64'd1 << (w-1)) - 64'd1;
    if (mag > lim) mag = lim;
    return x[31] ? -$signed(mag[31:0]) : $signed(mag[31:0]);
  endfunction

  // Signed integer v (|v| < 2^31) with frac fractional bits to float,
  // truncating bits beyond 24 significant ones.
  function automatic fp32_t fix_to_fp(input logic signed [31:0] v, input int frac);
    logic [31:0] mag;
    int          msb;
    logic [31:0] norm;
    int          e;
    if (v == 0) return F_ZERO;
    mag = v[31] ? 32'(-v) : 32'(v);
    msb = 0;
    for (int k = 0; k < 32; k++) if (mag[k]) msb = k;
    norm = mag << (31 - msb);
    e = msb - frac + 127;
    if (e <= 0) return F_ZERO;
    return {v[31], 8'(e), norm[30:8]};
  endfunction

endpackage

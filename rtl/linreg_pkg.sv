// linreg_pkg: types, widths and design-time constant functions shared by the
// linear-regression datapath.
//
// The regression of a sequence d_0..d_{N-1} against its index i is
//   a = (N/D)      * sum(i*d_i) - (S1/D) * sum(d_i)
//   b = (S2/D)     * sum(d_i)   - (S1/D) * sum(i*d_i)
// with S1 = sum(i), S2 = sum(i^2) and D = N*S2 - S1^2, all over i = 0..N-1.
// The four factors in brackets only depend on N, so they are computed here at
// elaboration time and stored as 18-bit integers (a ROM per sequence length).
// Each factor is scaled by a power of two so that it uses as many of the 18
// bits as possible while the two products of one coefficient stay aligned:
// sum(i*d_i) enters the multiplier with its SHIFT lowest bits discarded, so
// its factor carries SHIFT more fractional bits than the partner factor.
// For N = 256 and SHIFT = 7 this gives the scalings 2^37, 2^30, 2^23 and 2^30
// (a with 30 and b with 23 fractional bits); for N = 128 and SHIFT = 6 it
// gives 2^34, 2^28, 2^22 and 2^28.
package linreg_pkg;

  // ---- data widths ----
  localparam int unsigned PHASE_W = 8;   // instantaneous phase, -pi..pi
  localparam int unsigned D_W     = 17;  // unwrapped phase within one packet
  localparam int unsigned SD_W    = 24;  // sum(d_i) for the 256 model
  localparam int unsigned SID_W   = 32;  // sum(i*d_i) for the 256 model

  // ---- DSP slice ports (DSP48E-like) ----
  localparam int unsigned DSP_A_W  = 30;  // A port; the multiplier uses 25 bits
  localparam int unsigned DSP_AM_W = 25;  // multiplier width on A
  localparam int unsigned DSP_B_W  = 18;  // B port / multiplier width on B
  localparam int unsigned DSP_P_W  = 48;  // C, P and ALU width
  localparam int unsigned CONST_W  = DSP_B_W;

  // ---- sequence-length models ----
  typedef enum logic {
    MODEL_LONG  = 1'b0,   // 256-sample packets
    MODEL_SHORT = 1'b1    // 128-sample packets
  } model_e;

  // ---- DSP slice operand selection ----
  typedef enum logic [1:0] {X_ZERO, X_M, X_P, X_AB} xsel_e;
  typedef enum logic [1:0] {Y_ZERO, Y_M, Y_C}       ysel_e;
  typedef enum logic [1:0] {Z_ZERO, Z_P, Z_C}       zsel_e;

  // P <= sub ? Z - (X + Y) : Z + X + Y
  typedef struct packed {
    xsel_e x;
    ysel_e y;
    zsel_e z;
    logic  sub;
  } dsp_op_t;

  localparam dsp_op_t DSP_HOLD = '{x: X_ZERO, y: Y_ZERO, z: Z_P, sub: 1'b0};

  // ---- the four products of the coefficient stage, in issue order ----
  typedef enum logic [1:0] {
    OP_A_SID = 2'd0,   // P  = (N/D)  * sum(i*d_i)>>SHIFT
    OP_A_SD  = 2'd1,   // P -= (S1/D) * sum(d_i)          -> a
    OP_B_SD  = 2'd2,   // P  = (S2/D) * sum(d_i)
    OP_B_SID = 2'd3    // P -= (S1/D) * sum(i*d_i)>>SHIFT -> b
  } coef_op_e;

  // ---- design-time constant functions ----
  function automatic longint lr_s1(input int n);
    return longint'(n) * (longint'(n) - 1) / 2;
  endfunction

  function automatic longint lr_s2(input int n);
    return (longint'(n) - 1) * longint'(n) * (2 * longint'(n) - 1) / 6;
  endfunction

  function automatic longint lr_det(input int n);
    return longint'(n) * lr_s2(n) - lr_s1(n) * lr_s1(n);
  endfunction

  function automatic longint lr_num(input int n, input coef_op_e op);
    case (op)
      OP_A_SID: return longint'(n);
      OP_B_SD:  return lr_s2(n);
      default:  return lr_s1(n);
    endcase
  endfunction

  // round(num(op) * 2^e / D)
  function automatic longint lr_scaled(input int n, input coef_op_e op, input int e);
    return ((lr_num(n, op) <<< e) + lr_det(n) / 2) / lr_det(n);
  endfunction

  function automatic bit lr_fits(input longint v);
    return v < (longint'(1) <<< (CONST_W - 1));
  endfunction

  // fractional bits of a: largest e with both a-factors fitting 18 signed bits
  function automatic int lr_frac_a(input int n, input int shift);
    int e = 0;
    while (lr_fits(lr_scaled(n, OP_A_SID, e + 1 + shift)) &&
           lr_fits(lr_scaled(n, OP_A_SD, e + 1)))
      e++;
    return e;
  endfunction

  // fractional bits of b: largest e with both b-factors fitting 18 signed bits
  function automatic int lr_frac_b(input int n, input int shift);
    int e = 0;
    while (lr_fits(lr_scaled(n, OP_B_SD, e + 1)) &&
           lr_fits(lr_scaled(n, OP_B_SID, e + 1 + shift)))
      e++;
    return e;
  endfunction

  // the ROM word for sequence length n, discard shift and product op
  function automatic logic signed [CONST_W-1:0] lr_const(input int n, input int shift,
                                                          input coef_op_e op);
    int e;
    case (op)
      OP_A_SID: e = lr_frac_a(n, shift) + shift;
      OP_A_SD:  e = lr_frac_a(n, shift);
      OP_B_SD:  e = lr_frac_b(n, shift);
      default:  e = lr_frac_b(n, shift) + shift;
    endcase
    return CONST_W'(lr_scaled(n, op, e));
  endfunction

endpackage

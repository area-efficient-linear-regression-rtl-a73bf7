// lr_macc2: coefficient stage, one DSP slice computing a and b in turn.
//
// Each coefficient is the difference of two products of an accumulated sum
// and a ROM constant:
//   a * 2^Fa = K0 * (sum(i*d_i) >> s) - K1 * sum(d_i)
//   b * 2^Fb = K2 * sum(d_i)          - K3 * (sum(i*d_i) >> s)
// The multiplexer in front of port A selects sum(d_i), or sum(i*d_i) with its
// s lowest bits discarded so that it fits the 25-bit multiplier input; the
// constant goes to the 18-bit B input. The first product of a pair is loaded
// (Z = 0), the second subtracted from it (Z = P, ALU subtracts). With
// SHIFT_LONG == SHIFT_SHORT both models share one shifted copy of sum(i*d_i)
// (two-input multiplexer, smallest area); with different shifts the
// multiplexer has a shifted copy per model (more precision, more area).
//
// The raw result carries Fa (Fb) fractional bits that depend on the model.
// The outputs are aligned to the long model's scaling: a_o has FRAC_A and b_o
// FRAC_B fractional bits (30 and 23 for the defaults); the short model's
// results are shifted left by the difference. This alignment is this design's
// choice.
//
// Interface: the controller issues op (in the order OP_A_SID, OP_A_SD,
// OP_B_SD, OP_B_SID) with op_valid, the model and the ROM word k. sd/sid
// must stay stable while their ops are issued. Timing: an op issued in cycle
// t reaches P at the end of cycle t + 1; a is captured two cycles after its
// second op, b likewise, and {a_o, b_o, model_o} are presented with a
// one-cycle out_valid pulse in cycle t0 + 6 for a first op issued in t0
// (b is on P five cycles after the first op).
module lr_macc2
  import linreg_pkg::*;
#(
  parameter int unsigned N_LONG      = 256,
  parameter int unsigned N_SHORT     = 128,
  parameter int unsigned SHIFT_LONG  = 7,
  parameter int unsigned SHIFT_SHORT = 7
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic signed [SD_W-1:0]     sd,
  input  logic signed [SID_W-1:0]    sid,
  input  logic                       op_valid,
  input  coef_op_e                   op,
  input  model_e                     model,
  input  logic signed [CONST_W-1:0]  k,
  output logic                       out_valid,
  output model_e                     model_o,
  output logic signed [DSP_P_W-1:0]  a_o,
  output logic signed [DSP_P_W-1:0]  b_o
);

  localparam int FRAC_A = lr_frac_a(N_LONG, SHIFT_LONG);
  localparam int FRAC_B = lr_frac_b(N_LONG, SHIFT_LONG);
  localparam int ALIGN_A = FRAC_A - lr_frac_a(N_SHORT, SHIFT_SHORT);
  localparam int ALIGN_B = FRAC_B - lr_frac_b(N_SHORT, SHIFT_SHORT);

  typedef struct packed {
    logic     valid;
    coef_op_e op;
    model_e   model;
  } tag_t;

  logic signed [SID_W-1:0]    sid_sh;
  logic signed [DSP_A_W-1:0]  a_in;
  logic signed [DSP_P_W-1:0]  p, a_raw;
  dsp_op_t                    dop;
  tag_t [1:0]                 tag_d;   // op tags, aligned with P after two cycles

  // operand multiplexer
  always_comb begin
    sid_sh = (model == MODEL_SHORT) ? (sid >>> SHIFT_SHORT) : (sid >>> SHIFT_LONG);
    if (op == OP_A_SD || op == OP_B_SD) a_in = DSP_A_W'(sd);
    else                                a_in = DSP_A_W'(signed'(sid_sh[DSP_AM_W-1:0]));
  end

  always_comb begin
    if (!op_valid)                         dop = DSP_HOLD;
    else if (op == OP_A_SID || op == OP_B_SD)
      dop = '{x: X_M, y: Y_M, z: Z_ZERO, sub: 1'b0};
    else
      dop = '{x: X_M, y: Y_M, z: Z_P,    sub: 1'b1};
  end

  dsp_slice u_dsp (
    .clk (clk),
    .rst (rst),
    .a   (a_in),
    .b   (k),
    .c   ('0),
    .op  (dop),
    .p   (p)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      tag_d     <= '0;
      a_raw     <= '0;
      a_o       <= '0;
      b_o       <= '0;
      model_o   <= MODEL_LONG;
      out_valid <= 1'b0;
    end else begin
      tag_d     <= {tag_d[0], tag_t'{valid: op_valid, op: op, model: model}};
      out_valid <= 1'b0;
      if (tag_d[1].valid && tag_d[1].op == OP_A_SD)
        a_raw <= p;
      if (tag_d[1].valid && tag_d[1].op == OP_B_SID) begin
        out_valid <= 1'b1;
        model_o   <= tag_d[1].model;
        if (tag_d[1].model == MODEL_SHORT) begin
          a_o <= a_raw <<< ALIGN_A;
          b_o <= p     <<< ALIGN_B;
        end else begin
          a_o <= a_raw;
          b_o <= p;
        end
      end
    end
  end

  initial begin
    assert (ALIGN_A >= 0 && ALIGN_B >= 0)
      else $fatal(1, "lr_macc2: short model has more fractional bits than the long one");
  end

endmodule

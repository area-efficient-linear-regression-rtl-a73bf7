// lr_acc: two-input accumulator for sum(d_i), built on one DSP slice.
//
// Two samples arrive per clock. The first, sign-extended to 48 bits, is put
// on the concatenated A:B port (multiplexer X), the second on port C
// (multiplexer Y), and the running sum P is fed back through multiplexer Z.
// On the first pair of a sequence Z selects zero, which restarts the sum
// without a separate reset cycle; cycles without a valid pair hold P.
//
// Interface: in_valid qualifies d0/d1; in_first marks the first pair of a
// sequence. Timing: the sum including the pair of cycle t is on sum_o from
// cycle t + 2. sum_o is sized for a 256-sample sequence of 17-bit samples
// (24 bits); the slice itself accumulates in 48 bits.
// The port assignment (A:B, C, P fed back) is the published one; restarting
// through Z = 0 rather than a reset pulse is this design's choice.
module lr_acc
  import linreg_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  input  logic                   in_first,
  input  logic signed [D_W-1:0]  d0,
  input  logic signed [D_W-1:0]  d1,
  output logic signed [SD_W-1:0] sum_o
);

  logic signed [DSP_P_W-1:0] ab, p;
  dsp_op_t op;

  assign ab = DSP_P_W'(d0);

  always_comb begin
    if (!in_valid)     op = DSP_HOLD;
    else if (in_first) op = '{x: X_AB, y: Y_C, z: Z_ZERO, sub: 1'b0};
    else               op = '{x: X_AB, y: Y_C, z: Z_P,    sub: 1'b0};
  end

  dsp_slice u_dsp (
    .clk (clk),
    .rst (rst),
    .a   (ab[DSP_P_W-1 -: DSP_A_W]),
    .b   (ab[DSP_B_W-1:0]),
    .c   (DSP_P_W'(d1)),
    .op  (op),
    .p   (p)
  );

  assign sum_o = p[SD_W-1:0];

endmodule

// dsp_slice: a simplified DSP48E-style arithmetic slice written in plain logic.
//
// A 25x18 signed multiplier (low 25 bits of A times B) feeds three operand
// multiplexers X, Y and Z and a 48-bit adder/subtractor:
//   P <= op.sub ? Z - (X + Y) : Z + X + Y
// X selects 0, the product M, P or the 48-bit concatenation A:B; Y selects
// 0, M or C; Z selects 0, P or C. As in the real slice, the product is only
// available as the X/Y pair, so X = M must come with Y = M (the model puts the
// whole product on X and zero on Y). Selecting Z = 0 restarts an accumulation,
// Z = P with X = Y = 0 holds it.
//
// Timing: A, B, C and the operation are registered together (one input
// stage, like AREG = BREG = CREG = 1), the multiplier has no pipeline
// register (MREG = 0) and P is registered: an operation presented in cycle t
// is visible on P from cycle t + 2. The register placement is this design's
// choice; the slice's function follows the DSP48E description.
module dsp_slice
  import linreg_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst,    // synchronous, clears all registers
  input  logic signed [DSP_A_W-1:0]  a,
  input  logic signed [DSP_B_W-1:0]  b,
  input  logic signed [DSP_P_W-1:0]  c,
  input  dsp_op_t                    op,
  output logic signed [DSP_P_W-1:0]  p
);

  logic signed [DSP_A_W-1:0]  a_q;
  logic signed [DSP_B_W-1:0]  b_q;
  logic signed [DSP_P_W-1:0]  c_q;
  dsp_op_t                    op_q;

  logic signed [DSP_P_W-1:0]  m, x, y, z, sum_xy;

  always_ff @(posedge clk) begin
    if (rst) begin
      a_q  <= '0;
      b_q  <= '0;
      c_q  <= '0;
      op_q <= DSP_HOLD;
    end else begin
      a_q  <= a;
      b_q  <= b;
      c_q  <= c;
      op_q <= op;
    end
  end

  always_comb begin
    m = DSP_P_W'(signed'(a_q[DSP_AM_W-1:0]) * b_q);

    unique case (op_q.x)
      X_M:     x = m;
      X_P:     x = p;
      X_AB:    x = {a_q, b_q};
      default: x = '0;
    endcase

    unique case (op_q.y)
      Y_C:     y = c_q;
      default: y = '0;       // Y_M: the product is carried whole on X
    endcase

    unique case (op_q.z)
      Z_P:     z = p;
      Z_C:     z = c_q;
      default: z = '0;
    endcase

    sum_xy = x + y;
  end

  always_ff @(posedge clk) begin
    if (rst) p <= '0;
    else     p <= op_q.sub ? z - sum_xy : z + sum_xy;
  end

  // the product occupies both X and Y, as in the DSP48E
  assert property (@(posedge clk) disable iff (rst) (op_q.x == X_M) == (op_q.y == Y_M))
    else $error("dsp_slice: X = M requires Y = M");

endmodule

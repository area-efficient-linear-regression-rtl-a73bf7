// lr_macc1: two-input multiply-accumulator for sum(i*d_i), on three DSP slices.
//
// Two slices multiply the two samples of a clock (port A) by their indexes
// (port B) and pass the product straight through their ALU (P = M + 0). The
// third slice adds both products to its running sum: the first product on the
// concatenated A:B port, the second on C, the sum fed back through Z. The
// first pair of a sequence selects Z = 0 to restart the sum.
//
// Interface: in_valid qualifies the pair, in_first marks the first pair of a
// sequence, idx0/idx1 are the indexes of d0/d1 (2k and 2k+1 for the k-th
// pair). Timing: the product slices take two cycles and the accumulating slice
// two more, so the sum including the pair of cycle t is on sum_o from cycle
// t + 4. sum_o is sized for a 256-sample sequence of 17-bit samples (32 bits).
// The three-slice arrangement is the published one; the two-slice variant
// with an external adder is not built.
module lr_macc1
  import linreg_pkg::*;
#(
  parameter int unsigned IDX_W = 8
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic                    in_first,
  input  logic signed [D_W-1:0]   d0,
  input  logic signed [D_W-1:0]   d1,
  input  logic        [IDX_W-1:0] idx0,
  input  logic        [IDX_W-1:0] idx1,
  output logic signed [SID_W-1:0] sum_o
);

  localparam dsp_op_t OP_MUL = '{x: X_M, y: Y_M, z: Z_ZERO, sub: 1'b0};

  logic signed [DSP_P_W-1:0] p0, p1, p;
  logic [1:0] valid_d, first_d;     // control aligned with the products
  dsp_op_t    acc_op;

  dsp_slice u_mul0 (
    .clk (clk), .rst (rst),
    .a   (DSP_A_W'(d0)),
    .b   (DSP_B_W'(idx0)),
    .c   ('0),
    .op  (OP_MUL),
    .p   (p0)
  );

  dsp_slice u_mul1 (
    .clk (clk), .rst (rst),
    .a   (DSP_A_W'(d1)),
    .b   (DSP_B_W'(idx1)),
    .c   ('0),
    .op  (OP_MUL),
    .p   (p1)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_d <= '0;
      first_d <= '0;
    end else begin
      valid_d <= {valid_d[0], in_valid};
      first_d <= {first_d[0], in_first};
    end
  end

  always_comb begin
    if (!valid_d[1])     acc_op = DSP_HOLD;
    else if (first_d[1]) acc_op = '{x: X_AB, y: Y_C, z: Z_ZERO, sub: 1'b0};
    else                 acc_op = '{x: X_AB, y: Y_C, z: Z_P,    sub: 1'b0};
  end

  dsp_slice u_acc (
    .clk (clk), .rst (rst),
    .a   (p0[DSP_P_W-1 -: DSP_A_W]),
    .b   (p0[DSP_B_W-1:0]),
    .c   (p1),
    .op  (acc_op),
    .p   (p)
  );

  assign sum_o = p[SID_W-1:0];

endmodule

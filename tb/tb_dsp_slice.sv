// tb_dsp_slice: random operations on the DSP slice against a cycle model.
// Operands and operations are random (product on X/Y, A:B, C, P feedback,
// add and subtract); P is checked every cycle, which also checks the two-cycle
// latency from the operand ports to P.
module tb_dsp_slice;
  import linreg_pkg::*;

  logic clk = 1'b0, rst;
  logic signed [29:0] a;
  logic signed [17:0] b;
  logic signed [47:0] c, p;
  dsp_op_t op;

  dsp_slice dut (.clk(clk), .rst(rst), .a(a), .b(b), .c(c), .op(op), .p(p));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic signed [29:0] a_q;
  logic signed [17:0] b_q;
  logic signed [47:0] c_q, p_exp;
  dsp_op_t op_q;

  function automatic logic signed [47:0] next_p(input logic signed [47:0] pp);
    logic signed [47:0] x, y, z, m;
    m = 48'(signed'(a_q[24:0])) * 48'(b_q);
    case (op_q.x) X_M: x = m; X_P: x = pp; X_AB: x = {a_q, b_q}; default: x = 0; endcase
    y = (op_q.y == Y_C) ? c_q : 48'sd0;
    case (op_q.z) Z_P: z = pp; Z_C: z = c_q; default: z = 0; endcase
    return op_q.sub ? z - (x + y) : z + x + y;
  endfunction

  always @(posedge clk) begin
    if (rst) begin
      p_exp <= 0; a_q <= 0; b_q <= 0; c_q <= 0; op_q <= DSP_HOLD;
    end else begin
      p_exp <= next_p(p_exp);
      a_q <= a; b_q <= b; c_q <= c; op_q <= op;
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; a = 0; b = 0; c = 0; op = DSP_HOLD;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (p !== p_exp) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: p=%0d exp=%0d", i, p, p_exp);
      end
      checks++;
      a = 30'($urandom);
      b = 18'($urandom);
      c = {16'($urandom), 32'($urandom)};
      if ($urandom_range(1)) begin
        op.x = X_M; op.y = Y_M;
      end else begin
        op.x = xsel_e'($urandom_range(3));
        if (op.x == X_M) op.x = X_AB;
        op.y = $urandom_range(1) ? Y_C : Y_ZERO;
      end
      op.z = zsel_e'($urandom_range(2));
      op.sub = 1'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_lr_macc2: the coefficient stage with random sums and random constants.
// Groups of four ops are issued back to back or with gaps; each result must
// come six cycles after its first op, bit-exact against
//   a = K0*(sid>>>s) - K1*sd,  b = K2*sd - K3*(sid>>>s)
// aligned to the 256-sample scaling. Two instances: equal discard shifts
// (7/7, alignment 3/2 bits for the 128 model) and per-model shifts (7/6,
// alignment 2/1 bits).
module tb_lr_macc2;
  import linreg_pkg::*;

  logic clk = 1'b0, rst;
  logic signed [23:0] sd;
  logic signed [31:0] sid;
  logic op_valid;
  coef_op_e op;
  model_e model;
  logic signed [17:0] k;
  logic v7, v6;
  model_e m7, m6;
  logic signed [47:0] a7, b7, a6, b6;

  lr_macc2 dut7 (.clk(clk), .rst(rst), .sd(sd), .sid(sid), .op_valid(op_valid), .op(op),
                 .model(model), .k(k), .out_valid(v7), .model_o(m7), .a_o(a7), .b_o(b7));
  lr_macc2 #(.SHIFT_SHORT(6)) dut6 (.clk(clk), .rst(rst), .sd(sd), .sid(sid),
                 .op_valid(op_valid), .op(op), .model(model), .k(k), .out_valid(v6),
                 .model_o(m6), .a_o(a6), .b_o(b6));

  always #5 clk = ~clk;

  typedef struct { longint a7, b7, a6, b6; model_e m; longint due; } exp_t;
  exp_t q[$];
  int checks = 0, failures = 0;
  longint cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  always @(negedge clk) begin
    check(v7 == v6, "both instances in step");
    if (!rst && v7) begin
      exp_t r;
      if (q.size() == 0) check(0, "unexpected result");
      else begin
        r = q.pop_front();
        check(cyc == r.due, $sformatf("timing: at %0d due %0d", cyc, r.due));
        check(m7 == r.m && m6 == r.m, "model");
        check(a7 == r.a7 && b7 == r.b7, $sformatf("7/7: a %0d/%0d b %0d/%0d", a7, r.a7, b7, r.b7));
        check(a6 == r.a6 && b6 == r.b6, $sformatf("7/6: a %0d/%0d b %0d/%0d", a6, r.a6, b6, r.b6));
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint kk[4];
    exp_t r;
    rst = 1; op_valid = 0; op = OP_A_SID; model = MODEL_LONG; k = 0; sd = 0; sid = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int g = 0; g < 300; g++) begin
      longint t7, t6;
      model = model_e'($urandom_range(1));
      sd  = 24'($urandom);
      sid = (model == MODEL_SHORT) ? 32'(longint'($signed(31'($urandom)))) : 32'($urandom);
      for (int j = 0; j < 4; j++) kk[j] = $urandom_range(131071);
      t7 = longint'(sid) >>> 7;
      t6 = longint'(sid) >>> ((model == MODEL_SHORT) ? 6 : 7);
      r.m  = model;
      r.a7 = (kk[0] * t7 - kk[1] * sd) <<< ((model == MODEL_SHORT) ? 3 : 0);
      r.b7 = (kk[2] * sd - kk[3] * t7) <<< ((model == MODEL_SHORT) ? 2 : 0);
      r.a6 = (kk[0] * t6 - kk[1] * sd) <<< ((model == MODEL_SHORT) ? 2 : 0);
      r.b6 = (kk[2] * sd - kk[3] * t6) <<< ((model == MODEL_SHORT) ? 1 : 0);
      for (int j = 0; j < 4; j++) begin
        if (j == 0) r.due = cyc + 6;
        op_valid = 1;
        op = coef_op_e'(j);
        k = 18'(kk[j]);
        @(negedge clk);
      end
      q.push_back(r);
      op_valid = 0;
      op = coef_op_e'($urandom_range(3));
      sd = 24'($urandom);
      sid = 32'($urandom);
      if ($urandom_range(1)) repeat ($urandom_range(4)) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    check(q.size() == 0, "all results seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

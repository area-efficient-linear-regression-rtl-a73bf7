// tb_lr_control: the sequence control against a cycle model.
// Random starts (complete sequences of both lengths, back-to-back starts,
// starts that cut a sequence short, idle stretches) are applied; every cycle
// the accumulator controls and indexes, the load strobe (four cycles after the
// last pair) and the four coefficient ops (the four cycles after the load,
// with that sequence's model) are compared with the model.
module tb_lr_control;
  import linreg_pkg::*;

  logic clk = 1'b0, rst, start;
  model_e model;
  logic acc_valid, acc_first, ld, op_valid;
  logic [7:0] idx0, idx1;
  coef_op_e op;
  model_e op_model;

  lr_control dut (.clk(clk), .rst(rst), .start_i(start), .model_i(model),
                  .acc_valid_o(acc_valid), .acc_first_o(acc_first), .idx0_o(idx0),
                  .idx1_o(idx1), .ld_o(ld), .op_valid_o(op_valid), .op_o(op),
                  .op_model_o(op_model));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_ld = 0, n_abort = 0;
  model_e ld_at [longint];
  int     op_at [longint];
  model_e opm_at [longint];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit act = 0;
    int cnt = 0, k;
    model_e sm = MODEL_LONG, m;
    bit run, last;
    rst = 1; start = 0; model = MODEL_LONG;
    repeat (3) @(negedge clk);
    rst = 0;
    for (longint i = 0; i < 8000; i++) begin
      @(negedge clk);
      // stimulus: mostly complete sequences, some restarts and gaps
      start = (!act && $urandom_range(3) == 0) || (act && $urandom_range(150) == 0);
      if (act && start) n_abort++;
      model = model_e'($urandom_range(1));
      #1;
      run = start || act;
      k   = start ? 0 : cnt;
      m   = start ? model : sm;
      last = run && (k == ((m == MODEL_SHORT) ? 63 : 127));
      check(acc_valid == run && acc_first == start, $sformatf("valid/first at %0d", i));
      if (run) check(idx0 == 8'(2 * k) && idx1 == 8'(2 * k + 1), $sformatf("index at %0d", i));
      check(ld == ld_at.exists(i), $sformatf("ld at %0d", i));
      check(op_valid == op_at.exists(i), $sformatf("op_valid at %0d", i));
      if (op_at.exists(i))
        check(op == coef_op_e'(op_at[i]) && op_model == opm_at[i], $sformatf("op at %0d", i));
      if (last) begin
        ld_at[i + 4] = m;
        for (int j = 0; j < 4; j++) begin
          op_at[i + 5 + j]  = j;
          opm_at[i + 5 + j] = m;
        end
        n_ld++;
      end
      if (start) sm = model;
      if (run) begin cnt = k + 1; act = !last; end
    end
    check(n_ld > 20 && n_abort > 3, "sequences completed and aborted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

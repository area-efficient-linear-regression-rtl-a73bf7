// tb_phase_unwrap: random phase trajectories (steps of at most pi per
// sample, wrapped to 8 bits) with packet starts; the two outputs of each
// group must equal the unwrapped phase of samples 0 and 2 of the group, with
// unwrapping restarted at each start, one cycle later.
module tb_phase_unwrap;
  import linreg_pkg::*;

  logic clk = 1'b0, rst, start, start_o;
  logic signed [7:0] ph [4];
  model_e model, model_o;
  logic signed [16:0] d0, d1;

  phase_unwrap dut (.clk(clk), .rst(rst), .ph_i(ph), .start_i(start), .model_i(model),
                    .d0_o(d0), .d1_o(d1), .start_o(start_o), .model_o(model_o));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_wrap = 0;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int u = 0, e0 = 0, e1 = 0;
    bit es = 0, have = 0;
    model_e em = MODEL_LONG;
    rst = 1; start = 0; model = MODEL_LONG;
    for (int j = 0; j < 4; j++) ph[j] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      if (have) begin
        checks++;
        if (d0 != 17'(e0) || d1 != 17'(e1) || start_o != es || model_o != em) begin
          failures++;
          if (failures < 10) $display("FAIL %0d: %0d %0d exp %0d %0d", c, d0, d1, e0, e1);
        end
      end
      start = (c == 0) || ($urandom_range(127) == 0);
      model = model_e'($urandom_range(1));
      for (int j = 0; j < 4; j++) begin
        int st;
        st = $signed($urandom_range(255)) - 128;
        if (start && j == 0) u = $signed($urandom_range(255)) - 128;
        else begin
          if ((u % 256 + 256) % 256 + st > 255 || (u % 256 + 256) % 256 + st < 0) n_wrap++;
          u += st;
        end
        ph[j] = 8'(u);
        if (j == 0) e0 = u;
        if (j == 2) e1 = u;
      end
      es = start; em = model; have = 1;
    end
    checks++;
    if (n_wrap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

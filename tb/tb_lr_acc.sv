// tb_lr_acc: sequences of random sample pairs, with gaps (in_valid low) and
// restarts; the sum must appear exactly two cycles after the last pair and
// hold while no pair is valid.
module tb_lr_acc;
  import linreg_pkg::*;

  logic clk = 1'b0, rst, v, f;
  logic signed [16:0] d0, d1;
  logic signed [23:0] sum;

  lr_acc dut (.clk(clk), .rst(rst), .in_valid(v), .in_first(f), .d0(d0), .d1(d1), .sum_o(sum));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint ref_sum = 0;
  longint hist [$];   // expected sum after each cycle's inputs

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; v = 0; f = 0; d0 = 0; d1 = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // check the sum for the inputs of two cycles ago
      if (hist.size() >= 2) begin
        checks++;
        if (longint'(sum) != hist[hist.size() - 2]) begin
          failures++;
          if (failures < 10) $display("FAIL %0d: sum=%0d exp=%0d", i, sum, hist[hist.size() - 2]);
        end
      end
      v  = ($urandom_range(9) != 0);
      f  = v && ($urandom_range(60) == 0 || i == 0);
      d0 = 17'($urandom);
      d1 = 17'($urandom);
      if (i == 0) v = 1;
      if (v) ref_sum = (f ? 0 : ref_sum) + d0 + d1;
      hist.push_back(ref_sum);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

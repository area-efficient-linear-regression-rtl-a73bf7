// tb_lr_macc1: random pairs with random indexes, gaps and restarts; the sum of
// index*sample must appear exactly four cycles after the last pair.
module tb_lr_macc1;
  import linreg_pkg::*;

  logic clk = 1'b0, rst, v, f;
  logic signed [16:0] d0, d1;
  logic [7:0] i0, i1;
  logic signed [31:0] sum;

  lr_macc1 #(.IDX_W(8)) dut (.clk(clk), .rst(rst), .in_valid(v), .in_first(f), .d0(d0), .d1(d1),
                             .idx0(i0), .idx1(i1), .sum_o(sum));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint ref_sum = 0;
  longint hist [$];

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; v = 0; f = 0; d0 = 0; d1 = 0; i0 = 0; i1 = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (hist.size() >= 4) begin
        checks++;
        if (longint'(sum) != hist[hist.size() - 4]) begin
          failures++;
          if (failures < 10) $display("FAIL %0d: sum=%0d exp=%0d", i, sum, hist[hist.size() - 4]);
        end
      end
      v  = ($urandom_range(9) != 0) || i == 0;
      f  = v && ($urandom_range(60) == 0 || i == 0);
      d0 = 17'($urandom_range(8191)) - 17'sd4096;
      d1 = 17'($urandom_range(8191)) - 17'sd4096;
      i0 = 8'($urandom);
      i1 = 8'($urandom);
      if (v) ref_sum = 32'((f ? 0 : ref_sum) + d0 * longint'(i0) + d1 * longint'(i1));
      hist.push_back(longint'(32'(ref_sum)) <<< 32 >>> 32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

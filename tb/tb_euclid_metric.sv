// tb_euclid_metric: random and corner samples. One clock after a sample the
// four metrics must equal |d'_i| of the exact correlation with points
// 0..3 (C0, C2 exactly; C1, C3 within one LSB, the 0.707 being 181/256), and
// each sign bit must match the sign of d'_i whenever |d'_i| exceeds 1.
module tb_euclid_metric;
  import tcm_pkg::*;
  import tcm_ref_pkg::*;
  logic clk = 0;
  iq_t  i_in = '0, q_in = '0;
  cm_t  c [4];
  logic [3:0] neg;
  int checks = 0, failures = 0;

  euclid_metric dut (.clk, .i_in, .q_in, .c, .neg);
  always #5 clk = ~clk;

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int ii, qq;
      ii = int'($urandom_range(127)) - 64;
      qq = int'($urandom_range(127)) - 64;
      if (n == 0) begin ii = -64; qq = -64; end
      if (n == 1) begin ii = 63;  qq = 63;  end
      if (n == 2) begin ii = -64; qq = 63;  end
      @(negedge clk);
      i_in = iq_t'(ii);
      q_in = iq_t'(qq);
      @(posedge clk);
      #1;
      for (int k = 0; k < 4; k++) begin
        real d, a;
        d = corr(ii, qq, k);
        a = d < 0.0 ? -d : d;
        checks++;
        if ($itor(c[k]) - a > 1.0 || a - $itor(c[k]) > 1.0 || (k % 2 == 0 && ($itor(c[k]) - a > 0.01 || a - $itor(c[k]) > 0.01))) begin
          failures++;
          if (failures < 10) $display("I=%0d Q=%0d C%0d=%0d expected %f", ii, qq, k, c[k], a);
        end
        if (a > 1.0) begin
          checks++;
          if (neg[k] != (d < 0.0)) begin
            failures++;
            if (failures < 10) $display("I=%0d Q=%0d sign %0d wrong", ii, qq, k);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

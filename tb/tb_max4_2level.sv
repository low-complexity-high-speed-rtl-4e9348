// tb_max4_2level: random 4-tuples (with forced ties) through an unsigned and
// a modulo instance. The unsigned one must return the largest value and the
// lowest index holding it; the modulo one gets values spread over less than
// half the range around a random, possibly wrapping, base and must pick the
// same element as an exact comparison of the unwrapped values.
module tb_max4_2level;
  localparam int W = 9;
  logic [W-1:0] v [4];
  logic [W-1:0] vm [4];
  logic [W-1:0] mx, mxm;
  logic [1:0]   idx, idxm;
  int checks = 0, failures = 0;

  max4_2level #(.W(W), .MODULO(1'b0)) dut  (.v(v),  .max(mx),  .idx(idx));
  max4_2level #(.W(W), .MODULO(1'b1)) dutm (.v(vm), .max(mxm), .idx(idxm));

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int off [4];
      int base, best, bi, bo;
      base = int'($urandom_range((1 << W) - 1));
      for (int k = 0; k < 4; k++) begin
        v[k]   = W'($urandom);
        off[k] = int'($urandom_range((1 << (W - 1)) - 1));
        if (n % 3 == 0 && k > 0) begin v[k] = v[0]; off[k] = off[0]; end
        vm[k]  = W'(base + off[k]);
      end
      #1;
      best = -1; bi = 0; bo = -1;
      for (int k = 0; k < 4; k++) if (int'(v[k]) > best) begin best = int'(v[k]); bi = k; end
      checks++;
      if (int'(mx) != best || int'(idx) != bi) begin
        failures++;
        if (failures < 10) $display("unsigned: max %0d/%0d expected %0d/%0d", mx, idx, best, bi);
      end
      bi = 0;
      for (int k = 0; k < 4; k++) if (off[k] > bo) begin bo = off[k]; bi = k; end
      checks++;
      if (int'(idxm) != bi || mxm != vm[bi]) begin
        failures++;
        if (failures < 10) $display("modulo: idx %0d expected %0d", idxm, bi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_demapper: for all 4096 words x, the demapper applied to the reference
// mapping of x must give x back (the mapping is a bijection).
module tb_demapper;
  import tcm_pkg::*;
  import tcm_ref_pkg::*;
  path_t z;
  logic [11:0] x;
  int checks = 0, failures = 0;

  demapper dut (.z, .x);

  initial begin
    for (int v = 0; v < 4096; v++) begin
      z = ref_map(12'(v));
      #1;
      checks++;
      if (x !== 12'(v)) begin
        failures++;
        if (failures < 10) $display("z=%03h x=%03h expected %03h", z, x, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

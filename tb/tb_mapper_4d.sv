// tb_mapper_4d: all 4096 words through the mapper, compared with the integer
// form of the mapping equations.
module tb_mapper_4d;
  import tcm_pkg::*;
  import tcm_ref_pkg::*;
  logic [11:0] x;
  path_t z;
  int checks = 0, failures = 0;

  mapper_4d dut (.x, .z);

  initial begin
    for (int v = 0; v < 4096; v++) begin
      x = 12'(v);
      #1;
      checks++;
      if (z !== ref_map(x)) begin
        failures++;
        if (failures < 10) $display("x=%03h z=%03h expected %03h", x, z, ref_map(x));
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

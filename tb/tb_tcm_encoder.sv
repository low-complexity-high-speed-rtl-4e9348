// tb_tcm_encoder: random words with random valid. A reference encoder built
// from the equations (running mod-8 sum on {x11,x8,x4}, parity from the
// parity-check equation, integer mapping, rounded cos/sin) predicts the
// symbols and samples, which must appear one clock after each accepted word.
module tb_tcm_encoder;
  import tcm_pkg::*;
  import tcm_ref_pkg::*;
  localparam int AMP = 40;
  logic  clk = 0, rst_n = 0, in_valid = 0, out_valid;
  info_t info = '0;
  path_t out_z;
  iq_t   out_i [4];
  iq_t   out_q [4];
  int checks = 0, failures = 0;
  logic [6:0] hx0 = '0, hx1 = '0, hx2 = '0, hx3 = '0;  // bit d = value d stages ago
  int    acc = 0;
  path_t exp_z;
  bit    exp_valid = 0;

  tcm_encoder #(.AMP(AMP)) dut (.clk, .rst_n, .in_valid, .info, .out_valid, .out_z, .out_i, .out_q);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      checks++;
      if (out_valid != exp_valid || (exp_valid && out_z !== exp_z)) begin
        failures++;
        if (failures < 10) $display("n=%0d valid=%0b z=%03h expected %0b/%03h", n, out_valid, out_z, exp_valid, exp_z);
      end
      if (exp_valid)
        for (int j = 0; j < 4; j++) begin
          real ei, eq;
          ei = AMP * $cos(3.14159265358979 * exp_z[3*j +: 3] / 4.0);
          eq = AMP * $sin(3.14159265358979 * exp_z[3*j +: 3] / 4.0);
          checks++;
          if ($itor(out_i[j]) - ei > 1.0 || ei - $itor(out_i[j]) > 1.0 ||
              $itor(out_q[j]) - eq > 1.0 || eq - $itor(out_q[j]) > 1.0) begin
            failures++;
            if (failures < 10) $display("n=%0d sample %0d wrong", n, j);
          end
        end
      info = info_t'($urandom);
      in_valid = ($urandom_range(4) != 0);
      exp_valid = in_valid;
      if (in_valid) begin
        logic [11:0] x;
        logic        p;
        p   = ref_parity(H0, H1, H2, H3, hx0, hx1, hx2, hx3);
        acc = (acc + 4*info[10] + 2*info[7] + info[3]) % 8;
        x   = {info, p};
        x[11] = acc[2]; x[8] = acc[1]; x[4] = acc[0];
        exp_z = ref_map(x);
        hx0 = {hx0[5:1], p, 1'b0};
        hx1 = {hx1[5:1], info[0], 1'b0};
        hx2 = {hx2[5:1], info[1], 1'b0};
        hx3 = {hx3[5:1], info[2], 1'b0};
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

// tb_psk8_modulator: every symbol value in every position; samples must be
// the rounded AMP*cos / AMP*sin of phase Z*pi/4 (within one LSB).
module tb_psk8_modulator;
  import tcm_pkg::*;
  localparam int AMP = 40;
  path_t z;
  iq_t i_out [4];
  iq_t q_out [4];
  int checks = 0, failures = 0;

  psk8_modulator #(.AMP(AMP)) dut (.z, .i_out, .q_out);

  initial begin
    for (int n = 0; n < 64; n++) begin
      z = path_t'($urandom);
      if (n < 8) z = {4{3'(n)}};
      #1;
      for (int j = 0; j < 4; j++) begin
        real ei, eq;
        ei = AMP * $cos(3.14159265358979 * z[3*j +: 3] / 4.0);
        eq = AMP * $sin(3.14159265358979 * z[3*j +: 3] / 4.0);
        checks++;
        if ($itor(i_out[j]) - ei > 1.0 || ei - $itor(i_out[j]) > 1.0 ||
            $itor(q_out[j]) - eq > 1.0 || eq - $itor(q_out[j]) > 1.0) begin
          failures++;
          $display("Z=%0d I=%0d Q=%0d expected %f %f", z[3*j +: 3], i_out[j], q_out[j], ei, eq);
        end
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

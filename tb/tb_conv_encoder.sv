// tb_conv_encoder: random inputs with random valid. The parity bit of every
// accepted stage is compared with the parity-check equation evaluated over
// the input and parity history, not with the encoder's register.
module tb_conv_encoder;
  import tcm_pkg::*;
  import tcm_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, x0;
  logic [2:0] u = '0;
  state_t state;
  int checks = 0, failures = 0;
  logic [6:0] hx0 = '0, hx1 = '0, hx2 = '0, hx3 = '0;  // bit d = value d stages ago

  conv_encoder dut (.clk, .rst_n, .in_valid, .u, .x0, .state);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      logic p;
      @(negedge clk);
      u = 3'($urandom);
      in_valid = ($urandom_range(4) != 0);
      #1;
      p = ref_parity(H0, H1, H2, H3, hx0, hx1, hx2, hx3);
      checks++;
      if (x0 !== p) begin
        failures++;
        if (failures < 10) $display("n=%0d x0=%0b expected %0b", n, x0, p);
      end
      if (in_valid) begin
        hx0 = {hx0[5:1], p, 1'b0};
        hx1 = {hx1[5:1], u[0], 1'b0};
        hx2 = {hx2[5:1], u[1], 1'b0};
        hx3 = {hx3[5:1], u[2], 1'b0};
      end
      @(posedge clk);
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

// tb_diff_encoder: random 3-bit inputs with random valid; w must equal the
// running mod-8 sum of the accepted inputs.
module tb_diff_encoder;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [2:0] u = '0, w;
  int checks = 0, failures = 0;
  int acc = 0;

  diff_encoder dut (.clk, .rst_n, .in_valid, .u, .w);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      u = 3'($urandom);
      in_valid = ($urandom_range(3) != 0);
      #1;
      checks++;
      if (int'(w) != (acc + int'(u)) % 8) begin
        failures++;
        $display("n=%0d u=%0d w=%0d exp=%0d", n, u, w, (acc + int'(u)) % 8);
      end
      @(posedge clk);
      if (in_valid) acc = (acc + int'(u)) % 8;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_diff_decoder: random 3-bit words with random valid; one clock after an
// accepted word the output must be that word minus the previous accepted one
// (mod 8), and out_valid must follow in_valid by one clock.
module tb_diff_decoder;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [2:0] w = '0, u;
  int checks = 0, failures = 0;
  int prev = 0, expv = 0;
  bit exp_valid = 0;

  diff_decoder dut (.clk, .rst_n, .in_valid, .w, .out_valid, .u);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      checks++;
      if (out_valid != exp_valid || (exp_valid && int'(u) != expv)) begin
        failures++;
        $display("n=%0d out_valid=%0b u=%0d exp %0b/%0d", n, out_valid, u, exp_valid, expv);
      end
      w = 3'($urandom);
      in_valid = ($urandom_range(3) != 0);
      exp_valid = in_valid;
      if (in_valid) begin
        expv = (int'(w) - prev + 8) % 8;
        prev = int'(w);
      end
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

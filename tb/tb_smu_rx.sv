// tb_smu_rx: random decisions for all 64 states with random valid gaps. The
// reference keeps the whole decision history and, for every push from the
// DEPTH-th on, traces back DEPTH stages from state 0 (predecessors from the
// encoder's forward transition function); the label it reaches must leave
// the survivor memory one clock after that push.
module tb_smu_rx;
  import tcm_pkg::*;
  localparam int DEPTH = 48;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [2:0] dec [NSTATES] = '{default: '0};
  label_t out_idx;
  int checks = 0, failures = 0;
  int pred [NSTATES][8];
  logic [2:0] hist [$][NSTATES];
  int n_out = 0;

  smu_rx #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .in_valid, .dec, .out_valid, .out_idx);
  always #5 clk = ~clk;

  initial begin
    for (int p = 0; p < 64; p++)
      for (int u = 0; u < 8; u++)
        pred[int'(enc_next(state_t'(p), 3'(u)))][u] = p;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      label_t expl;
      bit     expv;
      @(negedge clk);
      for (int t = 0; t < 64; t++) dec[t] = 3'($urandom);
      in_valid = ($urandom_range(4) != 0);
      expv = 1'b0;
      expl = '0;
      if (in_valid) begin
        int k, s;
        hist.push_back(dec);
        k = hist.size() - 1;
        if (k >= DEPTH - 1) begin
          expv = 1'b1;
          s = 0;
          for (int d = k; d > k - DEPTH; d--) begin
            int u, p;
            u = int'(hist[d][s]);
            p = pred[s][u];
            expl = {3'(u), 1'(p & 1)};
            s = p;
          end
        end
      end
      @(posedge clk);
      #1;
      checks++;
      if (out_valid != expv || (expv && out_idx != expl)) begin
        failures++;
        if (failures < 10) $display("n=%0d out %0b/%0h expected %0b/%0h", n, out_valid, out_idx, expv, expl);
      end
      if (expv) n_out++;
    end
    checks++;
    if (n_out < 200) begin failures++; $display("only %0d outputs", n_out); end
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

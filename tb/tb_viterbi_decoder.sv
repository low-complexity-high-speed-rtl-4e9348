// tb_viterbi_decoder: a random input sequence is encoded (forward transition
// function, label {x3,x2,x1,x0}); the branch metric of the sent label is 200
// and the others random in 0..150, except that every 13th stage one wrong
// label gets 215, beating the sent one for that stage alone. The decoder must
// return every sent label, correcting those stages, two clocks after the push
// of the stage SMU_DEPTH - 1 later, with random gaps in the input.
module tb_viterbi_decoder;
  import tcm_pkg::*;
  localparam int L = 48;
  localparam int N = 600;
  logic   clk = 0, rst_n = 0, in_valid = 0, out_valid;
  bm_t    bm [NBM] = '{default: '0};
  label_t out_idx;
  int checks = 0, failures = 0;
  int cycle = 0;
  label_t sent [N];
  bit     fooled [N];
  int     push_cyc [N];
  int n_in = 0, n_out = 0, n_corr = 0;
  state_t st = '0;

  viterbi_decoder #(.SMU_DEPTH(L)) dut (.clk, .rst_n, .in_valid, .bm, .out_valid, .out_idx);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk)
    if (out_valid && rst_n) begin
      checks++;
      if (out_idx != sent[n_out]) begin
        failures++;
        if (failures < 10) $display("stage %0d: %0h expected %0h", n_out, out_idx, sent[n_out]);
      end else if (fooled[n_out]) n_corr++;
      checks++;
      if (cycle != push_cyc[n_out + L - 1] + 2) begin
        failures++;
        if (failures < 10) $display("stage %0d: latency %0d", n_out, cycle - push_cyc[n_out + L - 1]);
      end
      n_out++;
    end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (n_in < N) begin
      @(negedge clk);
      in_valid = ($urandom_range(5) != 0);
      if (in_valid) begin
        logic [2:0] u;
        label_t lab, wrong;
        u = 3'($urandom);
        lab = {u, st[0]};
        st = enc_next(st, u);
        for (int l = 0; l < 16; l++) bm[l] = bm_t'($urandom_range(150));
        bm[lab] = 200;
        fooled[n_in] = (n_in % 13 == 7);
        if (fooled[n_in]) begin
          wrong = lab ^ label_t'(1 + $urandom_range(14));
          bm[wrong] = 215;
        end
        sent[n_in] = lab;
        push_cyc[n_in] = cycle;
        n_in++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (n_out != N - L + 1) begin failures++; $display("%0d outputs, expected %0d", n_out, N - L + 1); end
    checks++;
    if (n_corr == 0) begin failures++; $display("no stage corrected"); end
    $display("corrected %0d stages", n_corr);
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

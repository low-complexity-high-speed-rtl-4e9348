// tb_acsu: random branch metrics with random valid gaps. A reference keeps
// exact integer path metrics (no wrap) over a predecessor table built from
// the encoder's forward transition function. After every accepted stage the
// unit's metrics must equal the reference modulo 2^PM_W, and each decision
// must name a branch whose sum equals the reference maximum.
module tb_acsu;
  import tcm_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  bm_t  bm [NBM] = '{default: '0};
  logic [2:0] dec [NSTATES];
  pm_t  pm [NSTATES];
  int checks = 0, failures = 0;
  int pred [NSTATES][8];
  longint ref_pm [NSTATES], old_pm [NSTATES], best [NSTATES];
  int n_nonzero_dec = 0;

  acsu dut (.clk, .rst_n, .in_valid, .bm, .out_valid, .dec, .pm);
  always #5 clk = ~clk;

  initial begin
    for (int p = 0; p < 64; p++)
      for (int u = 0; u < 8; u++)
        pred[int'(enc_next(state_t'(p), 3'(u)))][u] = p;
    for (int t = 0; t < 64; t++) ref_pm[t] = (t == 0) ? 0 : -1024;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      for (int l = 0; l < 16; l++) bm[l] = bm_t'($urandom_range(360));
      in_valid = ($urandom_range(4) != 0);
      if (in_valid) begin
        old_pm = ref_pm;
        for (int t = 0; t < 64; t++) begin
          best[t] = -64'sd1000000000;
          for (int u = 0; u < 8; u++) begin
            longint v;
            v = old_pm[pred[t][u]] + longint'(bm[{u[2:0], 1'(pred[t][u] & 1)}]);
            if (v > best[t]) best[t] = v;
          end
        end
        ref_pm = best;
      end
      @(posedge clk);
      #1;
      checks++;
      if (out_valid != in_valid) begin failures++; $display("n=%0d out_valid wrong", n); end
      if (in_valid)
        for (int t = 0; t < 64; t++) begin
          int p;
          longint v;
          p = pred[t][dec[t]];
          v = old_pm[p] + longint'(bm[{dec[t], 1'(p & 1)}]);
          if (dec[t] != 0) n_nonzero_dec++;
          checks++;
          if (pm[t] != pm_t'(ref_pm[t]) || v != ref_pm[t]) begin
            failures++;
            if (failures < 10) $display("n=%0d state %0d pm=%0d ref=%0d dec=%0d gives %0d", n, t, pm[t], ref_pm[t], dec[t], v);
          end
        end
    end
    checks++;
    if (n_nonzero_dec == 0) begin failures++; $display("decisions never non-zero"); end
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

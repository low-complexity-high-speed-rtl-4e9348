// tb_tmu: random Euclidean metrics and sign bits, one stage per clock with
// random valid gaps. For each stage the reference enumerates all 256
// parallel transitions of each of the 16 labels with the integer mapping,
// scoring point Z of dimension j as +C[j][Z mod 4] or -C[j][Z mod 4]
// according to the sign bit, and keeps the maximum. Five clocks later the
// unit must present that maximum as branch metric, and a path that belongs
// to the label and scores exactly that maximum.
module tb_tmu;
  import tcm_pkg::*;
  import tcm_ref_pkg::*;
  logic  clk = 0, rst_n = 0, in_valid = 0, out_valid;
  cm_t   c   [4][4] = '{default: '0};
  logic [3:0] neg [4] = '{default: '0};
  bm_t   bm   [NBM];
  path_t path [NBM];
  int checks = 0, failures = 0;

  typedef struct {
    cm_t        c   [4][4];
    logic [3:0] neg [4];
    int         bm  [16];
  } stage_t;
  stage_t q [$];
  int     vpipe [$];

  tmu dut (.clk, .rst_n, .in_valid, .c, .neg, .out_valid, .bm, .path);
  always #5 clk = ~clk;

  function automatic int score(stage_t s, path_t z);
    int m;
    m = 0;
    for (int j = 0; j < 4; j++) begin
      int zz, i;
      bit sgn;
      zz  = int'(z[3*j +: 3]);
      i   = zz % 4;
      sgn = s.neg[j][i] ^ (zz >= 4);
      m  += sgn ? -int'(s.c[j][i]) : int'(s.c[j][i]);
    end
    return m;
  endfunction

  function automatic bit in_label(path_t z, int lab);
    for (int u = 0; u < 256; u++)
      if (ref_map({8'(u), 4'(lab)}) == z) return 1'b1;
    return 1'b0;
  endfunction

  int n_out = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      stage_t s;
      @(negedge clk);
      // outputs of the stage entered five clocks ago
      checks++;
      if (vpipe.size() >= 5) begin
        bit ev;
        ev = vpipe[vpipe.size()-5] == 1;
        if (out_valid != ev) begin failures++; $display("n=%0d out_valid=%0b expected %0b", n, out_valid, ev); end
        if (ev) begin
          stage_t r;
          r = q.pop_front();
          for (int l = 0; l < 16; l++) begin
            checks++;
            if (int'(bm[l]) != r.bm[l] || score(r, path[l]) != r.bm[l] || !in_label(path[l], l)) begin
              failures++;
              if (failures < 10) $display("n=%0d label %0d bm=%0d expected %0d path %03h score %0d", n, l, bm[l], r.bm[l], path[l], score(r, path[l]));
            end
          end
          n_out++;
        end
      end
      // new stage
      for (int j = 0; j < 4; j++) begin
        for (int i = 0; i < 4; i++) s.c[j][i] = cm_t'($urandom_range(90));
        s.neg[j] = 4'($urandom);
      end
      for (int l = 0; l < 16; l++) begin
        s.bm[l] = -100000;
        for (int u = 0; u < 256; u++) begin
          int m;
          m = score(s, ref_map({8'(u), 4'(l)}));
          if (m > s.bm[l]) s.bm[l] = m;
        end
      end
      c   = s.c;
      neg = s.neg;
      in_valid = ($urandom_range(5) != 0);
      vpipe.push_back(in_valid ? 1 : 0);
      if (in_valid) q.push_back(s);
    end
    checks++;
    if (n_out < 300) begin failures++; $display("only %0d stages out", n_out); end
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

// tmu: transition metrics unit. For every trellis stage it turns the Euclidean
// metrics of the four received symbols into the 16 branch metrics of the
// labels {x3,x2,x1,x0} and, for each, the four hard 8PSK symbols (the "path")
// of the best of its 256 parallel transitions.
//
// How: the weight-4 bits x11,x10,x9,x7 reach all 16 sign patterns of the four
// symbols, so they are resolved by taking |d'| per dimension (euclid_metric).
// What is left per label is 16 candidates k = {x8,x6,x5,x4}; the metric of a
// candidate is C0[i0]+C1[i1]+C2[i2]+C3[i3], i_j = Z_j mod 4. Computation is
// shared and split by a two-step comparison:
//   P1  16 sums C0[a]+C1[b]                 (first addition stage)
//   P2  64 sums + C2[c]                      (second addition stage)
//   P3  step 1: for each big group g = {x2,x1} the 16 candidates fall into
//       four groups of four that share i3; one max4 per group keeps a
//       survivor, shared by the four labels {x3,x0} of the big group
//   P4  4 x 16 additions of C3[(b + x0 + 2x3) mod 4]  (third addition stage)
//   P5  step 2: max4 over the four group survivors per label -> branch metric
// Additions: 16 + 64 + 64 = 144; comparisons 16*3 + 16*3 = 96.
// Each of P1..P5 is a register stage, so results appear five clocks after
// the metrics enter, one stage per clock. The paths are rebuilt in P5 from
// the two winner indices and the delayed sign bits. Larger metric = better.
// The sharing scheme, the grouping and the operation counts are the published
// architecture; the five-stage split, the sign-bit path rebuild and the use
// of max4_2level for both comparison steps are this design's choices.
module tmu
  import tcm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cm_t   c    [4][4],   // c[dimension j][point i]
  input  logic [3:0] neg [4],  // neg[j][i]: sign of d'_i in dimension j
  output logic  out_valid,
  output bm_t   bm   [NBM],    // bm[label]
  output path_t path [NBM]     // path[label] = {Z3,Z2,Z1,Z0}
);
  localparam int PS_W = BM_W;

  // ---------------- pipeline registers ----------------
  logic [4:0]        vld;
  logic [C_W:0]      a_q   [4][4];         // P1: C0[a]+C1[b]
  logic [PS_W-1:0]   t_q   [4][4][4];      // P2: +C2[c]
  logic [PS_W-1:0]   s_q   [4][4];         // P3: survivor of group b in big group g
  logic [1:0]        sidx_q[4][4];
  logic [PS_W-1:0]   u_q   [16][4];        // P4: per label, per group
  logic [1:0]        sidx4_q[4][4];
  cm_t               c2_q1 [4];
  cm_t               c3_q1 [4], c3_q2 [4], c3_q3 [4];
  logic [3:0]        neg_q [4][4];

  // ---------------- P1 / P2 ----------------
  always_ff @(posedge clk) begin
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++)
        a_q[a][b] <= (C_W+1)'(c[0][a]) + (C_W+1)'(c[1][b]);
    c2_q1 <= c[2];
    c3_q1 <= c[3];
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++)
        for (int cc = 0; cc < 4; cc++)
          t_q[a][b][cc] <= PS_W'(a_q[a][b]) + PS_W'(c2_q1[cc]);
    c3_q2 <= c3_q1;
    c3_q3 <= c3_q2;
    neg_q[0] <= neg;
    for (int s = 1; s < 4; s++) neg_q[s] <= neg_q[s-1];
  end

  // ---------------- P3: comparison step 1 ----------------
  logic [PS_W-1:0] g_in  [4][4][4];
  logic [PS_W-1:0] g_max [4][4];
  logic [1:0]      g_idx [4][4];

  always_comb
    for (int g = 0; g < 4; g++)
      for (int b = 0; b < 4; b++)
        for (int m = 0; m < 4; m++) begin
          logic [7:0] ci;
          ci = CIDX_TAB[(g << 1)*16 + int'(MEMBER_TAB[g*16 + b*4 + m])];
          g_in[g][b][m] = t_q[ci[1:0]][ci[3:2]][ci[5:4]];
        end

  for (genvar g = 0; g < 4; g++) begin : g_step1
    for (genvar b = 0; b < 4; b++) begin : g_grp
      max4_2level #(.W(PS_W)) u_max (.v(g_in[g][b]), .max(g_max[g][b]), .idx(g_idx[g][b]));
    end
  end

  always_ff @(posedge clk) begin
    s_q    <= g_max;
    sidx_q <= g_idx;
  end

  // ---------------- P4: third addition stage ----------------
  always_ff @(posedge clk) begin
    for (int l = 0; l < 16; l++)
      for (int b = 0; b < 4; b++) begin
        int g, i3;
        g  = (l >> 1) & 3;
        i3 = (b + (l & 1) + 2*((l >> 3) & 1)) & 3;
        u_q[l][b] <= s_q[g][b] + PS_W'(c3_q3[i3]);
      end
    sidx4_q <= sidx_q;
  end

  // ---------------- P5: comparison step 2 and paths ----------------
  bm_t        l_max [16];
  logic [1:0] l_idx [16];
  path_t      l_path[16];

  for (genvar l = 0; l < 16; l++) begin : g_step2
    max4_2level #(.W(PS_W)) u_max (.v(u_q[l]), .max(l_max[l]), .idx(l_idx[l]));
  end

  always_comb
    for (int l = 0; l < 16; l++) begin
      logic [3:0] k;
      logic [7:0] ci;
      k  = MEMBER_TAB[((l >> 1) & 3)*16 + int'(l_idx[l])*4 + int'(sidx4_q[(l >> 1) & 3][l_idx[l]])];
      ci = CIDX_TAB[l*16 + int'(k)];
      for (int j = 0; j < 4; j++)
        l_path[l][3*j +: 3] = {neg_q[3][j][ci[2*j +: 2]], ci[2*j +: 2]};
    end

  always_ff @(posedge clk) begin
    bm   <= l_max;
    path <= l_path;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vld <= '0;
    else        vld <= {vld[3:0], in_valid};

  assign out_valid = vld[4];
endmodule

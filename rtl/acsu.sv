// acsu: fully parallel add-compare-select unit of the 64-state trellis, one
// trellis stage per clock. Each state t has eight incoming branches, one per
// input u = {x3,x2,x1}, from predecessor p = PRED_TAB[t*8+u]; the branch label
// is {u, x0(p)} with x0(p) = p[0]. For every state:
//   add      eight candidates PM[p] + BM[label]
//   compare  level 1: four two-input compare-selects (8 -> 4)
//            level 2: max4_2level, six parallel comparisons and a LUT (4 -> 1)
//   select   new PM and the 3-bit decision u of the survivor
// so the recursion holds two comparator levels instead of three.
// Path metrics are PM_W-bit and allowed to wrap: all comparisons are modulo
// (sign of the difference), which needs no normalisation step because the
// spread of the metrics stays far below 2^(PM_W-1).
// Interface/timing: when in_valid is high the new metrics and decisions are
// registered; out_valid follows one clock later. Reset starts the trellis in
// state 0 (PM 0, all other states PM_INIT_OFF lower).
// The 8-input ACS with a two-level comparison (the second level being the
// six-comparator unit) follows the published architecture; the 8->4 first
// level, modulo metrics and the start state are this design's choices.
module acsu
  import tcm_pkg::*;
#(
  parameter int PM_INIT_OFF = 1024
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  bm_t        bm  [NBM],
  output logic       out_valid,
  output logic [2:0] dec [NSTATES],
  output pm_t        pm  [NSTATES]
);
  pm_t        cand  [NSTATES][8];
  pm_t        l1    [NSTATES][4];
  logic       l1sel [NSTATES][4];
  pm_t        pm_n  [NSTATES];
  logic [1:0] l2idx [NSTATES];
  logic [2:0] dec_n [NSTATES];

  always_comb
    for (int t = 0; t < int'(NSTATES); t++) begin
      for (int u = 0; u < 8; u++) begin
        state_t p;
        p = PRED_TAB[t*8 + u];
        cand[t][u] = pm[p] + PM_W'(bm[{u[2:0], p[0]}]);
      end
      for (int h = 0; h < 4; h++) begin
        l1sel[t][h] = ~pm_ge(cand[t][2*h], cand[t][2*h+1]);
        l1[t][h]    = l1sel[t][h] ? cand[t][2*h+1] : cand[t][2*h];
      end
    end

  for (genvar t = 0; t < int'(NSTATES); t++) begin : g_acs
    max4_2level #(.W(PM_W), .MODULO(1'b1)) u_l2 (.v(l1[t]), .max(pm_n[t]), .idx(l2idx[t]));
    assign dec_n[t] = {l2idx[t], l1sel[t][l2idx[t]]};
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int t = 0; t < int'(NSTATES); t++) begin
        pm[t]  <= (t == 0) ? '0 : pm_t'(-PM_INIT_OFF);
        dec[t] <= '0;
      end
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        pm  <= pm_n;
        dec <= dec_n;
      end
    end
endmodule

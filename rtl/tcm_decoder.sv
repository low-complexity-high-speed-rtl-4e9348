// tcm_decoder: 4-D 8PSK TCM decoder for Rm = 11/12, one trellis stage (four
// received 8PSK samples, 11 information bits) per clock.
//   euclid_metric x4  C0..C3 and signs of each received sample     1 clock
//   tmu               16 branch metrics + 16 candidate paths        5 clocks
//   viterbi_decoder   decided 4-bit label, SMU_DEPTH stages later
//   delay_chain       keeps the 16 paths per stage, returns the decided one
//   demapper (DMU)    hard symbols Z0..Z3 -> x11..x0
//   diff_decoder      undoes the differential code on {x11,x8,x4}
// Interface: in_i[j]/in_q[j] is the sample of symbol Zj, taken when in_valid
// is high. out_info[k] carries x(k+1) (k = 0..10); out_valid marks it.
// Timing: the result of the stage given with push n appears once stage
// n + SMU_DEPTH - 1 has been given, 10 clocks after that later push. The
// last SMU_DEPTH - 1 stages of a burst come out only when later stages (for
// instance a tail of known symbols) follow. in_valid may have gaps.
// The block structure follows the published decoder; stage counts, widths
// (except the 7-bit inputs) and the handshake are this design's choices.
module tcm_decoder
  import tcm_pkg::*;
#(
  parameter int SMU_DEPTH = 48,
  parameter int DC_DEPTH  = SMU_DEPTH + 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  iq_t   in_i [4],
  input  iq_t   in_q [4],
  output logic  out_valid,
  output info_t out_info
);
  cm_t         c   [4][4];
  logic [3:0]  neg [4];
  logic        em_valid;
  logic        bm_valid;
  bm_t         bm   [NBM];
  path_t       path [NBM];
  logic        vd_valid;
  label_t      vd_idx;
  logic        dc_valid;
  path_t       dc_path;
  logic [11:0] x;
  logic [11:0] x_q;
  logic [2:0]  dd_u;
  logic        dd_valid;

  for (genvar j = 0; j < 4; j++) begin : g_em
    euclid_metric u_em (.clk, .i_in(in_i[j]), .q_in(in_q[j]), .c(c[j]), .neg(neg[j]));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) em_valid <= 1'b0;
    else        em_valid <= in_valid;

  tmu u_tmu (
    .clk, .rst_n, .in_valid(em_valid), .c, .neg,
    .out_valid(bm_valid), .bm, .path
  );

  viterbi_decoder #(.SMU_DEPTH(SMU_DEPTH)) u_vd (
    .clk, .rst_n, .in_valid(bm_valid), .bm,
    .out_valid(vd_valid), .out_idx(vd_idx)
  );

  delay_chain #(.DEPTH(DC_DEPTH)) u_dc (
    .clk, .rst_n, .push(bm_valid), .in_path(path),
    .pop(vd_valid), .sel(vd_idx),
    .out_valid(dc_valid), .out_path(dc_path)
  );

  demapper u_dmu (.z(dc_path), .x);

  diff_decoder u_dd (
    .clk, .rst_n, .in_valid(dc_valid), .w({x[11], x[8], x[4]}),
    .out_valid(dd_valid), .u(dd_u)
  );

  always_ff @(posedge clk)
    if (dc_valid) x_q <= x;

  always_comb begin
    out_valid = dd_valid;
    out_info  = x_q[11:1];
    out_info[10] = dd_u[2];
    out_info[7]  = dd_u[1];
    out_info[3]  = dd_u[0];
  end
endmodule

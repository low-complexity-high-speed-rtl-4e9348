// viterbi_decoder: soft-decision Viterbi decoder of the 64-state rate-3/4
// code, made of the ACSU (acsu) and the register-exchange survivor memory
// (smu_rx). It takes the 16 branch metrics of one trellis stage per clock and
// returns the 4-bit label {x3,x2,x1,x0} decided for an earlier stage.
// Timing: the label of the stage whose metrics arrived with push n leaves
// with out_valid two clocks after push n + SMU_DEPTH - 1 (ACSU register plus
// survivor-memory output register); one label per push in steady state.
module viterbi_decoder
  import tcm_pkg::*;
#(
  parameter int SMU_DEPTH = 48
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  bm_t    bm [NBM],
  output logic   out_valid,
  output label_t out_idx
);
  logic       dec_valid;
  logic [2:0] dec [NSTATES];
  pm_t        pm  [NSTATES];

  acsu u_acsu (
    .clk, .rst_n, .in_valid, .bm,
    .out_valid(dec_valid), .dec, .pm
  );

  smu_rx #(.DEPTH(SMU_DEPTH)) u_smu (
    .clk, .rst_n, .in_valid(dec_valid), .dec,
    .out_valid, .out_idx
  );
endmodule

// smu_rx: register-exchange survivor memory. Every state keeps the labels
// {x3,x2,x1,x0} of its survivor path over the last DEPTH stages. When a set
// of decisions arrives, state t copies the register of its chosen predecessor
// p = PRED_TAB[t*8 + dec[t]], shifts it by one stage and appends the new label
// {dec[t], p[0]}. The oldest label of state OUT_STATE is the decision.
// Timing: decisions are taken when in_valid is high; the label of stage n
// leaves on out_idx, registered, with the push of stage n + DEPTH - 1, i.e.
// one clock after that push. out_valid marks such outputs (none for the first
// DEPTH - 1 pushes after reset).
// DEPTH and the fixed output state are this design's choices.
module smu_rx
  import tcm_pkg::*;
#(
  parameter int DEPTH     = 48,
  parameter int OUT_STATE = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [2:0] dec [NSTATES],
  output logic       out_valid,
  output label_t     out_idx
);
  label_t surv   [NSTATES][DEPTH];
  label_t surv_n [NSTATES][DEPTH];
  logic [$clog2(DEPTH+1)-1:0] fill;

  // Each state chooses among its eight fixed predecessors: an 8:1
  // multiplexer per survivor bit, steered by the 3-bit decision.
  always_comb
    for (int t = 0; t < int'(NSTATES); t++) begin
      surv_n[t] = surv[t];
      for (int u = 0; u < 8; u++)
        if (int'(dec[t]) == u) begin
          surv_n[t][0] = {3'(u), PRED_TAB[t*8 + u][0]};
          for (int d = 1; d < DEPTH; d++) surv_n[t][d] = surv[PRED_TAB[t*8 + u]][d-1];
        end
    end

  always_ff @(posedge clk) begin
    if (in_valid) surv <= surv_n;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      fill      <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
    end else begin
      out_valid <= in_valid && (int'(fill) >= DEPTH - 1);
      if (in_valid) begin
        out_idx <= surv_n[OUT_STATE][DEPTH-1];
        if (int'(fill) < DEPTH) fill <= fill + 1'b1;
      end
    end
endmodule

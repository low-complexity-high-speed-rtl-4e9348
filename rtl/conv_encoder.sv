// conv_encoder: 64-state, rate-3/4 systematic feedback convolutional encoder.
// Inputs x1,x2,x3 pass through unchanged; the parity bit x0 is the output
// stage of a 6-bit observer-form register (tcm_pkg::enc_next) so it depends
// only on the present state, never on the present inputs. Each trellis state
// therefore has 8 successors and 8 predecessors.
// Interface: u = {x3,x2,x1} is consumed when in_valid is high; x0 belongs to
// the same stage and is combinational from the state register. Reset state 0.
// The code itself (64 states, rate 3/4) is the published one; the parity-check
// polynomials are tcm_pkg parameters.
module conv_encoder
  import tcm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [2:0] u,
  output logic       x0,
  output state_t     state
);
  assign x0 = state[0];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        state <= '0;
    else if (in_valid) state <= enc_next(state, u);
endmodule

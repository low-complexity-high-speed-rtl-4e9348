// tcm_encoder: 4-D 8PSK TCM encoder for Rm = 11/12, one trellis stage (four
// 8PSK symbols) per clock. Chain: diff_encoder on {x11,x8,x4} ->
// conv_encoder on {x3,x2,x1} producing x0 -> mapper_4d -> psk8_modulator.
// Interface: info[k] carries bit x(k+1), k = 0..10, taken when in_valid is
// high. The four symbols and their I/Q samples are registered and appear
// one clock later with out_valid.
module tcm_encoder
  import tcm_pkg::*;
#(
  parameter int AMP = 40
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  info_t info,
  output logic  out_valid,
  output path_t out_z,
  output iq_t   out_i [4],
  output iq_t   out_q [4]
);
  logic [2:0]  w;
  logic        x0;
  state_t      st;
  logic [11:0] x;
  path_t       z;
  iq_t         i_c [4];
  iq_t         q_c [4];

  diff_encoder u_diff (.clk, .rst_n, .in_valid, .u({info[10], info[7], info[3]}), .w);
  conv_encoder u_conv (.clk, .rst_n, .in_valid, .u(info[2:0]), .x0, .state(st));

  always_comb begin
    x       = {info, x0};
    x[11]   = w[2];
    x[8]    = w[1];
    x[4]    = w[0];
  end

  mapper_4d u_map (.x, .z);
  psk8_modulator #(.AMP(AMP)) u_mod (.z, .i_out(i_c), .q_out(q_c));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_z     <= '0;
      out_i     <= '{default: '0};
      out_q     <= '{default: '0};
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_z <= z;
        out_i <= i_c;
        out_q <= q_c;
      end
    end
endmodule

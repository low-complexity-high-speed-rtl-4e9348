// psk8_modulator: maps four 8PSK symbols to quantised baseband samples.
// Symbol Z lies at phase Z*pi/4 with amplitude AMP; the diagonal points use
// round(AMP*181/256). Purely combinational; samples are IQ_W-bit signed, the
// same format the decoder takes. AMP leaves head-room for channel noise before
// the 7-bit range clips; its value is this design's choice.
module psk8_modulator
  import tcm_pkg::*;
#(
  parameter int AMP = 40
) (
  input  path_t z,
  output iq_t   i_out [4],
  output iq_t   q_out [4]
);
  always_comb
    for (int j = 0; j < 4; j++) begin
      i_out[j] = psk_i(z[3*j +: 3], AMP);
      q_out[j] = psk_q(z[3*j +: 3], AMP);
    end
endmodule

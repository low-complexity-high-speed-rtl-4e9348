// mapper_4d: 4-D 8PSK set-partition mapping for Rm = 11/12. Twelve bits
// x11..x0 (x0 = parity, x1..x3 = coded, x4..x11 = uncoded) become four 8PSK
// symbols Z0..Z3 by the mod-8 sums listed in tcm_pkg (tcm_pkg::map4d).
// Purely combinational. z = {Z3,Z2,Z1,Z0}, three bits each.
module mapper_4d
  import tcm_pkg::*;
(
  input  logic [11:0] x,
  output path_t       z
);
  always_comb z = map4d(x);
endmodule

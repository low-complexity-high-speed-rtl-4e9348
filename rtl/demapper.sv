// demapper (DMU): inverse of the 4-D mapping. From the four hard symbols
// Z0..Z3 of the decided path it recovers x11..x0: W = Z0 gives {x11,x8,x4},
// Z1 - W and Z2 - W give {x10,x6,x2} and {x9,x5,x1} bit by bit, and
// Z3 - W minus the known terms gives {x7,x3,x0} (tcm_pkg::demap4d).
// Purely combinational.
module demapper
  import tcm_pkg::*;
(
  input  path_t       z,
  output logic [11:0] x
);
  always_comb x = demap4d(z);
endmodule

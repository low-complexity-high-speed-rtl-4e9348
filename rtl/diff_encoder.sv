// diff_encoder: modulo-8 differential encoder of the rotation-sensitive bits.
// A 45-degree rotation of all four 8PSK symbols adds one (mod 8) to the
// common term W = 4x11 + 2x8 + x4 of the 4-D mapping and leaves every other
// bit unchanged, so only the 3-bit number {x11,x8,x4} is coded
// differentially: w(n) = w(n-1) + u(n) mod 8, with w(-1) = 0 after reset.
// Interface: u is the 3-bit input {x11,x8,x4} taken when in_valid is high;
// w is combinational from u and the stored previous output.
// The choice of bits follows from the mapping; the mod-8 form and the reset
// value are this design's choice.
module diff_encoder (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [2:0] u,
  output logic [2:0] w
);
  logic [2:0] prev;

  assign w = prev + u;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        prev <= '0;
    else if (in_valid) prev <= w;
endmodule

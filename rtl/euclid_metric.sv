// euclid_metric: Euclidean metrics of one received 8PSK sample (I, Q).
// Minimising |r - s|^2 over the eight points is the same as maximising the
// correlation d'_s = I*Is + Q*Qs, and d'_(s+4) = -d'_s, so four numbers cover
// all eight points:
//     C0 = |I|, C1 = |0.707(I+Q)|, C2 = |Q|, C3 = |0.707(Q-I)|
// with 0.707 realised as 181/256 and rounded to nearest (two constant
// multiplications). neg[i] records the sign of d'_i: the nearer point of the
// pair {i, i+4} is i+4*neg[i]; it is kept for the hard decisions of the paths.
// Interface/timing: inputs taken every clock, outputs registered (latency 1).
// The four metrics follow the published simplification; the 181/256
// constant, rounding and sign outputs are this design's choices.
module euclid_metric
  import tcm_pkg::*;
(
  input  logic clk,
  input  iq_t  i_in,
  input  iq_t  q_in,
  output cm_t  c   [4],
  output logic [3:0] neg
);
  logic signed [IQ_W:0]  sum_iq, dif_qi;
  logic signed [IQ_W+9:0] p1, p3;
  logic signed [IQ_W:0]  d [4];

  always_comb begin
    sum_iq = (IQ_W+1)'(i_in) + (IQ_W+1)'(q_in);
    dif_qi = (IQ_W+1)'(q_in) - (IQ_W+1)'(i_in);
    p1     = (IQ_W+10)'(sum_iq) * (IQ_W+10)'(RSQRT2_Q8) + (IQ_W+10)'(128);
    p3     = (IQ_W+10)'(dif_qi) * (IQ_W+10)'(RSQRT2_Q8) + (IQ_W+10)'(128);
    d[0]   = (IQ_W+1)'(i_in);
    d[1]   = (IQ_W+1)'(p1 >>> 8);
    d[2]   = (IQ_W+1)'(q_in);
    d[3]   = (IQ_W+1)'(p3 >>> 8);
  end

  always_ff @(posedge clk)
    for (int k = 0; k < 4; k++) begin
      neg[k] <= d[k][IQ_W];
      c[k]   <= C_W'(d[k][IQ_W] ? -d[k] : d[k]);
    end
endmodule

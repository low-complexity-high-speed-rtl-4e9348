// tcm_pkg: types, constants and elaboration-time tables shared by the 4-D
// 8PSK TCM encoder and decoder (code rate Rm = 11/12: 11 information bits and
// one parity bit carried by four 8PSK symbols Z0..Z3 per trellis stage).
//
// Contents
//  * widths: 7-bit signed received I/Q samples, 7-bit Euclidean metrics,
//    9-bit branch metrics, 14-bit modulo path metrics.
//  * the 64-state rate-3/4 systematic feedback convolutional code, given by
//    parity-check polynomials H0..H3 (octal, bit j = coefficient of D^j).
//    Realisation (observer form, s[0] is the output stage):
//        x0       = s[0]
//        s'[k-1]  = s[k] ^ H0[k]&x0 ^ H1[k]&x1 ^ H2[k]&x2 ^ H3[k]&x3, k=1..5
//        s'[5]    = H0[6]&x0 ^ H1[6]&x1 ^ H2[6]&x2 ^ H3[6]&x3
//    The polynomial values are this design's choice (parameters of the code).
//  * the 4-D mapping of Rm = 11/12 (x = x11..x0, all sums mod 8):
//        W  = 4x11 + 2x8 + x4
//        Z0 = W
//        Z1 = W + 4x10 + 2x6 + x2
//        Z2 = W + 4x9  + 2x5 + x1
//        Z3 = W + 4(x10+x9+x7) + 2(x6+x5+x3) + (x2+x1+x0)
//    and its inverse. 8PSK symbol Z sits at phase Z*pi/4.
//  * tables for the transition metrics unit: a branch label is
//    {x3,x2,x1,x0}; the 256 parallel transitions of a label reduce to 16
//    candidates k = {x8,x6,x5,x4} once the weight-4 bits x11,x10,x9,x7 are
//    resolved by sign (see tmu.sv).
package tcm_pkg;

  localparam int unsigned NU       = 6;            // encoder memory
  localparam int unsigned NSTATES  = 1 << NU;      // 64 trellis states
  localparam int unsigned NBM      = 16;           // branch metrics per stage
  localparam int unsigned IQ_W     = 7;            // received sample width
  localparam int unsigned C_W      = 7;            // Euclidean metric width
  localparam int unsigned BM_W     = 9;            // branch metric width
  localparam int unsigned PM_W     = 14;           // modulo path metric width
  localparam int unsigned INFO_W   = 11;           // information bits per stage

  // Parity-check polynomials of the rate-3/4 code (octal).
  localparam logic [6:0] H0 = 7'o103;
  localparam logic [6:0] H1 = 7'o030;
  localparam logic [6:0] H2 = 7'o066;
  localparam logic [6:0] H3 = 7'o024;

  // sqrt(2)/2 in Q8 (0.707 -> 181/256)
  localparam int unsigned RSQRT2_Q8 = 181;

  typedef logic signed [IQ_W-1:0] iq_t;
  typedef logic [2:0]             sym_t;     // 8PSK symbol index
  typedef logic [C_W-1:0]         cm_t;
  typedef logic [BM_W-1:0]        bm_t;
  typedef logic [PM_W-1:0]        pm_t;
  typedef logic [NU-1:0]          state_t;
  typedef logic [3:0]             label_t;   // {x3,x2,x1,x0}
  typedef logic [11:0]            path_t;    // {Z3,Z2,Z1,Z0}
  typedef logic [INFO_W-1:0]      info_t;    // info[k] carries x(k+1)

  // ---------------- convolutional code ----------------
  function automatic state_t enc_next(state_t s, logic [2:0] u);
    state_t n;
    logic   x0;
    x0 = s[0];
    for (int k = 1; k < NU; k++)
      n[k-1] = s[k] ^ (H0[k] & x0) ^ (H1[k] & u[0]) ^ (H2[k] & u[1]) ^ (H3[k] & u[2]);
    n[NU-1] = (H0[NU] & x0) ^ (H1[NU] & u[0]) ^ (H2[NU] & u[1]) ^ (H3[NU] & u[2]);
    return n;
  endfunction

  // Predecessor of state t reached with input u = {x3,x2,x1}.
  function automatic state_t enc_pred(state_t t, logic [2:0] u);
    state_t p;
    logic   x0;
    x0   = t[NU-1] ^ (H1[NU] & u[0]) ^ (H2[NU] & u[1]) ^ (H3[NU] & u[2]);
    p[0] = x0;
    for (int k = 1; k < NU; k++)
      p[k] = t[k-1] ^ (H0[k] & x0) ^ (H1[k] & u[0]) ^ (H2[k] & u[1]) ^ (H3[k] & u[2]);
    return p;
  endfunction

  // PRED_TAB[t*8+u] = predecessor of t through input u.
  typedef logic [NSTATES*8-1:0][NU-1:0] pred_tab_t;
  function automatic pred_tab_t make_pred_tab();
    pred_tab_t t;
    for (int s = 0; s < int'(NSTATES); s++)
      for (int u = 0; u < 8; u++)
        t[s*8+u] = enc_pred(state_t'(s), 3'(u));
    return t;
  endfunction
  localparam pred_tab_t PRED_TAB = make_pred_tab();

  // ---------------- 4-D mapping ----------------
  function automatic path_t map4d(logic [11:0] x);
    int w, a1, a2, a3;
    w  = 4*int'(x[11]) + 2*int'(x[8]) + int'(x[4]);
    a1 = 4*int'(x[10]) + 2*int'(x[6]) + int'(x[2]);
    a2 = 4*int'(x[9])  + 2*int'(x[5]) + int'(x[1]);
    a3 = 4*(int'(x[10]) + int'(x[9]) + int'(x[7]))
       + 2*(int'(x[6]) + int'(x[5]) + int'(x[3]))
       + (int'(x[2]) + int'(x[1]) + int'(x[0]));
    return {3'(w + a3), 3'(w + a2), 3'(w + a1), 3'(w)};
  endfunction

  function automatic logic [11:0] demap4d(path_t z);
    logic [2:0] w, d1, d2, d3;
    logic [11:0] x;
    w  = z[2:0];
    d1 = z[5:3] - w;        // 4x10 + 2x6 + x2
    d2 = z[8:6] - w;        // 4x9  + 2x5 + x1
    x[11] = w[2];  x[8] = w[1];  x[4] = w[0];
    x[10] = d1[2]; x[6] = d1[1]; x[2] = d1[0];
    x[9]  = d2[2]; x[5] = d2[1]; x[1] = d2[0];
    d3 = 3'(int'(z[11:9]) - int'(w) - 4*(int'(x[10]) + int'(x[9]))
            - 2*(int'(x[6]) + int'(x[5])) - int'(x[2]) - int'(x[1]));
    x[7] = d3[2]; x[3] = d3[1]; x[0] = d3[0];
    return x;
  endfunction

  // 12-bit code word from a label and an uncoded candidate k={x8,x6,x5,x4},
  // weight-4 bits zero.
  function automatic logic [11:0] cand_word(label_t lab, logic [3:0] k);
    logic [11:0] x;
    x = '0;
    x[3:0] = lab;
    x[4] = k[0]; x[5] = k[1]; x[6] = k[2]; x[8] = k[3];
    return x;
  endfunction

  // CIDX_TAB[lab*16+k] = {i3,i2,i1,i0}, i_j = Z_j mod 4 of that candidate.
  typedef logic [NBM*16-1:0][7:0] cidx_tab_t;
  function automatic cidx_tab_t make_cidx_tab();
    cidx_tab_t t;
    path_t z;
    for (int l = 0; l < 16; l++)
      for (int k = 0; k < 16; k++) begin
        z = map4d(cand_word(label_t'(l), 4'(k)));
        t[l*16+k] = {z[10:9], z[7:6], z[4:3], z[1:0]};
      end
    return t;
  endfunction
  localparam cidx_tab_t CIDX_TAB = make_cidx_tab();

  // Big group g = {x2,x1}. Inside it the 16 candidates split into four groups
  // by b = Z3 mod 4 for x3 = x0 = 0; MEMBER_TAB[g*16+b*4+m] is the m-th
  // candidate k of group b.
  typedef logic [63:0][3:0] member_tab_t;
  function automatic member_tab_t make_member_tab();
    member_tab_t t;
    int          cnt;
    logic [7:0]  ci;
    t = '0;
    for (int g = 0; g < 4; g++)
      for (int b = 0; b < 4; b++) begin
        cnt = 0;
        for (int k = 0; k < 16; k++) begin
          ci = CIDX_TAB[(g << 1)*16 + k];
          if (int'(ci[7:6]) == b) begin
            if (cnt < 4) t[g*16 + b*4 + cnt] = 4'(k);
            cnt++;
          end
        end
      end
    return t;
  endfunction
  localparam member_tab_t MEMBER_TAB = make_member_tab();

  // ---------------- 8PSK constellation ----------------
  // Ideal point of symbol z with amplitude a, rounded to integers.
  function automatic logic signed [IQ_W-1:0] psk_i(sym_t z, int a);
    int d;
    d = (a * int'(RSQRT2_Q8) + 128) / 256;
    case (z)
      3'd0: return IQ_W'(a);
      3'd1: return IQ_W'(d);
      3'd2: return '0;
      3'd3: return IQ_W'(-d);
      3'd4: return IQ_W'(-a);
      3'd5: return IQ_W'(-d);
      3'd6: return '0;
      default: return IQ_W'(d);
    endcase
  endfunction

  function automatic logic signed [IQ_W-1:0] psk_q(sym_t z, int a);
    return psk_i(sym_t'(z - 3'd2), a);
  endfunction

  // Modulo comparison of path metrics: a >= b when (a - b) is non-negative.
  function automatic logic pm_ge(pm_t a, pm_t b);
    pm_t d;
    d = a - b;
    return ~d[PM_W-1];
  endfunction

endpackage

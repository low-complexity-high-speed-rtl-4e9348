// tb_tcm_codec: end-to-end test of the TCM system at its default parameters.
// Random 11-bit words go through the encoder, a channel and the decoder, and
// the decoded words are compared with the sent ones. The channel adds small
// uniform noise to every sample, now and then turns one of the four symbols
// of a stage by +/-30 degrees (so its hard decision is wrong and only the
// code can fix it), and halfway rotates the whole constellation by a multiple
// of 45 degrees (the differential code must absorb it: only the stage at the
// jump differs, by the rotation, in {x11,x8,x4}). A later segment of the run
// has random gaps in the input. Checked: every decoded word, one output per
// clock in gap-free steady state, and the latency of 10 clocks from the push
// of stage n + SMU_DEPTH - 1 to the output of stage n. Counted, and required
// to happen: corrected channel errors, decoding under rotation, path-metric
// wrap-around, input gaps.
module tb_tcm_codec;
  import tcm_pkg::*;

  localparam int L       = 48;           // decoder default survivor depth
  localparam int N       = 3000;         // checked stages
  localparam int NTOT    = N + L + 8;    // plus flush tail
  localparam int AMP     = 40;
  localparam int LAT     = 10;
  localparam int ROT     = 3;            // rotation after the jump, x45 deg
  localparam int JUMP    = N / 2;
  localparam int GAP_LO  = 2 * N / 3;    // gaps allowed from here on

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  enc_in_valid = 1'b0;
  info_t enc_in_info = '0;
  logic  enc_out_valid;
  path_t enc_out_z;
  iq_t   enc_out_i [4];
  iq_t   enc_out_q [4];
  logic  dec_in_valid = 1'b0;
  iq_t   dec_in_i [4] = '{default: '0};
  iq_t   dec_in_q [4] = '{default: '0};
  logic  dec_out_valid;
  info_t dec_out_info;

  tcm_codec dut (
    .clk, .rst_n,
    .enc_in_valid, .enc_in_info, .enc_out_valid, .enc_out_z, .enc_out_i, .enc_out_q,
    .dec_in_valid, .dec_in_i, .dec_in_q, .dec_out_valid, .dec_out_info
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  info_t sent     [NTOT];
  int    rot_of   [NTOT];
  bit    ch_err   [NTOT];
  int    push_cyc [NTOT];
  int    n_enc = 0, n_ch = 0, n_dec = 0;
  int    n_corrected = 0, n_rot_ok = 0, n_wraps = 0, n_gaps = 0, n_perturbed = 0;
  int    n_enc_ok = 0;
  int    last_out_cyc = -1, n_back_to_back = 0;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic iq_t sat(real v);
    int r;
    r = $rtoi(v < 0.0 ? v - 0.5 : v + 0.5);
    if (r > 63) r = 63;
    if (r < -64) r = -64;
    return iq_t'(r);
  endfunction

  // nearest 8PSK point of a sample, by correlation
  function automatic sym_t nearest(iq_t i, iq_t q);
    real best, m;
    sym_t z;
    best = -1.0e9;
    z = '0;
    for (int s = 0; s < 8; s++) begin
      m = $itor(i) * $cos(3.14159265358979 * s / 4.0) + $itor(q) * $sin(3.14159265358979 * s / 4.0);
      if (m > best) begin best = m; z = sym_t'(s); end
    end
    return z;
  endfunction

  // ---------------- channel ----------------
  always @(posedge clk) begin
    dec_in_valid <= enc_out_valid && rst_n;
    if (enc_out_valid && rst_n) begin
      int   rot, pj;
      bit   err;
      real  th;
      // the encoder output must match the symbol model
      path_t ref_z;
      ref_z = map4d({sent[n_ch], 1'b0});
      rot = (n_ch >= JUMP) ? ROT : 0;
      pj  = (n_ch % 37 == 5) ? int'($urandom_range(3)) : -1;
      if (pj >= 0) n_perturbed++;
      err = 1'b0;
      for (int j = 0; j < 4; j++) begin
        sym_t zt;
        iq_t  ii, qq;
        int   ni, nq, sg;
        ni = int'($urandom_range(6)) - 3;
        nq = int'($urandom_range(6)) - 3;
        sg = (($urandom & 1) != 0) ? 1 : -1;
        zt = sym_t'(enc_out_z[3*j +: 3] + 3'(rot));
        th = 3.14159265358979 * $itor(zt) / 4.0;
        if (j == pj) th += $itor(sg) * 3.14159265358979 / 6.0;
        ii = sat($itor(AMP) * $cos(th) + $itor(ni));
        qq = sat($itor(AMP) * $sin(th) + $itor(nq));
        dec_in_i[j] <= ii;
        dec_in_q[j] <= qq;
        if (nearest(ii, qq) != zt) err = 1'b1;
      end
      // the two samples of symbol 0 straight from the encoder's modulator
      begin
        iq_t ei, eq;
        ei = psk_i(enc_out_z[2:0], AMP);
        eq = psk_q(enc_out_z[2:0], AMP);
        if (enc_out_i[0] == ei && enc_out_q[0] == eq) n_enc_ok++;
      end
      // non-parity bits of the symbols agree with the mapping of the sent
      // word, except for the differential code which is checked end to end
      if (ref_z[5:3] - ref_z[2:0] != enc_out_z[5:3] - enc_out_z[2:0]) begin
        failures++;
        $display("encoder mismatch at stage %0d", n_ch);
      end
      checks++;
      rot_of[n_ch] = rot;
      ch_err[n_ch] = err;
      push_cyc[n_ch] = cycle + 1;      // decoder takes it at the next edge
      n_ch++;
    end
  end

  // ---------------- decoder output ----------------
  always @(posedge clk) begin
    if (dec_out_valid && rst_n && n_dec < NTOT) begin
      if (n_dec < N) begin
        info_t exp_info;
        exp_info = sent[n_dec];
        if (n_dec == JUMP) begin
          logic [2:0] w;
          w = {exp_info[10], exp_info[7], exp_info[3]} + 3'(ROT);
          exp_info[10] = w[2]; exp_info[7] = w[1]; exp_info[3] = w[0];
        end
        checks++;
        if (dec_out_info !== exp_info) begin
          failures++;
          if (failures < 10)
            $display("stage %0d: decoded %03h expected %03h", n_dec, dec_out_info, exp_info);
        end else begin
          if (ch_err[n_dec]) n_corrected++;
          if (rot_of[n_dec] != 0) n_rot_ok++;
        end
        // latency from the push of stage n + L - 1
        checks++;
        if (cycle != push_cyc[n_dec + L - 1] + LAT) begin
          failures++;
          if (failures < 10)
            $display("stage %0d: latency %0d expected %0d", n_dec, cycle - push_cyc[n_dec + L - 1], LAT);
        end
        if (n_dec < GAP_LO - L && last_out_cyc == cycle - 1) n_back_to_back++;
      end
      last_out_cyc = cycle;
      n_dec++;
    end
  end

  // path-metric wrap-around of state 0
  pm_t pm0_prev = '0;
  always @(posedge clk) begin
    if (dut.u_dec.u_vd.u_acsu.pm[0] < pm0_prev && (pm0_prev - dut.u_dec.u_vd.u_acsu.pm[0]) > pm_t'(1 << (PM_W - 1)))
      n_wraps++;
    pm0_prev <= dut.u_dec.u_vd.u_acsu.pm[0];
  end

  // ---------------- stimulus ----------------
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    while (n_enc < NTOT) begin
      if (n_enc >= GAP_LO && n_enc < N && $urandom_range(9) == 0) begin
        enc_in_valid <= 1'b0;
        n_gaps++;
      end else begin
        info_t d;
        d = info_t'($urandom);
        sent[n_enc] = d;
        enc_in_info  <= d;
        enc_in_valid <= 1'b1;
        n_enc++;
      end
      @(posedge clk);
    end
    enc_in_valid <= 1'b0;
    repeat (LAT + 10) @(posedge clk);

    checks++;
    if (n_dec != NTOT - L + 1) begin
      failures++;
      $display("decoded %0d stages, expected %0d", n_dec, NTOT - L + 1);
    end
    checks++;
    if (n_enc_ok != NTOT) begin failures++; $display("modulator output wrong %0d", NTOT - n_enc_ok); end
    $display("mechanisms: corrected=%0d (perturbed %0d) rotated_ok=%0d pm_wraps=%0d gaps=%0d back_to_back=%0d",
             n_corrected, n_perturbed, n_rot_ok, n_wraps, n_gaps, n_back_to_back);
    checks++; if (n_corrected == 0) begin failures++; $display("no channel error was corrected"); end
    checks++; if (n_rot_ok == 0)    begin failures++; $display("no stage decoded under rotation"); end
    checks++; if (n_wraps == 0)     begin failures++; $display("path metrics never wrapped"); end
    checks++; if (n_gaps == 0)      begin failures++; $display("no input gap"); end
    checks++; if (n_back_to_back < GAP_LO - L - 20) begin failures++; $display("throughput below one stage per clock"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * NTOT) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ber_awgn: bit-error rate of the encoder/decoder loop over an additive
// white Gaussian noise channel with 7-bit input samples, at the default
// sizes. The signal-to-noise ratio is taken per 8PSK symbol (Es/N0), so
// sigma = AMP / sqrt(2 * 10^(SNR/10)); Eb/N0 is 4.39 dB lower (11 bits per
// four symbols). Gaussian samples come from the Box-Muller transform of
// $urandom. A 7-bit receiver of this scheme is expected to reach a BER of
// about 1e-4 at 13.2 dB; the check allows ten times that (1e-3), since the
// SNR convention and the code polynomials are not certain to match the
// reference. The measured BER is printed.
module tb_ber_awgn;
  import tcm_pkg::*;

  localparam int  L      = 48;
  localparam int  N      = 20000;     // checked stages per point
  localparam int  NTOT   = N + L + 8;
  localparam int  AMP    = 40;
  localparam real SNR    = 13.2;      // Es/N0 in dB

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

  int    checks = 0, failures = 0;
  info_t sent [NTOT];
  int    n_enc = 0, n_dec = 0;
  longint bit_err = 0;
  real   sigma;

  function automatic real gauss();
    real u1, u2;
    u1 = ($itor($urandom_range(32'hFFFF_FFFE)) + 1.0) / 4294967296.0;
    u2 = $itor($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * 3.14159265358979 * u2);
  endfunction

  function automatic iq_t sat(real v);
    int r;
    r = $rtoi(v < 0.0 ? v - 0.5 : v + 0.5);
    if (r > 63) r = 63;
    if (r < -64) r = -64;
    return iq_t'(r);
  endfunction

  always @(posedge clk) begin
    dec_in_valid <= enc_out_valid && rst_n;
    if (enc_out_valid && rst_n)
      for (int j = 0; j < 4; j++) begin
        real gi, gq;
        gi = gauss();
        gq = gauss();
        dec_in_i[j] <= sat($itor(enc_out_i[j]) + sigma * gi);
        dec_in_q[j] <= sat($itor(enc_out_q[j]) + sigma * gq);
      end
  end

  always @(posedge clk)
    if (dec_out_valid && rst_n) begin
      if (n_dec < N) bit_err += $countones(dec_out_info ^ sent[n_dec]);
      n_dec++;
    end

  initial begin
    real ber;
    sigma = $itor(AMP) / $sqrt(2.0 * (10.0 ** (SNR / 10.0)));
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    while (n_enc < NTOT) begin
      info_t d;
      d = info_t'($urandom);
      sent[n_enc] = d;
      enc_in_info  <= d;
      enc_in_valid <= 1'b1;
      n_enc++;
      @(posedge clk);
    end
    enc_in_valid <= 1'b0;
    repeat (20) @(posedge clk);
    ber = $itor(bit_err) / $itor(N * INFO_W);
    $display("Es/N0 %0.2f dB (Eb/N0 %0.2f dB) sigma %0.2f: %0d bit errors in %0d bits, BER %e", SNR, SNR - 4.39, sigma, bit_err, N * INFO_W, ber);
    checks++;
    if (n_dec != NTOT - L + 1) begin failures++; $display("decoded %0d stages", n_dec); end
    checks++;
    if (ber > 1.0e-3) begin failures++; $display("BER above 1e-3"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * NTOT) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

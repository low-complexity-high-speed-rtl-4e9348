// tb_tcm_decoder: the decoder alone, fed by a reference encoder written from
// the equations (mod-8 differential sum, parity-check equation, integer
// mapping, floating-point 8PSK points of amplitude 40) plus uniform noise
// of +/-4 per sample, with random gaps in the input. Every decoded word must
// equal the sent one and leave 10 clocks after the push of the stage
// SMU_DEPTH - 1 later.
module tb_tcm_decoder;
  import tcm_pkg::*;
  import tcm_ref_pkg::*;
  localparam int L   = 48;
  localparam int N   = 800;
  localparam int AMP = 40;
  logic  clk = 0, rst_n = 0, in_valid = 0, out_valid;
  iq_t   in_i [4] = '{default: '0};
  iq_t   in_q [4] = '{default: '0};
  info_t out_info;
  int checks = 0, failures = 0;
  int cycle = 0;
  info_t sent [N];
  int    push_cyc [N];
  int n_in = 0, n_out = 0;
  logic [6:0] hx0 = '0, hx1 = '0, hx2 = '0, hx3 = '0;  // bit d = value d stages ago
  int acc = 0;

  tcm_decoder dut (.clk, .rst_n, .in_valid, .in_i, .in_q, .out_valid, .out_info);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk)
    if (out_valid && rst_n) begin
      checks++;
      if (out_info != sent[n_out]) begin
        failures++;
        if (failures < 10) $display("stage %0d: %03h expected %03h", n_out, out_info, sent[n_out]);
      end
      checks++;
      if (cycle != push_cyc[n_out + L - 1] + 10) begin
        failures++;
        if (failures < 10) $display("stage %0d: latency %0d", n_out, cycle - push_cyc[n_out + L - 1]);
      end
      n_out++;
    end

  function automatic iq_t sat(real v);
    int r;
    r = $rtoi(v < 0.0 ? v - 0.5 : v + 0.5);
    if (r > 63) r = 63;
    if (r < -64) r = -64;
    return iq_t'(r);
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (n_in < N) begin
      @(negedge clk);
      in_valid = ($urandom_range(7) != 0);
      if (in_valid) begin
        info_t d;
        logic [11:0] x;
        logic [11:0] z;
        logic p;
        d   = info_t'($urandom);
        p   = ref_parity(H0, H1, H2, H3, hx0, hx1, hx2, hx3);
        acc = (acc + 4*d[10] + 2*d[7] + d[3]) % 8;
        x   = {d, p};
        x[11] = acc[2]; x[8] = acc[1]; x[4] = acc[0];
        z   = ref_map(x);
        hx0 = {hx0[5:1], p, 1'b0};
        hx1 = {hx1[5:1], d[0], 1'b0};
        hx2 = {hx2[5:1], d[1], 1'b0};
        hx3 = {hx3[5:1], d[2], 1'b0};
        for (int j = 0; j < 4; j++) begin
          real th;
          int  ni, nq;
          ni = int'($urandom_range(8)) - 4;
          nq = int'($urandom_range(8)) - 4;
          th = 3.14159265358979 * $itor(z[3*j +: 3]) / 4.0;
          in_i[j] = sat($itor(AMP) * $cos(th) + $itor(ni));
          in_q[j] = sat($itor(AMP) * $sin(th) + $itor(nq));
        end
        sent[n_in] = d;
        push_cyc[n_in] = cycle;
        n_in++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (15) @(posedge clk);
    checks++;
    if (n_out != N - L + 1) begin failures++; $display("%0d outputs, expected %0d", n_out, N - L + 1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10 * N) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

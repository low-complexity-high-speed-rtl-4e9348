// tb_delay_chain: random pushes of 16 random paths and random pops with a
// random selector, keeping the buffer between empty and full. Each pop must
// return, one clock later, the selected path of the oldest stage still held.
module tb_delay_chain;
  import tcm_pkg::*;
  localparam int DEPTH = 52;
  logic   clk = 0, rst_n = 0, push = 0, pop = 0, out_valid;
  path_t  in_path [NBM] = '{default: '0};
  label_t sel = '0;
  path_t  out_path;
  int checks = 0, failures = 0;
  typedef path_t stage_t [NBM];
  stage_t q [$];
  path_t  expp;
  bit     expv = 0;
  int     n_full = 0;

  delay_chain #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .push, .in_path, .pop, .sel, .out_valid, .out_path);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      stage_t s;
      @(negedge clk);
      checks++;
      if (out_valid != expv || (expv && out_path != expp)) begin
        failures++;
        if (failures < 10) $display("n=%0d out %0b/%03h expected %0b/%03h", n, out_valid, out_path, expv, expp);
      end
      for (int l = 0; l < 16; l++) s[l] = path_t'($urandom);
      in_path = s;
      sel  = label_t'($urandom);
      // fill phases and drain phases
      push = (q.size() < DEPTH) && ($urandom_range(9) < ((n / 200) % 2 == 0 ? 8 : 3));
      pop  = (q.size() > 0) && ($urandom_range(9) < ((n / 200) % 2 == 0 ? 3 : 8));
      if (q.size() == DEPTH) n_full++;
      expv = pop;
      if (pop) expp = q[0][sel];
      if (pop) void'(q.pop_front());
      if (push) q.push_back(s);
    end
    checks++;
    if (n_full == 0) begin failures++; $display("buffer never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// delay_chain: holds the 16 candidate paths ({Z3,Z2,Z1,Z0} hard symbols) of
// each trellis stage while the Viterbi decoder is still deciding that stage,
// then hands out the one named by the decided label. The Viterbi decoder
// works on 4-bit labels only; the 12-bit paths wait here.
// Realised as a circular buffer of DEPTH stages (a memory array): a push
// writes all 16 paths of one stage, a pop reads the oldest stage and selects
// path[sel]. Stages leave in the order they entered, so no latency constant
// is needed. DEPTH must exceed the number of stages in flight inside the
// Viterbi decoder (its survivor depth plus two).
// Timing: out_path is registered and valid one clock after pop. Pushing into
// a full buffer or popping an empty one is a usage error (asserted).
module delay_chain
  import tcm_pkg::*;
#(
  parameter int DEPTH = 52
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   push,
  input  path_t  in_path [NBM],
  input  logic   pop,
  input  label_t sel,
  output logic   out_valid,
  output path_t  out_path
);
  localparam int AW = $clog2(DEPTH);

  path_t          mem [DEPTH][NBM];
  logic [AW-1:0]  wr_ptr, rd_ptr;
  logic [AW:0]    count;

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk)
    if (push) mem[wr_ptr] <= in_path;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      count     <= '0;
      out_valid <= 1'b0;
      out_path  <= '0;
    end else begin
      out_valid <= pop;
      if (push) wr_ptr <= incr(wr_ptr);
      if (pop) begin
        rd_ptr   <= incr(rd_ptr);
        out_path <= mem[rd_ptr][sel];
      end
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push && !pop |-> int'(count) < DEPTH);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> count != 0);
endmodule

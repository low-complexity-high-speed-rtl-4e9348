// diff_decoder: inverse of diff_encoder. Recovers u(n) = w(n) - w(n-1) mod 8
// for the 3-bit number {x11,x8,x4} of each decoded stage, which makes the
// decoded data immune to a constant carrier phase offset that is a multiple
// of 45 degrees (only the first stage after such an offset is lost).
// Interface: w is taken when in_valid is high; u is registered and appears
// with out_valid one clock later. Reset value w(-1) = 0 matches diff_encoder.
module diff_decoder (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [2:0] w,
  output logic       out_valid,
  output logic [2:0] u
);
  logic [2:0] prev;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      prev      <= '0;
      u         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        u    <= w - prev;
        prev <= w;
      end
    end
endmodule

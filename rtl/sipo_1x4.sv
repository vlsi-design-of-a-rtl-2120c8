// sipo_1x4: one-to-four serial-in parallel-out primitive.
//
// One data pin carries four bits in turn.  Flip-flop k samples the pin on the
// rising edge of sipo_clk while count[k] is high (count is one-hot, from the
// clock generator), so every flip-flop loads only its own bit and keeps it
// for the rest of the cellular-array cycle; no bit ripples through the
// others.  The document gates sipo_clk with count[k] for each flip-flop; here
// count[k] is a load enable on a common clock, which has the same effect.
module sipo_1x4 (
  input  logic       sipo_clk,
  input  logic       rst_n,
  input  logic [3:0] count,
  input  logic       data,
  output logic [3:0] q
);
  always_ff @(posedge sipo_clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else
      for (int k = 0; k < 4; k++)
        if (count[k]) q[k] <= data;
  end
endmodule

// ca_au: arithmetic unit of a CA cell.
//
// Adds +1 or -1 to a two's-complement offset with a ripple-carry adder.  A
// downward-moving offset is decremented (dec = 1, the adder adds the two's
// complement of one, all ones) and an upward-moving offset is incremented.
// Purely combinational.  A fanin cell holds two of these, one per direction,
// so that both can work in the same clock cycle; a fanout cell holds one.
module ca_au #(
  parameter int W = 8
) (
  input  logic [W-1:0] a,
  input  logic         dec,   // 1: a - 1, 0: a + 1
  output logic [W-1:0] y
);
  logic [W-1:0] b;
  logic [W-1:0] c;   // carry into each bit; the carry out of the top bit wraps away

  assign b    = dec ? {W{1'b1}} : W'(1);
  assign c[0] = 1'b0;
  for (genvar i = 0; i < W; i++) begin : g_fa
    assign y[i] = a[i] ^ b[i] ^ c[i];
    if (i < W - 1) begin : g_carry
      assign c[i+1] = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
    end
  end
endmodule

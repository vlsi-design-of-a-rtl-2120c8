// ca_clkgen: clock generator of the CA chip.
//
// Counter 1 counts system-clock rising edges modulo 8.  The inverse of its
// most significant bit is retimed by a falling-edge flip-flop (set by RN) to
// give ca_clk, one cellular-array cycle per eight system clocks, high for the
// first four.  sipo_clk = clk AND ca_clk gives four system-clock pulses while
// ca_clk is high, used by the SIPO registers.  Counter 2 counts falling edges
// modulo 8; its states 0..3 are decoded into the one-hot selects count[3:0],
// so count[k] is stable around the (k+1)-th sipo_clk pulse.  ca_clk rises
// together with count[0]; the array computes during counter-2 states 4..7.
// This follows the document's clock generator; the counters are written as
// binary counters instead of T flip-flop chains.
module ca_clkgen (
  input  logic       clk,
  input  logic       rst_n,
  output logic       ca_clk,
  output logic       sipo_clk,
  output logic [3:0] count
);
  logic [2:0] cnt1, cnt2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt1 <= '0;
    else        cnt1 <= cnt1 + 3'd1;
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) cnt2 <= '0;
    else        cnt2 <= cnt2 + 3'd1;
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) ca_clk <= 1'b1;
    else        ca_clk <= ~cnt1[2];
  end

  assign sipo_clk = clk & ca_clk;

  always_comb
    for (int k = 0; k < 4; k++) count[k] = (cnt2 == 3'(k));
endmodule

// sipo_bank: N_PRIM one-to-four SIPO primitives plus N_EXTRA direct pins.
//
// Deserializes a 4*N_PRIM + N_EXTRA bit stream from N_PRIM + N_EXTRA pins.
// Primitive p fills bits [4p+3:4p], bit k on the k-th sipo_clk pulse of a
// cellular-array cycle.  The extra pins carry one bit each, sampled with the
// first group (count[0]).  N_PRIM=3, N_EXTRA=0 is the 3-to-12 module of a top
// or bottom column port; N_PRIM=4, N_EXTRA=2 is the 6-to-18 module of the
// left side.
module sipo_bank #(
  parameter int N_PRIM  = 3,
  parameter int N_EXTRA = 0,
  localparam int NPIN   = N_PRIM + N_EXTRA,
  localparam int NBIT   = 4 * N_PRIM + N_EXTRA
) (
  input  logic            sipo_clk,
  input  logic            rst_n,
  input  logic [3:0]      count,
  input  logic [NPIN-1:0] pins,
  output logic [NBIT-1:0] q
);
  for (genvar p = 0; p < N_PRIM; p++) begin : g_prim
    sipo_1x4 u_sipo (
      .sipo_clk(sipo_clk),
      .rst_n   (rst_n),
      .count   (count),
      .data    (pins[p]),
      .q       (q[4*p +: 4])
    );
  end
  for (genvar e = 0; e < N_EXTRA; e++) begin : g_extra
    always_ff @(posedge sipo_clk or negedge rst_n) begin
      if (!rst_n)        q[4*N_PRIM + e] <= 1'b0;
      else if (count[0]) q[4*N_PRIM + e] <= pins[N_PRIM + e];
    end
  end
endmodule

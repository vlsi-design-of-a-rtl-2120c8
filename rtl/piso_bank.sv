// piso_bank: N_PRIM four-to-one PISO primitives plus N_EXTRA direct pins.
//
// Serializes 4*N_PRIM + N_EXTRA bits onto N_PRIM + N_EXTRA pins with the
// same bit order as sipo_bank, so that a piso_bank of one chip feeds the
// sipo_bank of its neighbour.  The extra pins show their bit for the whole
// cycle.  N_PRIM=3 is the 12-to-3 module, N_PRIM=4, N_EXTRA=2 the 18-to-6
// module.  Combinational.
module piso_bank #(
  parameter int N_PRIM  = 3,
  parameter int N_EXTRA = 0,
  localparam int NPIN   = N_PRIM + N_EXTRA,
  localparam int NBIT   = 4 * N_PRIM + N_EXTRA
) (
  input  logic [3:0]      count,
  input  logic [NBIT-1:0] d,
  output logic [NPIN-1:0] pins
);
  for (genvar p = 0; p < N_PRIM; p++) begin : g_prim
    piso_4x1 u_piso (.count(count), .data(d[4*p +: 4]), .q(pins[p]));
  end
  for (genvar e = 0; e < N_EXTRA; e++) begin : g_extra
    assign pins[N_PRIM + e] = d[4*N_PRIM + e];
  end
endmodule

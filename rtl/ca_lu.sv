// ca_lu: logic unit of a fanin cell.
//
// Evaluates one of the seven gate types of ca_pkg::gtype_e on the cell's own
// signal (a) and, for two-input gates, the signal of the cell below (b).
// Purely combinational.  The set of operations and their encoding are this
// design's choice; only their number (seven) is fixed.
module ca_lu
  import ca_pkg::*;
(
  input  gtype_e gtype,
  input  logic   a,
  input  logic   b,
  output logic   y
);
  always_comb begin
    unique case (gtype)
      G_BUF:   y = a;
      G_INV:   y = ~a;
      G_AND:   y = a & b;
      G_NAND:  y = ~(a & b);
      G_OR:    y = a | b;
      G_NOR:   y = ~(a | b);
      G_XOR:   y = a ^ b;
      default: y = a;
    endcase
  end
endmodule

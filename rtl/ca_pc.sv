// ca_pc: pipeline controller of a CA cell.
//
// A cell reports gc_i = computed | s0 (finished with the current data, or
// STABLE).  Completion is ANDed upwards along the column: gcu = gcd & gc_i,
// where gcd is the gcu of the cell below.  The column-complete signal gc is
// taken from the cell's own gcu when the cell above is STABLE or absent
// (u_s0 = 1), otherwise from the gc passed down by the cell above (gc_prev).
// This per-cell selection lets the topmost active cell of a column, or the top
// cell of the topmost chip, close the loop.  Combinational.
module ca_pc (
  input  logic computed,
  input  logic s0,
  input  logic gcd,
  input  logic u_s0,
  input  logic gc_prev,
  output logic gcu,
  output logic gc
);
  assign gcu = gcd & (computed | s0);
  assign gc  = u_s0 ? gcu : gc_prev;
endmodule

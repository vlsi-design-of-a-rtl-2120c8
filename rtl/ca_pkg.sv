// ca_pkg: types and constants shared by the cellular-automata (CA) logic/fault
// simulation engine.
//
// The engine maps a gate-level circuit (fanin and fanout of at most two) onto a
// 2-D array of identical cells.  Even columns are fanin columns (they evaluate
// gates), odd columns are fanout columns (they distribute gate results to the
// cells that use them).  Signals move vertically along two 1-bit data paths,
// each tagged with an 8-bit two's-complement offset that counts down (downward
// path, positive offsets) or up (upward path, negative offsets) by one per row.
// An offset of zero in a path register means the path register is empty.
//
// The neighbour bundles below are this design's own packing.  The vertical
// bundles are 12 bits wide, which is the width of the top/bottom data stream
// the chip multiplexes onto three pins; the horizontal fanout-to-fanin bundle
// is 3 bits wide, giving the 18-bit left/right streams of a six-row chip.
package ca_pkg;

  localparam int OFF_W = 8;                 // offset word length
  typedef logic signed [OFF_W-1:0] off_t;

  // Cell states (4-bit StatusReg).  The state names follow the CA model; the
  // codes are this design's choice.
  typedef enum logic [3:0] {
    ST_STABLE      = 4'd0,   // unused cell: does nothing, passes path data
    ST_FANIN       = 4'd1,   // top cell of a two-input gate
    ST_BOTFANIN    = 4'd2,   // lower input of a gate, or a one-input gate
    ST_FANOUT      = 4'd3,   // fanout cell that does not read its left neighbour
    ST_FANOUTRECV  = 4'd4,   // fanout cell that receives a gate result
    ST_NEWPIPE     = 4'd5,   // Fanout, one cycle after its column finished
    ST_NEWPIPERECV = 4'd6    // FanoutRecv, one cycle after its column finished
  } state_e;

  // Gate types (3-bit Gtype): seven logic operations.
  typedef enum logic [2:0] {
    G_BUF  = 3'd0,
    G_INV  = 3'd1,
    G_AND  = 3'd2,
    G_NAND = 3'd3,
    G_OR   = 3'd4,
    G_NOR  = 3'd5,
    G_XOR  = 3'd6
  } gtype_e;

  // Initialization pass types, selected by the two control bits uo1,uo0 that
  // a cell keeps in the low bits of its UpOffReg while start = 0.
  typedef enum logic [1:0] {
    PASS_A = 2'b00,   // data = {uo1, uo0, FanoutNo[1:0], state[3:0]}
    PASS_B = 2'b01,   // data = OffReg
    PASS_C = 2'b10,   // data = {5'b0, Gtype}
    PASS_D = 2'b11    // data = {6'b0, fault enable, stuck-at value}
  } pass_e;

  // Bundle a cell sends to the cell below it (and a chip to the chip below).
  typedef struct packed {
    off_t off;    // DnOffReg (initialization: the data word)
    logic sig;    // DnSigReg (initialization: data-available flag, "uds")
    logic gc;     // column-complete signal passed downwards
    logic s0;     // this cell is STABLE (simulation mode only)
    logic s2;     // initialization: IRN passed down; simulation: state == BotFanin
  } dn_bus_t;

  // Bundle a cell sends to the cell above it.
  typedef struct packed {
    off_t off;    // UpOffReg
    logic sig;    // UpSigReg
    logic gcu;    // completion status of this cell and all cells below
    logic osig;   // this cell's signal (second input of the gate above)
    logic have;   // this cell holds its signal for the current pattern
  } up_bus_t;

  // Bundle a fanout cell (or the left chip edge) sends to the fanin cell on
  // its right.
  typedef struct packed {
    logic sig;    // SigReg
    logic np;     // NewPipe / NewPipeRecv: a new pattern is available
    logic s0;     // the sending cell is STABLE
  } fo_bus_t;

  // Bundle a fanin cell sends to the fanout cell on its right.
  typedef struct packed {
    logic res;    // gate evaluation result
    logic gc;     // column-complete signal of the fanin column
  } fi_bus_t;

endpackage

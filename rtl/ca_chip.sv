// ca_chip: the CA logic/fault simulation chip.
//
// A ROWS x COLS cellular array (6 x 6: three fanin and three fanout columns)
// whose 324 boundary bits per array cycle are time-multiplexed onto 84 data
// pins: each column has a 12-bit stream in and out at the top and at the
// bottom, carried on 3 pins in 4 groups (SIPO 3x12 / PISO 12x3), and each side
// has an 18-bit stream carried on 6 pins (SIPO 6x18 on the left, PISO 18x6 on
// the right: four 4-bit groups plus two bits on pins of their own).  The clock
// generator divides the system clock clk by eight into the array clock and
// produces the SIPO clock and the group selects.
//
// Timing, per array cycle of eight clk periods: ca_clk rises on a falling clk
// edge, together with count[0].  During the next four clk high phases
// (sipo_clk pulses) group k = 0..3 is driven by the PISOs, from the array's
// new register state, and sampled by the SIPOs while count[k] is high.  The
// array uses the SIPO contents at its next rising edge, so a bundle crossing
// a chip boundary is delayed by one array cycle.  Neighbouring chips share
// clk and RN, so their generators run in step and the PISO pins of one chip
// can be wired straight to the SIPO pins of the next.
//
// Bit order: a 12-bit top/bottom stream is the packed dn_bus_t or up_bus_t,
// pin p carrying bits 4p..4p+3 in groups 0..3; the 18-bit side streams are
// the packed fo_bus_t of rows 0..5 (row 0 in the least significant bits).
// The stream widths, pin counts and clocking follow the document; the
// contents of each stream and the bit order are this design's choice.
module ca_chip
  import ca_pkg::*;
#(
  parameter int ROWS = 6,
  parameter int COLS = 6,
  localparam int V_PINS  = $bits(dn_bus_t) / 4,    // 3 pins per 12-bit stream
  localparam int H_BITS  = ROWS * $bits(fo_bus_t), // 18
  localparam int H_PRIM  = H_BITS / 4,              // 4 SIPO/PISO primitives
  localparam int H_EXTRA = H_BITS % 4,              // 2 extra pins
  localparam int H_PINS  = H_PRIM + H_EXTRA         // 6 pins
) (
  input  logic                          clk,        // system clock
  input  logic                          rst_n,      // RN
  input  logic                          start,      // 0: initialization, 1: simulation
  input  logic [COLS-1:0][V_PINS-1:0]   top_in_pins,
  output logic [COLS-1:0][V_PINS-1:0]   top_out_pins,
  input  logic [COLS-1:0][V_PINS-1:0]   bot_in_pins,
  output logic [COLS-1:0][V_PINS-1:0]   bot_out_pins,
  input  logic [H_PINS-1:0]             left_pins,
  output logic [H_PINS-1:0]             right_pins
);
  logic       ca_clk, sipo_clk;
  logic [3:0] count;

  ca_clkgen u_clkgen (
    .clk     (clk),
    .rst_n   (rst_n),
    .ca_clk  (ca_clk),
    .sipo_clk(sipo_clk),
    .count   (count)
  );

  dn_bus_t [COLS-1:0] top_in;
  up_bus_t [COLS-1:0] top_out;
  up_bus_t [COLS-1:0] bot_in;
  dn_bus_t [COLS-1:0] bot_out;
  fo_bus_t [ROWS-1:0] left_in;
  fo_bus_t [ROWS-1:0] right_out;

  for (genvar c = 0; c < COLS; c++) begin : g_col_io
    sipo_bank #(.N_PRIM(V_PINS), .N_EXTRA(0)) u_sipo_top (
      .sipo_clk(sipo_clk), .rst_n(rst_n), .count(count),
      .pins(top_in_pins[c]), .q(top_in[c]));
    sipo_bank #(.N_PRIM(V_PINS), .N_EXTRA(0)) u_sipo_bot (
      .sipo_clk(sipo_clk), .rst_n(rst_n), .count(count),
      .pins(bot_in_pins[c]), .q(bot_in[c]));
    piso_bank #(.N_PRIM(V_PINS), .N_EXTRA(0)) u_piso_top (
      .count(count), .d(top_out[c]), .pins(top_out_pins[c]));
    piso_bank #(.N_PRIM(V_PINS), .N_EXTRA(0)) u_piso_bot (
      .count(count), .d(bot_out[c]), .pins(bot_out_pins[c]));
  end

  sipo_bank #(.N_PRIM(H_PRIM), .N_EXTRA(H_EXTRA)) u_sipo_left (
    .sipo_clk(sipo_clk), .rst_n(rst_n), .count(count),
    .pins(left_pins), .q(left_in));
  piso_bank #(.N_PRIM(H_PRIM), .N_EXTRA(H_EXTRA)) u_piso_right (
    .count(count), .d(right_out), .pins(right_pins));

  ca_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk      (ca_clk),
    .rst_n    (rst_n),
    .start    (start),
    .top_in   (top_in),
    .top_out  (top_out),
    .bot_in   (bot_in),
    .bot_out  (bot_out),
    .left_in  (left_in),
    .right_out(right_out)
  );
endmodule

// ca_tile_pair: two cellular arrays stacked vertically, as two chips in one
// column of a multi-chip engine, for testbenches.
//
// Array u_a is the upper chip, u_b the lower one; together they form a
// 2*ROWS x COLS array.  The bundles crossing between them pass through one
// register stage clocked by the array clock, standing for the receiving
// chip's serial-in register: on silicon a bundle that leaves one chip is
// captured by the neighbour's SIPO and reaches its cells one array cycle
// later.  Left and right edges of both arrays are concatenated, rows of u_a
// first.  Interface and timing otherwise as ca_array.
module ca_tile_pair
  import ca_pkg::*;
#(
  parameter int ROWS = 6,
  parameter int COLS = 6
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  dn_bus_t [COLS-1:0]     top_in,
  output up_bus_t [COLS-1:0]     top_out,
  input  up_bus_t [COLS-1:0]     bot_in,
  output dn_bus_t [COLS-1:0]     bot_out,
  input  fo_bus_t [2*ROWS-1:0]   left_in,
  output fo_bus_t [2*ROWS-1:0]   right_out
);
  dn_bus_t [COLS-1:0] a_dn_out, b_dn_in;   // downward across the boundary
  up_bus_t [COLS-1:0] b_up_out, a_up_in;   // upward across the boundary

  ca_array #(.ROWS(ROWS), .COLS(COLS)) u_a (
    .clk, .rst_n, .start,
    .top_in, .top_out,
    .bot_in (a_up_in), .bot_out(a_dn_out),
    .left_in(left_in[ROWS-1:0]), .right_out(right_out[ROWS-1:0])
  );

  ca_array #(.ROWS(ROWS), .COLS(COLS)) u_b (
    .clk, .rst_n, .start,
    .top_in (b_dn_in), .top_out(b_up_out),
    .bot_in, .bot_out,
    .left_in(left_in[2*ROWS-1:ROWS]), .right_out(right_out[2*ROWS-1:ROWS])
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_dn_in <= '0;
      a_up_in <= '0;
    end else begin
      b_dn_in <= a_dn_out;
      a_up_in <= b_up_out;
    end
  end
endmodule

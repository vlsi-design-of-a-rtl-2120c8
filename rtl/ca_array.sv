// ca_array: the cellular array, ROWS x COLS cells.
//
// Even columns (0, 2, ...) are fanin columns and odd columns are fanout
// columns, so a circuit level occupies one fanin/fanout column pair.  Cells
// talk only to their four neighbours: vertical bundles both ways inside a
// column, horizontal bundles from left to right only (the CA is unilateral).
// The four edges are brought out so that arrays (chips) can be tiled in both
// dimensions: top_in/top_out connect to the chip above, bot_in/bot_out to the
// chip below, left_in to the fanout column of the chip on the left and
// right_out to the fanin column of the chip on the right.  The array is
// clocked by the cellular-array clock; all registers are in the cells.
// The 6x6 default size is the document's kernel; the column-type ordering
// follows its mapping example.  Each cell's outgoing bundles are separate
// variables declared in its own generate scope: the upward bundle depends
// only on registers and on the cells below, the downward bundle on the cells
// above and on the upward bundle from below, so no variable feeds itself.
// The gate-result bundle of the last column has no load: that column is a
// fanout column and its outputs leave the array on right_out.
module ca_array
  import ca_pkg::*;
#(
  parameter int ROWS = 6,
  parameter int COLS = 6     // even: the last column is a fanout column
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  dn_bus_t [COLS-1:0]    top_in,
  output up_bus_t [COLS-1:0]    top_out,
  input  up_bus_t [COLS-1:0]    bot_in,
  output dn_bus_t [COLS-1:0]    bot_out,
  input  fo_bus_t [ROWS-1:0]    left_in,
  output fo_bus_t [ROWS-1:0]    right_out
);
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      dn_bus_t u_dn;
      up_bus_t d_up;
      fo_bus_t lfo;
      fi_bus_t lfi;
      dn_bus_t dn;
      up_bus_t up;
      fi_bus_t rfi;
      fo_bus_t rfo;

      if (r == 0) begin : g_top
        assign u_dn = top_in[c];
      end else begin : g_mid_u
        assign u_dn = g_row[r-1].g_col[c].dn;
      end
      if (r == ROWS - 1) begin : g_bot
        assign d_up = bot_in[c];
      end else begin : g_mid_d
        assign d_up = g_row[r+1].g_col[c].up;
      end
      if (c == 0) begin : g_edge
        assign lfo = left_in[r];
        assign lfi = '0;
      end else begin : g_inner
        assign lfo = g_row[r].g_col[c-1].rfo;
        assign lfi = g_row[r].g_col[c-1].rfi;
      end

      ca_cell #(.FANIN((c % 2) == 0)) u_cell (
        .clk  (clk),
        .rst_n(rst_n),
        .start(start),
        .u_dn (u_dn),
        .d_up (d_up),
        .lfo  (lfo),
        .lfi  (lfi),
        .dn   (dn),
        .up   (up),
        .rfi  (rfi),
        .rfo  (rfo)
      );
    end
  end

  for (genvar c = 0; c < COLS; c++) begin : g_edge_v
    assign top_out[c] = g_row[0].g_col[c].up;
    assign bot_out[c] = g_row[ROWS-1].g_col[c].dn;
  end
  for (genvar r = 0; r < ROWS; r++) begin : g_edge_h
    assign right_out[r] = g_row[r].g_col[COLS-1].rfo;
  end
endmodule

// tb_ca_tile: c17 on two stacked arrays, i.e. a column of two chips.
//
// The same circuit mapping as in the single-array test is placed SH rows
// down a 12-row column made of two 6-row arrays (ca_tile_pair), so that it
// straddles the chip boundary: with SH = 3 the gate N23 has its two cells on
// different chips, and signals cross the boundary on both the downward and
// the upward path.  The boundary adds one array cycle of latency, so the
// lower chip sees each column-complete signal and starts each pattern one
// cycle after the upper chip.  The test loads the circuit through the top
// edge of the upper chip (words for the cells of the lower chip shift
// through the boundary) and reads every cell's configuration back, applies
// 64 patterns at one per six array cycles and checks every output, then
// loads a stuck-at fault and repeats with the faulty reference, then
// repeats once more with through traffic from above that must leave the
// lower chip unchanged.  Counts boundary crossings in both directions and
// fails if either never happened.
module tb_ca_tile;
  import ca_pkg::*;
  import c17_pkg::*;

  localparam int ROWS = 12, COLS = 6;
  localparam int SH = 3;                // row of the mapping's first cell
  localparam int PERIOD = 6;
  localparam int NPAT = 64;

  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  // Start released and pull RN low at time 1 so the asynchronous reset sees an edge.
  initial #1 rst_n = 1'b0;
  dn_bus_t [COLS-1:0] top_in;
  up_bus_t [COLS-1:0] top_out;
  up_bus_t [COLS-1:0] bot_in;
  dn_bus_t [COLS-1:0] bot_out;
  fo_bus_t [ROWS-1:0] left_in;
  fo_bus_t [ROWS-1:0] right_out;

  int checks = 0, failures = 0;
  int cyc = 0;

  ca_tile_pair #(.ROWS(ROWS / 2), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ---------------------------------------------------------------- init
  int gc_seen [COLS];
  always @(posedge clk)
    if (!start)
      for (int c = 0; c < COLS; c++) if (top_out[c].gcu) gc_seen[c]++;

  // Run one pass; fanin columns get pass type pi with uo_next ui, fanout
  // columns pass type po with uo_next uo_n.  en_fo = 0 leaves fanout columns
  // without data.
  // Initialization word for array row t: the mapping's word, or a STABLE
  // cell's word outside the mapping.
  function automatic logic [7:0] word_at(int t, int c, pass_e p, logic [1:0] u, logic [1:0] f);
    if (t >= SH && t < SH + 6) return pass_word(t - SH, c, p, u, f);
    return (p == PASS_A) ? {u, 6'b0} : 8'h00;
  endfunction

  task automatic run_pass(input pass_e pi, input logic [1:0] ui, input pass_e po,
                          input logic [1:0] uo_n, input bit en_fo, input logic [1:0] fault [ROWS]);
    int prev_gc [COLS];
    for (int c = 0; c < COLS; c++) prev_gc[c] = gc_seen[c];
    for (int t = 0; t < ROWS; t++) begin
      @(negedge clk);
      for (int c = 0; c < COLS; c++) begin
        top_in[c].off = (c % 2 == 0) ? word_at(t, c, pi, ui, (c == 0) ? fault[t] : 2'b00)
                                      : word_at(t, c, po, uo_n, 2'b00);
        top_in[c].sig = (c % 2 == 0) || en_fo;
      end
    end
    @(negedge clk);
    for (int c = 0; c < COLS; c++) begin
      top_in[c].off = '0;
      top_in[c].sig = 1'b0;
    end
    repeat (ROWS + 3) @(negedge clk);
    for (int c = 0; c < COLS; c++)
      if ((c % 2 == 0) || en_fo)
        check(gc_seen[c] == prev_gc[c] + 1, $sformatf("pass end gc pulse column %0d", c));
  endtask

  task automatic irn_pulse();
    @(negedge clk);
    for (int c = 0; c < COLS; c++) top_in[c].s2 = 1'b1;
    @(negedge clk);
    for (int c = 0; c < COLS; c++) top_in[c].s2 = 1'b0;
  endtask

  // ----------------------------------------------------------- simulation
  logic [4:0] pats [NPAT];
  logic [1:0] expq [$];
  int out_cnt = 0, last_out = -1, gap_bad = 0, detected = 0;
  bit transit = 1'b0;                  // through-traffic phase: spacing not checked
  int fault_net = 0;
  logic fault_sa = 1'b0;

  always @(posedge clk) begin
    if (start && right_out[SH].np) begin
      logic [1:0] got, exp;
      got = {right_out[SH+1].sig, right_out[SH].sig};
      if (expq.size() == 0) check(1'b0, "unexpected output");
      else begin
        exp = expq.pop_front();
        check(got == exp, $sformatf("output %0d got %b exp %b", out_cnt, got, exp));
        if (fault_net != 0 && got != exp) ;
      end
      if (last_out >= 0 && cyc - last_out != PERIOD) gap_bad++;
      last_out = cyc;
      out_cnt++;
    end
  end

  task automatic run_patterns(input int fnet, input logic sa);
    logic [1:0] good;
    fault_net = fnet;
    fault_sa  = sa;
    last_out  = -1;
    for (int p = 0; p < NPAT; p++) begin
      logic [5:0] rows;
      rows = pi_rows(pats[p]);
      expq.push_back(c17_ref(pats[p], fnet, sa));
      good = c17_ref(pats[p], 0, 1'b0);
      if (good != c17_ref(pats[p], fnet, sa)) detected++;
      @(negedge clk);
      for (int r = 0; r < 6; r++) left_in[SH+r] = '{sig: rows[r], np: 1'b1, s0: 1'b0};
      @(negedge clk);
      for (int r = 0; r < 6; r++) left_in[SH+r].np = 1'b0;
      repeat (PERIOD - 2) @(negedge clk);
    end
    repeat (40) @(negedge clk);
    check(expq.size() == 0, "all outputs produced");
    if (!transit)
      check(gap_bad == 0, $sformatf("one output every %0d cycles (%0d bad gaps)", PERIOD, gap_bad));
  endtask

  // ---------------------------------------------------- mechanism counters
  int n_dn = 0, n_up = 0, n_np = 0, n_stable = 0, n_pend = 0;
  always @(posedge clk) if (start) begin
    for (int c = 0; c < COLS; c++) begin
      if (dut.b_dn_in[c].off != '0) n_dn++;   // downward across the boundary
      if (dut.a_up_in[c].off != '0) n_up++;   // upward across the boundary
    end
    if (right_out[SH].np) n_np++;
    if (right_out[0].s0) n_stable++;
  end

  state_e st_mon   [ROWS][COLS];
  off_t   off_mon  [ROWS][COLS];
  gtype_e g_mon    [ROWS][COLS];
  logic   pend_mon [ROWS][COLS];
  for (genvar r = 0; r < ROWS; r++) begin : g_mr
    for (genvar c = 0; c < COLS; c++) begin : g_mc
      if (r < ROWS / 2) begin : g_a
        assign st_mon[r][c]   = dut.u_a.g_row[r].g_col[c].u_cell.state_q;
        assign off_mon[r][c]  = dut.u_a.g_row[r].g_col[c].u_cell.off_q;
        assign g_mon[r][c]    = dut.u_a.g_row[r].g_col[c].u_cell.gtype_q;
        assign pend_mon[r][c] = dut.u_a.g_row[r].g_col[c].u_cell.pending_q;
      end else begin : g_b
        assign st_mon[r][c]   = dut.u_b.g_row[r-ROWS/2].g_col[c].u_cell.state_q;
        assign off_mon[r][c]  = dut.u_b.g_row[r-ROWS/2].g_col[c].u_cell.off_q;
        assign g_mon[r][c]    = dut.u_b.g_row[r-ROWS/2].g_col[c].u_cell.gtype_q;
        assign pend_mon[r][c] = dut.u_b.g_row[r-ROWS/2].g_col[c].u_cell.pending_q;
      end
    end
  end
  always @(posedge clk) if (start) begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) if (pend_mon[r][c]) n_pend++;
  end

  // Through traffic on column 0: sent from above, collected below.
  logic tr_q [$];
  int tr_sent = 0, tr_got = 0;
  always @(posedge clk) if (start && bot_out[0].off != '0) begin
    check(bot_out[0].off == off_t'(1), $sformatf("through signal leaves with offset %0d", bot_out[0].off));
    if (tr_q.size() == 0) check(1'b0, "unexpected through signal");
    else check(bot_out[0].sig == tr_q.pop_front(), "through signal value");
    tr_got++;
  end

  task automatic send_through(input int n);
    for (int k = 0; k < n; k++) begin
      repeat (2 * PERIOD + 1) @(negedge clk);
      top_in[0].off = off_t'(ROWS + 1);
      top_in[0].sig = 1'($urandom);
      tr_q.push_back(top_in[0].sig);
      tr_sent++;
      @(negedge clk);
      top_in[0].off = '0;
      top_in[0].sig = 1'b0;
    end
  endtask

  logic [1:0] nofault [ROWS];
  logic [1:0] onefault [ROWS];

  initial begin
    for (int c = 0; c < COLS; c++) begin
      top_in[c] = '{off: '0, sig: 1'b0, gc: 1'b0, s0: 1'b1, s2: 1'b0};
      bot_in[c] = '{off: '0, sig: 1'b0, gcu: 1'b1, osig: 1'b0, have: 1'b0};
    end
    for (int r = 0; r < ROWS; r++) begin
      left_in[r] = '0;
      nofault[r] = 2'b00;
      onefault[r] = (r == SH + 3) ? 2'b11 : 2'b00;   // stuck-at-1 on the N3 branch into N11
    end
    for (int p = 0; p < NPAT; p++) pats[p] = (p < 32) ? 5'(p) : 5'($urandom);
    for (int c = 0; c < COLS; c++) gc_seen[c] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Fanin: A(->B) B  IRN  A(->C) C.   Fanout: A(->B) B  A(->B) B.
    run_pass(PASS_A, 2'b01, PASS_A, 2'b01, 1'b1, nofault);
    run_pass(PASS_B, 2'b00, PASS_B, 2'b00, 1'b1, nofault);
    irn_pulse();
    run_pass(PASS_A, 2'b10, PASS_A, 2'b01, 1'b1, nofault);
    run_pass(PASS_C, 2'b00, PASS_B, 2'b00, 1'b1, nofault);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        automatic cell_cfg_t x = (r >= SH && r < SH + 6) ? cfg(r - SH, c)
                                                        : '{ST_STABLE, 2'd0, off_t'(0), G_BUF};
        check(st_mon[r][c] == x.st && off_mon[r][c] == x.off &&
              (c % 2 == 1 || g_mon[r][c] == x.g),
              $sformatf("cell %0d,%0d configured: %0d/%0d off %0d/%0d g %0d/%0d", r, c,
                        st_mon[r][c], x.st, off_mon[r][c], x.off, g_mon[r][c], x.g));
      end
    @(negedge clk) start = 1'b1;
    run_patterns(0, 1'b0);
    $display("logic simulation: %0d outputs", out_cnt);
    // Fault simulation: load a stuck-at-1 fault into cell (3,0).
    @(negedge clk) start = 1'b0;
    irn_pulse();
    run_pass(PASS_A, 2'b11, PASS_A, 2'b01, 1'b0, nofault);
    run_pass(PASS_D, 2'b00, PASS_B, 2'b00, 1'b0, onefault);
    check(dut.u_b.g_row[SH+3-ROWS/2].g_col[0].u_cell.fault_q == 2'b11, "fault register loaded");
    @(negedge clk) start = 1'b1;
    detected = 0;
    run_patterns(9, 1'b1);
    check(detected > 0, "fault detected by some pattern");
    $display("fault simulation: detected by %0d of %0d patterns", detected, NPAT);
    // Through traffic from the chip above while the patterns run again.
    transit = 1'b1;
    n_pend  = 0;
    fork
      run_patterns(9, 1'b1);
      send_through(NPAT / 3);
    join
    repeat (ROWS + 2) @(negedge clk);
    check(tr_got == tr_sent && tr_q.size() == 0,
          $sformatf("through signals: %0d sent, %0d arrived", tr_sent, tr_got));
    $display("through traffic: %0d signals, cells held a signal for %0d cycles", tr_sent, n_pend);
    $display("boundary crossings: down=%0d up=%0d", n_dn, n_up);
    check(n_dn > 0, "signals crossed the boundary downwards");
    check(n_up > 0, "signals crossed the boundary upwards");
    check(n_np > 0, "NewPipe");
    check(n_stable > 0, "STABLE cells");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

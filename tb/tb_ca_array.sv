// tb_ca_array: end-to-end test of the 6x6 cellular array with c17.
//
// Loads c17 through the initialization passes (A, B, IRN, A, C for fanin
// columns; A, B, A, B for fanout columns), checks that every pass ends with a
// column-complete (gc) pulse, then applies 64 patterns at one pattern every
// PERIOD array cycles and compares both primary outputs with the reference
// model.  The outputs must come out at the input rate (one every PERIOD
// cycles).  It then loads a stuck-at fault into one fanin cell (IRN, type-A
// and type-D passes), re-runs the patterns, compares with the faulty
// reference and checks that the fault is detected.  Finally it re-runs the
// patterns while acting as a chip above that sends signals straight through
// column 0 to the chip below: each such signal enters the top edge with
// offset ROWS+1 and must leave the bottom edge with offset 1 and its value
// unchanged.  Its timing drifts against the pattern rate, so it sometimes
// occupies the downward path just as a cell of column 0 wants to inject;
// the path keeps priority and the cell's signal waits in its holding
// register.  Outputs must still be correct; only their spacing may stretch.
// Counts how often each mechanism (down path, up path, fanout to two
// targets, two-input evaluation, NewPipe, STABLE cells, fault injection,
// path priority with a held signal) occurred.
module tb_ca_array;
  import ca_pkg::*;
  import c17_pkg::*;

  localparam int ROWS = 6, COLS = 6;
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

  ca_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

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
  task automatic run_pass(input pass_e pi, input logic [1:0] ui, input pass_e po,
                          input logic [1:0] uo_n, input bit en_fo, input logic [1:0] fault [ROWS]);
    int prev_gc [COLS];
    for (int c = 0; c < COLS; c++) prev_gc[c] = gc_seen[c];
    for (int t = 0; t < ROWS; t++) begin
      @(negedge clk);
      for (int c = 0; c < COLS; c++) begin
        top_in[c].off = (c % 2 == 0) ? pass_word(t, c, pi, ui, (c == 0) ? fault[t] : 2'b00)
                                      : pass_word(t, c, po, uo_n, 2'b00);
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
    if (start && right_out[0].np) begin
      logic [1:0] got, exp;
      got = {right_out[1].sig, right_out[0].sig};
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
      for (int r = 0; r < ROWS; r++) left_in[r] = '{sig: rows[r], np: 1'b1, s0: 1'b0};
      @(negedge clk);
      for (int r = 0; r < ROWS; r++) left_in[r].np = 1'b0;
      repeat (PERIOD - 2) @(negedge clk);
    end
    repeat (40) @(negedge clk);
    check(expq.size() == 0, "all outputs produced");
    if (!transit)
      check(gap_bad == 0, $sformatf("one output every %0d cycles (%0d bad gaps)", PERIOD, gap_bad));
  endtask

  // ---------------------------------------------------- mechanism counters
  int n_dn = 0, n_up = 0, n_fo2 = 0, n_eval2 = 0, n_np = 0, n_stable = 0, n_pend = 0;
  always @(posedge clk) if (start) begin
    if (dut.g_row[3].g_col[0].u_cell.rx_dn) n_dn++;
    if (dut.g_row[2].g_col[0].u_cell.rx_up) n_up++;
    if (dut.g_row[3].g_col[1].u_cell.st && dut.g_row[3].g_col[1].u_cell.want_self
        && dut.g_row[3].g_col[1].u_cell.want_send) n_fo2++;
    if (dut.g_row[0].g_col[4].u_cell.computed_q && dut.g_row[0].g_col[4].u_cell.two_in) n_eval2++;
    if (right_out[0].np) n_np++;
    if (right_out[5].s0) n_stable++;
  end

  state_e st_mon  [ROWS][COLS];
  off_t   off_mon [ROWS][COLS];
  gtype_e g_mon   [ROWS][COLS];
  for (genvar r = 0; r < ROWS; r++) begin : g_mr
    for (genvar c = 0; c < COLS; c++) begin : g_mc
      assign st_mon[r][c]  = dut.g_row[r].g_col[c].u_cell.state_q;
      assign off_mon[r][c] = dut.g_row[r].g_col[c].u_cell.off_q;
      assign g_mon[r][c]   = dut.g_row[r].g_col[c].u_cell.gtype_q;
    end
  end

  logic pend_mon [ROWS][COLS];
  for (genvar r = 0; r < ROWS; r++) begin : g_mp
    for (genvar c = 0; c < COLS; c++) begin : g_mpc
      assign pend_mon[r][c] = dut.g_row[r].g_col[c].u_cell.pending_q;
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
      onefault[r] = (r == 3) ? 2'b11 : 2'b00;   // stuck-at-1 on the N3 branch into N11
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
        automatic cell_cfg_t x = cfg(r, c);
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
    check(dut.g_row[3].g_col[0].u_cell.fault_q == 2'b11, "fault register loaded");
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
    check(n_pend > 0, "path priority: a cell held its signal");
    $display("mechanisms: down=%0d up=%0d fanout2=%0d eval2=%0d newpipe=%0d stable=%0d",
             n_dn, n_up, n_fo2, n_eval2, n_np, n_stable);
    check(n_dn > 0, "downward path used");
    check(n_up > 0, "upward path used");
    check(n_fo2 > 0, "fanout to two targets");
    check(n_eval2 > 0, "two-input evaluation");
    check(n_np > 0, "NewPipe");
    check(n_stable > 0, "STABLE cells");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

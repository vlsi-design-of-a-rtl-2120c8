// tb_ca_chip: end-to-end test of the CA chip at its default size, through
// its pins, with c17.
//
// The testbench plays the four neighbouring chips: it holds one bundle per
// pin group ("virtual" top, bottom and left inputs), serializes it onto the
// pins with the chip's own group selects, and reassembles the top and right
// output streams from the pins on each sipo_clk pulse.  Bundles change once
// per array cycle, right after ca_clk rises, as a neighbour's registers would.
//
// Sequence: initialization passes for all columns through the top pins
// (fanin A, B, IRN, A, C; fanout A, B, A, B), each checked for its gc pulse
// on the top output stream; 64 patterns at one per six array cycles through
// the left pins, with both primary outputs compared on the right pins and the
// output spacing checked; a stuck-at-1 fault loaded into the fanin cell that
// holds the N3 branch of gate N11 (IRN, A, D) and the patterns re-run against
// the faulty reference; then the patterns once more while the testbench, as
// the chip above, sends signals through column 0 that must leave on the
// bottom pins with offset 1 and their value, sometimes delaying a cell's own
// injection (the path has priority).  Also checks the clocking: eight system
// clocks per array cycle and four SIPO pulses.  Counts each mechanism and fails on one
// that never happened.
module tb_ca_chip;
  import ca_pkg::*;
  import c17_pkg::*;

  localparam int ROWS = 6, COLS = 6, PERIOD = 6, NPAT = 64;

  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  // Start released and pull RN low at time 1 so the asynchronous reset sees an edge.
  initial #1 rst_n = 1'b0;
  logic [COLS-1:0][2:0] top_in_pins, top_out_pins, bot_in_pins, bot_out_pins;
  logic [5:0] left_pins, right_pins;

  ca_chip dut (.*);

  int checks = 0, failures = 0;
  always #6 clk = ~clk;                   // 12 ns system clock

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ------------------------------------------------ neighbour chips
  dn_bus_t [COLS-1:0] top_v;
  up_bus_t [COLS-1:0] bot_v;
  fo_bus_t [ROWS-1:0] left_v;
  up_bus_t [COLS-1:0] top_o, top_acc;
  dn_bus_t [COLS-1:0] bot_o, bot_acc;
  fo_bus_t [ROWS-1:0] right_o, right_acc;
  logic [3:0] cnt;
  assign cnt = dut.count;

  function automatic logic grp(input logic [3:0] nib, input logic [3:0] c);
    return |(nib & c);
  endfunction

  always_comb begin
    logic [17:0] l;
    for (int c = 0; c < COLS; c++)
      for (int p = 0; p < 3; p++) begin
        top_in_pins[c][p] = grp(top_v[c][4*p +: 4], cnt);
        bot_in_pins[c][p] = grp(bot_v[c][4*p +: 4], cnt);
      end
    l = left_v;
    for (int p = 0; p < 4; p++) left_pins[p] = grp(l[4*p +: 4], cnt);
    left_pins[4] = l[16];
    left_pins[5] = l[17];
  end

  // Output deserializer: one group per sipo_clk pulse.
  int acyc = 0;
  event word_done;
  always @(posedge dut.sipo_clk) begin
    logic [17:0] r;
    for (int k = 0; k < 4; k++) if (cnt[k]) begin
      for (int c = 0; c < COLS; c++)
        for (int p = 0; p < 3; p++) begin
          top_acc[c][4*p + k] = top_out_pins[c][p];
          bot_acc[c][4*p + k] = bot_out_pins[c][p];
        end
      r = right_acc;
      for (int p = 0; p < 4; p++) r[4*p + k] = right_pins[p];
      r[16] = right_pins[4];
      r[17] = right_pins[5];
      right_acc = r;
    end
    if (cnt[3]) begin
      top_o   = top_acc;
      bot_o   = bot_acc;
      right_o = right_acc;
      acyc++;
      ->word_done;
    end
  end

  // ------------------------------------------------ clocking checks
  int clk_in_cyc = 0, sipo_in_cyc = 0, nca = 0, clk_bad = 0;
  always @(posedge clk) clk_in_cyc++;
  always @(posedge dut.sipo_clk) sipo_in_cyc++;
  always @(posedge dut.ca_clk) begin
    if (nca > 1 && (clk_in_cyc != 8 || sipo_in_cyc != 4)) clk_bad++;
    clk_in_cyc  = 0;
    sipo_in_cyc = 0;
    nca++;
  end

  task automatic next_cycle();
    @(posedge dut.ca_clk);
    #1;
  endtask

  // ------------------------------------------------ initialization
  int gc_seen [COLS];
  always @(word_done)
    if (!start) for (int c = 0; c < COLS; c++) if (top_o[c].gcu) gc_seen[c]++;

  task automatic run_pass(input pass_e pi, input logic [1:0] ui, input pass_e po,
                          input logic [1:0] uo_n, input bit en_fo, input logic [1:0] flt);
    int prev_gc [COLS];
    for (int c = 0; c < COLS; c++) prev_gc[c] = gc_seen[c];
    for (int t = 0; t < ROWS; t++) begin
      next_cycle();
      for (int c = 0; c < COLS; c++) begin
        top_v[c].off = (c % 2 == 0) ? pass_word(t, c, pi, ui, (c == 0 && t == 3) ? flt : 2'b00)
                                    : pass_word(t, c, po, uo_n, 2'b00);
        top_v[c].sig = (c % 2 == 0) || en_fo;
      end
    end
    next_cycle();
    for (int c = 0; c < COLS; c++) begin
      top_v[c].off = '0;
      top_v[c].sig = 1'b0;
    end
    repeat (ROWS + 5) next_cycle();
    for (int c = 0; c < COLS; c++)
      if ((c % 2 == 0) || en_fo)
        check(gc_seen[c] == prev_gc[c] + 1, $sformatf("pass end gc pulse column %0d", c));
  endtask

  task automatic irn_pulse();
    next_cycle();
    for (int c = 0; c < COLS; c++) top_v[c].s2 = 1'b1;
    next_cycle();
    for (int c = 0; c < COLS; c++) top_v[c].s2 = 1'b0;
    next_cycle();
  endtask

  // ------------------------------------------------ simulation
  logic [4:0] pats [NPAT];
  logic [1:0] expq [$];
  int out_cnt = 0, last_out = -1, gap_bad = 0, detected = 0;
  bit transit = 1'b0;                  // through-traffic phase: spacing not checked

  always @(word_done) if (start && right_o[0].np) begin
    logic [1:0] got, exp;
    got = {right_o[1].sig, right_o[0].sig};
    if (expq.size() == 0) check(1'b0, "unexpected output");
    else begin
      exp = expq.pop_front();
      check(got == exp, $sformatf("output %0d got %b exp %b", out_cnt, got, exp));
    end
    if (last_out >= 0 && acyc - last_out != PERIOD) gap_bad++;
    last_out = acyc;
    out_cnt++;
  end

  task automatic run_patterns(input int fnet, input logic sa);
    last_out = -1;
    gap_bad  = 0;
    for (int p = 0; p < NPAT; p++) begin
      logic [5:0] rows;
      rows = pi_rows(pats[p]);
      expq.push_back(c17_ref(pats[p], fnet, sa));
      if (c17_ref(pats[p], 0, 1'b0) != c17_ref(pats[p], fnet, sa)) detected++;
      next_cycle();
      for (int r = 0; r < ROWS; r++) left_v[r] = '{sig: rows[r], np: 1'b1, s0: 1'b0};
      next_cycle();
      for (int r = 0; r < ROWS; r++) left_v[r].np = 1'b0;
      repeat (PERIOD - 2) next_cycle();
    end
    repeat (40) next_cycle();
    check(expq.size() == 0, "all outputs produced");
    if (!transit)
      check(gap_bad == 0, $sformatf("one output every %0d array cycles (%0d bad gaps)", PERIOD, gap_bad));
  endtask

  // ------------------------------------------------ mechanism counters
  int n_dn = 0, n_up = 0, n_fo2 = 0, n_np = 0, n_pend = 0, n_irn = 0, n_fault = 0;
  always @(posedge dut.ca_clk) begin
    if (start && dut.u_array.g_row[3].g_col[0].u_cell.rx_dn) n_dn++;
    if (start && dut.u_array.g_row[2].g_col[0].u_cell.rx_up) n_up++;
    if (start && dut.u_array.g_row[3].g_col[1].u_cell.st) n_fo2++;
    if (start && dut.u_array.g_row[0].g_col[5].u_cell.is_np) n_np++;
    if (!start && dut.u_array.g_row[5].g_col[0].u_cell.u_dn.s2) n_irn++;
    if (start && dut.u_array.g_row[3].g_col[0].u_cell.fault_q[1]) n_fault++;
  end

  logic pend_mon [ROWS][COLS];
  for (genvar r = 0; r < ROWS; r++) begin : g_mp
    for (genvar c = 0; c < COLS; c++) begin : g_mpc
      assign pend_mon[r][c] = dut.u_array.g_row[r].g_col[c].u_cell.pending_q;
    end
  end
  always @(posedge dut.ca_clk) if (start) begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) if (pend_mon[r][c]) n_pend++;
  end

  // ------------------------------------------------ through traffic
  logic tr_q [$];
  int tr_sent = 0, tr_got = 0;
  always @(word_done) if (start && bot_o[0].off != '0) begin
    check(bot_o[0].off == off_t'(1), $sformatf("through signal leaves with offset %0d", bot_o[0].off));
    if (tr_q.size() == 0) check(1'b0, "unexpected through signal");
    else check(bot_o[0].sig == tr_q.pop_front(), "through signal value");
    tr_got++;
  end

  task automatic send_through(input int n);
    for (int k = 0; k < n; k++) begin
      repeat (2 * PERIOD + 1) next_cycle();
      top_v[0].off = off_t'(ROWS + 1);
      top_v[0].sig = 1'($urandom);
      tr_q.push_back(top_v[0].sig);
      tr_sent++;
      next_cycle();
      top_v[0].off = '0;
      top_v[0].sig = 1'b0;
    end
  endtask

  initial begin
    for (int c = 0; c < COLS; c++) begin
      top_v[c] = '{off: '0, sig: 1'b0, gc: 1'b0, s0: 1'b1, s2: 1'b0};
      bot_v[c] = '{off: '0, sig: 1'b0, gcu: 1'b1, osig: 1'b0, have: 1'b0};
      gc_seen[c] = 0;
    end
    top_acc = '0;
    right_acc = '0;
    top_o = '0;
    bot_acc = '0;
    bot_o = '0;
    right_o = '0;
    for (int r = 0; r < ROWS; r++) left_v[r] = '0;
    for (int p = 0; p < NPAT; p++) pats[p] = (p < 32) ? 5'(p) : 5'($urandom);
    // RN must return to 1 while clk is low, before a rising clk edge, so
    // that the two clock-generator counters start in step.
    #26 rst_n = 1'b1;
    repeat (3) next_cycle();
    run_pass(PASS_A, 2'b01, PASS_A, 2'b01, 1'b1, 2'b00);
    run_pass(PASS_B, 2'b00, PASS_B, 2'b00, 1'b1, 2'b00);
    irn_pulse();
    run_pass(PASS_A, 2'b10, PASS_A, 2'b01, 1'b1, 2'b00);
    run_pass(PASS_C, 2'b00, PASS_B, 2'b00, 1'b1, 2'b00);
    next_cycle();
    start = 1'b1;
    run_patterns(0, 1'b0);
    $display("logic simulation: %0d outputs", out_cnt);
    next_cycle();
    start = 1'b0;
    irn_pulse();
    run_pass(PASS_A, 2'b11, PASS_A, 2'b01, 1'b0, 2'b00);
    run_pass(PASS_D, 2'b00, PASS_B, 2'b00, 1'b0, 2'b11);
    next_cycle();
    start = 1'b1;
    detected = 0;
    run_patterns(9, 1'b1);
    $display("fault simulation: fault detected by %0d of %0d patterns", detected, NPAT);
    check(detected > 0, "fault detected");
    transit = 1'b1;
    n_pend  = 0;
    fork
      run_patterns(9, 1'b1);
      send_through(NPAT / 3);
    join
    repeat (ROWS + 3) next_cycle();
    check(tr_got == tr_sent && tr_q.size() == 0,
          $sformatf("through signals: %0d sent, %0d arrived", tr_sent, tr_got));
    $display("through traffic: %0d signals, cells held a signal for %0d cycles", tr_sent, n_pend);
    check(n_pend > 0, "path priority: a cell held its signal");
    check(clk_bad == 0 && nca > 100, $sformatf("8 clk and 4 sipo_clk per array cycle (%0d bad)", clk_bad));
    $display("mechanisms: down=%0d up=%0d fanout-start=%0d newpipe=%0d irn=%0d fault-cycles=%0d",
             n_dn, n_up, n_fo2, n_np, n_irn, n_fault);
    check(n_dn > 0, "downward path");
    check(n_up > 0, "upward path");
    check(n_fo2 > 0, "fanout distribution");
    check(n_np > 0, "NewPipe");
    check(n_irn > 0, "IRN reset");
    check(n_fault > 0, "fault injection");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// ca_cell: one cell of the cellular array, either a fanin cell (FANIN = 1) or
// a fanout cell (FANIN = 0).
//
// Registers: StatusReg (state), FanoutNo, OffReg, Gtype, SigReg, the upward
// path pair UpOffReg/UpSigReg, the downward path pair DnOffReg/DnSigReg and
// computed.  The combinational STIG/TCU logic below decides every register's
// next value from the cell's own registers and its neighbours' bundles.  All
// registers are positive-edge triggered on the cellular-array clock.
//
// Simulation mode (start = 1), one pattern at a time per column:
//   * A fanin cell starts when its left neighbour shows NewPipe (lfo.np).  A
//     fanout cell starts on the rising edge of its left neighbour's column
//     gc.  At the start edge the cell takes the signal from the left.
//   * OffReg = 0: the signal is the cell's own (SigReg).  OffReg > 0: it is
//     put on the downward path with offset OffReg; OffReg < 0: on the upward
//     path.  The path registers of the neighbour have priority; a signal that
//     cannot enter waits (pending) in a holding register.
//   * A cell whose upper neighbour's DnOffReg is 1, or whose lower
//     neighbour's UpOffReg is -1, is the target and loads that signal into
//     SigReg.  Any other non-zero offset is passed on through the AU.
//   * Fanin cells: a BotFanin cell is done when it holds its signal; a Fanin
//     cell (top of a two-input gate) when it and the cell below hold theirs.
//     The gate result LU(Gtype, SigReg, SigReg below) goes right.  Once the
//     column's gc has been seen the cell drops its "holds" flag, so it
//     reports done again only for the next pattern.
//   * Fanout cells: a FanoutRecv cell distributes the gate result: FanoutNo
//     = 1 sends it to OffReg (0 = itself); FanoutNo = 2 keeps one copy and
//     sends one to OffReg.  A fanout cell is done when it has started on the
//     current pattern, has nothing pending and its path registers are empty.
//     Done flags are thus never left over from the previous pattern, which
//     matters when a column spans chips and the lower chip starts a cycle
//     later than the upper one.  When the whole column is done, every
//     Fanout/FanoutRecv cell goes to NewPipe/NewPipeRecv for one cycle, which
//     starts the fanin column on the right.
//   * A fanin cell's fault register (enable, value) forces its signal to a
//     stuck value, which injects a stuck-at fault on that gate input.
//
// Initialization mode (start = 0): the DnOffReg registers of a column form a
// shift register fed from the top, DnSigReg carrying a data-available flag
// (uds).  A cell with computed = 0 that sees uds = 1 loads the word, sets
// computed and clears the flag it passes on, so the k-th word of a pass is
// taken by the k-th cell from the top.  The pass type comes from the
// two control bits uo1,uo0 held in UpOffReg[1:0] (see ca_pkg::pass_e).  The
// column gc clears computed between passes.  Fanin cells clear uo1,uo0 when
// IRN (the top cell's u_s2, passed down the column) is 1; fanout cells clear
// them themselves after a type-B pass.
//
// The register set, the pass types A-C, the offset and priority rules and the
// gc logic follow the document.  The exact transition rules of the CA model
// are not given there; the start conditions, the pending/holding register,
// the FanoutNo encoding, the fault register and pass type D are this design's
// own.
//
// Unused inputs: a fanin cell ignores the s0 flag of the left bundle and a
// cell reads the lower neighbour's signal copy (osig) only as the second
// input of a two-input gate, so some input bits have no load in one of the
// two cell kinds.  RN resets the registers asynchronously and also disables
// the two assertions at the end, which is why RN reaches logic sampled on the
// clock as well.
module ca_cell
  import ca_pkg::*;
#(
  parameter bit FANIN = 1'b1
) (
  input  logic    clk,
  input  logic    rst_n,    // RN, asynchronous, active low
  input  logic    start,    // 0: initialization mode, 1: simulation mode
  input  dn_bus_t u_dn,     // from the cell above
  input  up_bus_t d_up,     // from the cell below
  input  fo_bus_t lfo,      // from the left neighbour (fanin cells)
  input  fi_bus_t lfi,      // from the left neighbour (fanout cells)
  output dn_bus_t dn,       // to the cell below
  output up_bus_t up,       // to the cell above
  output fi_bus_t rfi,      // to the right neighbour (fanin cells)
  output fo_bus_t rfo       // to the right neighbour (fanout cells)
);

  // ---------------------------------------------------------------- registers
  state_e     state_q;
  logic [1:0] fanout_no_q;
  off_t       off_q;            // OffReg
  gtype_e     gtype_q;
  logic [1:0] fault_q;          // {enable, stuck value}
  off_t       up_off_q, dn_off_q;
  logic       up_sig_q, dn_sig_q;
  logic       sig_q;            // SigReg
  logic       have_q;           // SigReg holds the current pattern's signal
  logic       pending_q;        // a signal waits to enter a path
  logic       lss_q;            // signal taken from the left, held while pending
  logic       computed_q;
  logic       active_q;         // fanout: column distributing a pattern
  logic       lgc_q;            // fanout: left gc, one cycle late

  state_e     state_d;
  logic [1:0] fanout_no_d, fault_d;
  off_t       off_d, up_off_d, dn_off_d;
  gtype_e     gtype_d;
  logic       up_sig_d, dn_sig_d, sig_d, have_d, pending_d, lss_d;
  logic       computed_d, active_d;

  // ------------------------------------------------------------ status (STIG)
  logic s0, is_recv, is_np, two_in;
  logic gc, gcu;
  logic eff_sig;

  assign s0      = (state_q == ST_STABLE);
  assign is_recv = (state_q == ST_FANOUTRECV) || (state_q == ST_NEWPIPERECV);
  assign is_np   = (state_q == ST_NEWPIPE)    || (state_q == ST_NEWPIPERECV);
  assign two_in  = FANIN && (state_q == ST_FANIN);
  assign eff_sig = (FANIN && fault_q[1]) ? fault_q[0] : sig_q;

  // Pipeline controller.  STABLE counts only in simulation mode.
  ca_pc u_pc (
    .computed(computed_q),
    .s0      (start & s0),
    .gcd     (d_up.gcu),
    .u_s0    (u_dn.s0),
    .gc_prev (u_dn.gc),
    .gcu     (gcu),
    .gc      (gc)
  );

  // --------------------------------------------------------------- AU / LU
  logic dn_busy, up_busy;      // a neighbour's path data passes through here
  off_t au_dn_y, au_up_y;
  logic lu_y;

  assign dn_busy = start && (u_dn.off > off_t'(1));
  assign up_busy = start && (d_up.off < off_t'(-1));

  if (FANIN) begin : g_fanin_au
    // Two AUs: decrement and increment in the same cycle.
    ca_au #(.W(OFF_W)) u_au_dn (.a(u_dn.off), .dec(1'b1), .y(au_dn_y));
    ca_au #(.W(OFF_W)) u_au_up (.a(d_up.off), .dec(1'b0), .y(au_up_y));
    ca_lu u_lu (.gtype(gtype_q), .a(eff_sig), .b(d_up.osig), .y(lu_y));
  end else begin : g_fanout_au
    // One AU: signals passing through a fanout cell all move one way.
    off_t au_y;
    ca_au #(.W(OFF_W)) u_au (.a(dn_busy ? u_dn.off : d_up.off), .dec(dn_busy), .y(au_y));
    assign au_dn_y = au_y;
    assign au_up_y = au_y;
    assign lu_y    = 1'b0;
  end

  // ------------------------------------------------ simulation-mode decisions
  logic st;          // start of a new pattern in this cell
  logic src;         // signal to place (own or to send)
  logic want_self, want_send, send_req, dir_dn, inject;
  logic rx_dn, rx_up;

  always_comb begin
    if (FANIN) begin
      st        = start && lfo.np;
      src       = st ? lfo.sig : lss_q;
      want_self = !s0 && (off_q == '0);
      want_send = !s0 && (off_q != '0);
    end else begin
      st        = start && lfi.gc && !lgc_q;
      src       = st ? lfi.res : lss_q;
      want_self = is_recv && ((fanout_no_q == 2'd2) || (fanout_no_q == 2'd1 && off_q == '0));
      want_send = is_recv && (fanout_no_q != 2'd0) && (off_q != '0);
    end
    send_req = st ? want_send : pending_q;
    dir_dn   = (off_q > off_t'(0));
    inject   = send_req && (dir_dn ? !dn_busy : !up_busy);
    rx_dn    = start && (u_dn.off == off_t'(1));
    rx_up    = start && (d_up.off == off_t'(-1));
  end

  // ------------------------------------------------------------- TCUs
  logic [1:0] uo;
  logic       init_load;
  assign uo        = up_off_q[1:0];
  assign init_load = u_dn.sig && !computed_q;

  always_comb begin
    state_d     = state_q;
    fanout_no_d = fanout_no_q;
    off_d       = off_q;
    gtype_d     = gtype_q;
    fault_d     = fault_q;
    up_off_d    = up_off_q;
    up_sig_d    = up_sig_q;
    dn_off_d    = dn_off_q;
    dn_sig_d    = dn_sig_q;
    sig_d       = sig_q;
    have_d      = have_q;
    pending_d   = pending_q;
    lss_d       = lss_q;
    computed_d  = computed_q;
    active_d    = active_q;

    if (!start) begin
      // ---------------- initialization mode
      dn_off_d  = u_dn.off;
      dn_sig_d  = init_load ? 1'b0 : u_dn.sig;
      up_sig_d  = 1'b0;
      sig_d     = 1'b0;
      have_d    = 1'b0;
      pending_d = 1'b0;
      active_d  = 1'b0;
      if (gc)             computed_d = 1'b0;
      else if (init_load) computed_d = 1'b1;
      if (init_load) begin
        unique case (pass_e'(uo))
          PASS_A: begin
            up_off_d    = off_t'(u_dn.off[7:6]);
            fanout_no_d = u_dn.off[5:4];
            state_d     = state_e'(u_dn.off[3:0]);
          end
          PASS_B: begin
            off_d = u_dn.off;
            if (!FANIN) up_off_d = '0;
          end
          PASS_C: if (FANIN) gtype_d = gtype_e'(u_dn.off[2:0]);
          PASS_D: if (FANIN) fault_d = u_dn.off[1:0];
          default: ;
        endcase
      end
      if (FANIN && u_dn.s2) up_off_d = '0;   // IRN: second reset of uo1,uo0
    end else begin
      // ---------------- simulation mode
      // Downward path
      if (dn_busy) begin
        dn_off_d = au_dn_y;
        dn_sig_d = u_dn.sig;
      end else if (inject && dir_dn) begin
        dn_off_d = off_q;
        dn_sig_d = src;
      end else begin
        dn_off_d = '0;
        dn_sig_d = 1'b0;
      end
      // Upward path
      if (up_busy) begin
        up_off_d = au_up_y;
        up_sig_d = d_up.sig;
      end else if (inject && !dir_dn) begin
        up_off_d = off_q;
        up_sig_d = src;
      end else begin
        up_off_d = '0;
        up_sig_d = 1'b0;
      end
      pending_d = send_req && !inject;
      if (st) lss_d = src;
      // SigReg
      if (rx_dn) begin
        sig_d  = u_dn.sig;
        have_d = 1'b1;
      end else if (rx_up) begin
        sig_d  = d_up.sig;
        have_d = 1'b1;
      end else if (st) begin
        if (want_self) sig_d = src;
        have_d = want_self;
      end else if (FANIN && gc) begin
        have_d = 1'b0;          // pattern handed on: done only after the next one
      end
      // computed
      // A STABLE cell counts as done through s0.  Its computed flag stays
      // clear, like that of every other cell once its last pattern has been
      // handed on, so that loading can start again at the top cell.
      if (s0)
        computed_d = 1'b0;
      else if (FANIN)
        computed_d = !st && have_d && !pending_d && (!two_in || d_up.have);
      else
        computed_d = active_d && !st && !pending_d && (dn_off_d == '0) && (up_off_d == '0);
      // Fanout state sequence: Fanout(Recv) -> NewPipe(Recv) -> Fanout(Recv)
      if (!FANIN) begin
        if (st) active_d = 1'b1;
        else if (active_q && gc) begin
          active_d = 1'b0;
          if (state_q == ST_FANOUT)     state_d = ST_NEWPIPE;
          if (state_q == ST_FANOUTRECV) state_d = ST_NEWPIPERECV;
        end
        if (state_q == ST_NEWPIPE)     state_d = ST_FANOUT;
        if (state_q == ST_NEWPIPERECV) state_d = ST_FANOUTRECV;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= ST_STABLE;
      fanout_no_q <= '0;
      off_q       <= '0;
      gtype_q     <= G_BUF;
      fault_q     <= '0;
      up_off_q    <= '0;
      up_sig_q    <= 1'b0;
      dn_off_q    <= '0;
      dn_sig_q    <= 1'b0;
      sig_q       <= 1'b0;
      have_q      <= 1'b0;
      pending_q   <= 1'b0;
      lss_q       <= 1'b0;
      computed_q  <= 1'b0;
      active_q    <= 1'b0;
      lgc_q       <= 1'b0;
    end else begin
      state_q     <= state_d;
      fanout_no_q <= fanout_no_d;
      off_q       <= off_d;
      gtype_q     <= gtype_d;
      fault_q     <= fault_d;
      up_off_q    <= up_off_d;
      up_sig_q    <= up_sig_d;
      dn_off_q    <= dn_off_d;
      dn_sig_q    <= dn_sig_d;
      sig_q       <= sig_d;
      have_q      <= have_d;
      pending_q   <= pending_d;
      lss_q       <= lss_d;
      computed_q  <= computed_d;
      active_q    <= active_d;
      lgc_q       <= FANIN ? 1'b0 : lfi.gc;
    end
  end

  // ------------------------------------------------------------ outputs
  assign dn.off  = dn_off_q;
  assign dn.sig  = dn_sig_q;
  assign dn.gc   = gc;
  assign dn.s0   = start & s0;
  assign dn.s2   = start ? (state_q == ST_BOTFANIN) : u_dn.s2;

  assign up.off  = up_off_q;
  assign up.sig  = up_sig_q;
  assign up.gcu  = gcu;
  assign up.osig = eff_sig;
  assign up.have = have_q;

  assign rfi.res = FANIN ? lu_y : 1'b0;
  assign rfi.gc  = FANIN ? gc : 1'b0;

  assign rfo.sig = FANIN ? 1'b0 : sig_q;
  assign rfo.np  = FANIN ? 1'b0 : is_np;
  assign rfo.s0  = FANIN ? 1'b0 : (start & s0);

  // ------------------------------------------------------------ assertions
  // A cell is the target of at most one signal per cycle.
  a_one_rx: assert property (@(posedge clk) disable iff (!rst_n) !(rx_dn && rx_up));
  // Signals crossing a fanout cell all move one way (single AU).
  if (!FANIN) begin : g_fo_chk
    a_one_dir: assert property (@(posedge clk) disable iff (!rst_n) !(dn_busy && up_busy));
  end

endmodule

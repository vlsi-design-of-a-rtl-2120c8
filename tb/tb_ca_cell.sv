// tb_ca_cell: one fanin cell and one fanout cell, each alone with its
// neighbour bundles driven by the testbench.
//
// Fanin cell: initialization passes A (state Fanin, uo -> B), B (OffReg),
// IRN, A (uo -> C), C (Gtype NAND) through the DnOffReg/DnSigReg chain,
// checking which words are taken and passed on; then simulation: own signal
// from the left with the NAND evaluated against the lower cell's signal,
// pass-through on both paths with the offset counted by one, target
// detection from above and below, and a downward injection that must wait
// while the path is occupied.  Fault register: pass D with a stuck-at-0.
// Fanout cell: FanoutRecv with FanoutNo 2 and OffReg -1 keeps the result,
// sends a copy upwards, reports completion and shows NewPipeRecv for one
// cycle.
module tb_ca_cell;
  import ca_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  // Start released and pull RN low at time 1 so the asynchronous reset sees an edge.
  initial #1 rst_n = 1'b0;
  dn_bus_t u_dn, dn_i, dn_o;
  up_bus_t d_up, up_i, up_o;
  fo_bus_t lfo, rfo_i, rfo_o;
  fi_bus_t lfi, rfi_i, rfi_o;
  int checks = 0, failures = 0;

  ca_cell #(.FANIN(1'b1)) dut_i (.clk, .rst_n, .start, .u_dn, .d_up, .lfo, .lfi,
                                 .dn(dn_i), .up(up_i), .rfi(rfi_i), .rfo(rfo_i));
  ca_cell #(.FANIN(1'b0)) dut_o (.clk, .rst_n, .start, .u_dn, .d_up, .lfo, .lfi,
                                 .dn(dn_o), .up(up_o), .rfi(rfi_o), .rfo(rfo_o));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic step();
    @(posedge clk);
    #1;
  endtask

  // Send one initialization word with uds = 1, then one more that must pass.
  task automatic init_word(input logic [7:0] w);
    u_dn.off = off_t'(w);
    u_dn.sig = 1'b1;
    step();
    chk(dn_i.off == off_t'(w) && dn_i.sig == 1'b0, "word taken, uds cleared below");
    chk(dn_i.gc, "gc after load");
    u_dn.off = off_t'(8'h5a);
    step();                               // gc clears computed on this edge
    chk(dn_i.sig == 1'b1, "next word passes on while computed");
    u_dn.sig = 1'b0;
    u_dn.off = '0;
    step();
    chk(!dn_i.gc, "computed cleared by gc");
  endtask

  initial begin
    u_dn = '{off: '0, sig: 1'b0, gc: 1'b0, s0: 1'b1, s2: 1'b0};
    d_up = '{off: '0, sig: 1'b0, gcu: 1'b1, osig: 1'b0, have: 1'b0};
    lfo  = '0;
    lfi  = '0;
    #12 rst_n = 1'b1;
    #1;
    // ------------------------------------------------ fanin initialization
    init_word({2'b01, 2'b00, 4'(ST_FANIN)});
    chk(dut_i.state_q == ST_FANIN && dut_i.up_off_q[1:0] == 2'b01, "pass A");
    init_word(8'd2);
    chk(dut_i.off_q == off_t'(2), "pass B: OffReg = 2");
    u_dn.s2 = 1'b1;                      // IRN
    step();
    u_dn.s2 = 1'b0;
    chk(dut_i.up_off_q[1:0] == 2'b00, "IRN clears uo");
    init_word({2'b10, 2'b00, 4'(ST_FANIN)});
    init_word({5'd0, 3'(G_NAND)});
    chk(dut_i.gtype_q == G_NAND && dut_i.off_q == off_t'(2), "pass C: Gtype");
    // ------------------------------------------------ fanin simulation
    start = 1'b1;
    step();
    step();
    // Left signal must go down 2 rows but the path above is occupied.
    u_dn.off = off_t'(3);
    u_dn.sig = 1'b1;
    lfo = '{sig: 1'b0, np: 1'b1, s0: 1'b0};
    step();
    lfo.np = 1'b0;
    chk(dn_i.off == off_t'(2) && dn_i.sig == 1'b1, "pass-through downwards, offset 3 -> 2");
    chk(dut_i.pending_q, "injection waits while the path is busy");
    u_dn.off = '0;
    u_dn.sig = 1'b0;
    step();
    chk(dn_i.off == off_t'(2) && dn_i.sig == 1'b0, "held left signal injected with OffReg");
    chk(!dut_i.pending_q, "nothing pending");
    // Own signal arrives from below (target of UpOffReg = -1).
    d_up.off = off_t'(-1);
    d_up.sig = 1'b1;
    step();
    chk(dut_i.have_q && dut_i.sig_q, "target from below loads SigReg");
    chk(!dut_i.computed_q, "Fanin waits for the lower input");
    d_up.off = off_t'(-4);
    d_up.sig = 1'b0;
    d_up.have = 1'b1;
    d_up.osig = 1'b1;
    step();
    chk(up_i.off == off_t'(-3), "pass-through upwards, offset -4 -> -3");
    chk(rfi_i.res == 1'b0, "NAND(1,1) = 0");
    d_up.osig = 1'b0;
    #1 chk(rfi_i.res == 1'b1, "NAND(1,0) = 1");
    chk(dut_i.computed_q && dn_i.gc, "column complete");
    d_up.off = '0;
    step();
    chk(!dut_i.computed_q && !dut_i.have_q, "after gc the cell waits for the next pattern");
    // Target from above.
    u_dn.off = off_t'(1);
    u_dn.sig = 1'b0;
    step();
    chk(dut_i.sig_q == 1'b0, "target from above loads SigReg");
    u_dn.off = '0;
    // ------------------------------------------------ fault register
    start = 1'b0;
    step();
    u_dn.s2 = 1'b1;
    step();
    u_dn.s2 = 1'b0;
    init_word({2'b11, 2'b00, 4'(ST_FANIN)});
    init_word(8'b10);                    // enable, stuck-at-0
    chk(dut_i.fault_q == 2'b10, "pass D: fault register");
    start = 1'b1;
    d_up.osig = 1'b1;
    u_dn.off = off_t'(1);
    u_dn.sig = 1'b1;
    step();
    u_dn.off = '0;
    chk(dut_i.sig_q == 1'b1 && up_i.osig == 1'b0 && rfi_i.res == 1'b1, "stuck-at-0 forces the gate input");
    // ------------------------------------------------ fanout cell
    start = 1'b0;
    rst_n = 1'b0;
    #1 rst_n = 1'b1;
    u_dn = '{off: '0, sig: 1'b0, gc: 1'b0, s0: 1'b1, s2: 1'b0};
    d_up = '{off: '0, sig: 1'b0, gcu: 1'b1, osig: 1'b0, have: 1'b0};
    init_word({2'b01, 2'd2, 4'(ST_FANOUTRECV)});
    init_word(8'hff);                    // OffReg = -1
    chk(dut_o.state_q == ST_FANOUTRECV && dut_o.fanout_no_q == 2'd2 &&
        dut_o.off_q == off_t'(-1) && dut_o.up_off_q == '0, "fanout cell configured");
    start = 1'b1;
    step();
    lfi = '{res: 1'b1, gc: 1'b1};
    step();
    chk(dut_o.sig_q == 1'b1 && up_o.off == off_t'(-1) && up_o.sig == 1'b1,
        "FanoutNo 2: own copy kept, one copy sent up");
    chk(!dn_o.gc, "column busy while distributing");
    step();
    chk(up_o.off == '0 && dn_o.gc, "distribution complete");
    step();
    chk(dut_o.state_q == ST_NEWPIPERECV && rfo_o.np && rfo_o.sig, "NewPipeRecv shown to the right");
    step();
    chk(dut_o.state_q == ST_FANOUTRECV && !rfo_o.np, "back to FanoutRecv");
    chk(!dn_o.gc, "fanout cell not done again until its next start");
    step();
    chk(dut_o.state_q == ST_FANOUTRECV, "no second start while left gc stays high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

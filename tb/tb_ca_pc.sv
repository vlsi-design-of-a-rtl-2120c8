// tb_ca_pc: pipeline controller.  Checks gcu and gc on all 32 input
// combinations, then builds a six-cell column from ca_pc instances (gcu
// chained upwards, gc passed downwards) and checks that every cell sees
// column completion exactly when all non-STABLE cells are computed, with
// STABLE cells splitting off as in an active/stable column.
module tb_ca_pc;
  int checks = 0, failures = 0;

  logic computed, s0, gcd, u_s0, gc_prev, gcu, gc;
  ca_pc dut (.*);

  // A column of six controllers.
  localparam int N = 6;
  logic [N-1:0] c_comp, c_s0, c_gcu, c_gc;
  for (genvar i = 0; i < N; i++) begin : g_col
    ca_pc u_pc (
      .computed(c_comp[i]),
      .s0      (c_s0[i]),
      .gcd     ((i == N - 1) ? 1'b1 : c_gcu[i+1]),
      .u_s0    ((i == 0) ? 1'b1 : c_s0[i-1]),
      .gc_prev ((i == 0) ? 1'b0 : c_gc[i-1]),
      .gcu     (c_gcu[i]),
      .gc      (c_gc[i])
    );
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int i = 0; i < 32; i++) begin
      logic egcu, egc;
      {computed, s0, gcd, u_s0, gc_prev} = 5'(i);
      #1;
      egcu = gcd && (computed || s0);
      egc  = u_s0 ? egcu : gc_prev;
      chk(gcu == egcu && gc == egc, $sformatf("single cell case %0d", i));
    end
    // Column: no STABLE cells, completion of all cells needed.
    for (int k = 0; k < 200; k++) begin
      logic all;
      c_s0   = '0;
      c_comp = 6'($urandom);
      if (k % 4 == 0) c_comp = '1;
      #1;
      all = &c_comp;
      chk(c_gc == {N{all}}, $sformatf("column gc comp=%b", c_comp));
    end
    // Column with the lower cells STABLE: the active top part still sees
    // one common gc, which the STABLE part passes down.
    for (int k = 0; k < 200; k++) begin
      int ntop;
      logic all;
      ntop   = 1 + ($urandom % N);
      c_s0   = '0;
      for (int i = ntop; i < N; i++) c_s0[i] = 1'b1;
      c_comp = 6'($urandom);
      if (k % 4 == 0) c_comp = '1;
      #1;
      all = 1'b1;
      for (int i = 0; i < ntop; i++) all &= c_comp[i];
      // Active cells, and the first STABLE cell below them, see the common
      // gc; deeper STABLE cells form their own (don't-care) segment.
      for (int i = 0; i < N && i <= ntop; i++)
        chk(c_gc[i] == all, $sformatf("active top %0d comp=%b gc=%b row %0d", ntop, c_comp, c_gc, i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sipo_bank: the 6-to-18 and 3-to-12 SIPO modules.  Random 18- and 12-bit
// words are split into four groups (pin p carries bits 4p..4p+3, the extra
// pins their single bit), sent over four sipo_clk pulses and compared after
// reassembly.
module tb_sipo_bank;
  logic sipo_clk = 1'b0, rst_n = 1'b1;
  // Start released and pull RN low at time 1 so the asynchronous reset sees an edge.
  initial #1 rst_n = 1'b0;
  logic [3:0] count = '0;
  logic [5:0] pins18 = '0;
  logic [2:0] pins12 = '0;
  logic [17:0] q18;
  logic [11:0] q12;
  int checks = 0, failures = 0;

  sipo_bank #(.N_PRIM(4), .N_EXTRA(2)) dut18 (
    .sipo_clk(sipo_clk), .rst_n(rst_n), .count(count), .pins(pins18), .q(q18));
  sipo_bank #(.N_PRIM(3), .N_EXTRA(0)) dut12 (
    .sipo_clk(sipo_clk), .rst_n(rst_n), .count(count), .pins(pins12), .q(q12));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3 rst_n = 1'b1;
    for (int w = 0; w < 100; w++) begin
      logic [17:0] w18;
      logic [11:0] w12;
      w18 = 18'($urandom);
      w12 = 12'($urandom);
      for (int k = 0; k < 4; k++) begin
        count = 4'(1 << k);
        for (int p = 0; p < 4; p++) pins18[p] = w18[4*p + k];
        pins18[4] = (k == 0) ? w18[16] : 1'b0;
        pins18[5] = (k == 0) ? w18[17] : 1'b0;
        for (int p = 0; p < 3; p++) pins12[p] = w12[4*p + k];
        #5 sipo_clk = 1'b1;
        #5 sipo_clk = 1'b0;
      end
      count = '0;
      checks += 2;
      if (q18 !== w18) begin
        failures++;
        $display("FAIL 18: %h exp %h", q18, w18);
      end
      if (q12 !== w12) begin
        failures++;
        $display("FAIL 12: %h exp %h", q12, w12);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

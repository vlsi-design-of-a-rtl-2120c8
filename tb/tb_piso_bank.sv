// tb_piso_bank: the 18-to-6 and 12-to-3 PISO modules.  For random words,
// checks every pin in each of the four groups against the bit order
// (pin p shows bit 4p+k in group k; extra pins show their bit throughout).
module tb_piso_bank;
  logic [3:0] count;
  logic [17:0] d18;
  logic [11:0] d12;
  logic [5:0] pins18;
  logic [2:0] pins12;
  int checks = 0, failures = 0;

  piso_bank #(.N_PRIM(4), .N_EXTRA(2)) dut18 (.count(count), .d(d18), .pins(pins18));
  piso_bank #(.N_PRIM(3), .N_EXTRA(0)) dut12 (.count(count), .d(d12), .pins(pins12));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 64; w++) begin
      d18 = 18'($urandom);
      d12 = 12'($urandom);
      for (int k = 0; k < 4; k++) begin
        logic [5:0] e18;
        logic [2:0] e12;
        count = 4'(1 << k);
        for (int p = 0; p < 4; p++) e18[p] = d18[4*p + k];
        e18[4] = d18[16];
        e18[5] = d18[17];
        for (int p = 0; p < 3; p++) e12[p] = d12[4*p + k];
        #1;
        checks += 2;
        if (pins18 !== e18) begin
          failures++;
          $display("FAIL 18 k=%0d %b exp %b", k, pins18, e18);
        end
        if (pins12 !== e12) begin
          failures++;
          $display("FAIL 12 k=%0d %b exp %b", k, pins12, e12);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ca_au: exhaustive test of the +1/-1 arithmetic unit against integer
// arithmetic, for every 8-bit offset in both directions.
module tb_ca_au;
  logic [7:0] a, y;
  logic       dec;
  int checks = 0, failures = 0;

  ca_au #(.W(8)) dut (.a(a), .dec(dec), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 2; d++)
      for (int i = 0; i < 256; i++) begin
        logic [7:0] exp;
        a   = 8'(i);
        dec = d[0];
        exp = d[0] ? 8'(i - 1) : 8'(i + 1);
        #1;
        checks++;
        if (y !== exp) begin
          failures++;
          $display("FAIL a=%0d dec=%0d y=%0d exp=%0d", i, d, y, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

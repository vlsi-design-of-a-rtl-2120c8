// tb_ca_lu: exhaustive test of the logic unit: every gate type on every
// input pair, against a truth table written out here.
module tb_ca_lu;
  import ca_pkg::*;
  gtype_e g;
  logic a, b, y;
  int checks = 0, failures = 0;

  ca_lu dut (.gtype(g), .a(a), .b(b), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Truth tables indexed by {a, b}: 00, 01, 10, 11.
  function automatic logic [3:0] table_of(int t);
    case (t)
      0: return 4'b1100;   // BUF:  y = a
      1: return 4'b0011;   // INV
      2: return 4'b1000;   // AND
      3: return 4'b0111;   // NAND
      4: return 4'b1110;   // OR
      5: return 4'b0001;   // NOR
      6: return 4'b0110;   // XOR
      default: return 4'b0000;
    endcase
  endfunction

  initial begin
    for (int t = 0; t < 7; t++)
      for (int i = 0; i < 4; i++) begin
        logic [3:0] tt;
        g = gtype_e'(t);
        {a, b} = 2'(i);
        tt = table_of(t);
        #1;
        checks++;
        if (y !== tt[i]) begin
          failures++;
          $display("FAIL gtype=%0d a=%b b=%b y=%b", t, a, b, y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

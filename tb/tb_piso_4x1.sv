// tb_piso_4x1: for random parallel words, checks that the pin shows bit k
// while count[k] is the only select, and 0 with no select.
module tb_piso_4x1;
  logic [3:0] count, data;
  logic q;
  int checks = 0, failures = 0;

  piso_4x1 dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 64; w++) begin
      data = 4'($urandom);
      for (int k = 0; k < 5; k++) begin
        count = (k < 4) ? 4'(1 << k) : 4'b0;
        #1;
        checks++;
        if (q !== ((k < 4) ? data[k] : 1'b0)) begin
          failures++;
          $display("FAIL data=%b k=%0d q=%b", data, k, q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

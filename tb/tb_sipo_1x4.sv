// tb_sipo_1x4: drives random 4-bit words through the serial pin, one bit per
// sipo_clk pulse with the matching count select, and checks the parallel
// output after each word and that it holds while no select is active.
module tb_sipo_1x4;
  logic sipo_clk = 1'b0, rst_n = 1'b1, data = 1'b0;
  // Start released and pull RN low at time 1 so the asynchronous reset sees an edge.
  initial #1 rst_n = 1'b0;
  logic [3:0] count = '0, q;
  int checks = 0, failures = 0;

  sipo_1x4 dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse();
    #5 sipo_clk = 1'b1;
    #5 sipo_clk = 1'b0;
  endtask

  initial begin
    #3 rst_n = 1'b1;
    checks++;
    if (q !== 4'b0) failures++;
    for (int w = 0; w < 100; w++) begin
      logic [3:0] word;
      word = 4'($urandom);
      for (int k = 0; k < 4; k++) begin
        count = 4'(1 << k);
        data  = word[k];
        pulse();
      end
      count = '0;
      data  = ~data;
      pulse();
      pulse();
      checks++;
      if (q !== word) begin
        failures++;
        $display("FAIL word %0d: q=%b exp=%b", w, q, word);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

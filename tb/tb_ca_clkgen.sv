// tb_ca_clkgen: runs the clock generator for 40 array cycles and checks,
// against a cycle model of the system clock: ca_clk has a period of eight
// system clocks and is high for four; sipo_clk gives exactly four pulses per
// array cycle, all while ca_clk is high; at the k-th pulse only count[k] is
// high; count is one-hot during counter states 0..3 and zero otherwise.
module tb_ca_clkgen;
  logic clk = 1'b0, rst_n = 1'b1;
  // Start released and pull RN low at time 1 so the asynchronous reset sees an edge.
  initial #1 rst_n = 1'b0;
  logic ca_clk, sipo_clk;
  logic [3:0] count;
  int checks = 0, failures = 0;

  ca_clkgen dut (.*);

  always #5 clk = ~clk;

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
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  int pulses_in_cycle = 0, ca_rises = 0;
  time last_rise = 0;
  int period_bad = 0;

  always @(posedge sipo_clk) if (rst_n) begin
    chk(ca_clk, "sipo_clk pulse while ca_clk high");
    chk(pulses_in_cycle < 4 && count == 4'(1 << pulses_in_cycle),
        $sformatf("pulse %0d selects count %b", pulses_in_cycle, count));
    pulses_in_cycle++;
  end

  always @(posedge ca_clk) if (rst_n) begin
    if (ca_rises > 0) begin
      chk(pulses_in_cycle == 4, $sformatf("%0d sipo pulses per array cycle", pulses_in_cycle));
      chk($time - last_rise == 80, "ca_clk period is 8 system clocks");
    end
    pulses_in_cycle = 0;
    last_rise = $time;
    ca_rises++;
  end

  int high_cnt = 0;
  always @(posedge clk) if (rst_n && ca_rises > 0) begin
    if (ca_clk) high_cnt++;
    chk($countones(count) <= 1, "count one-hot or zero");
  end

  initial begin
    #12 rst_n = 1'b1;
    repeat (321) @(posedge clk);
    chk(ca_rises >= 40, $sformatf("%0d array cycles", ca_rises));
    chk(high_cnt >= 4 * (ca_rises - 1) && high_cnt <= 4 * ca_rises + 4,
        $sformatf("ca_clk high for half the time (%0d of %0d)", high_cnt, 8 * ca_rises));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

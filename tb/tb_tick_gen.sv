// tb_tick_gen - checks the tick period and the flash square wave of tick_gen.
// With CLK_HZ=10, TICK_HZ=1 a tick must come every 10 clocks, one clock wide;
// with FLASH_TICKS=2 flash must toggle on every second tick.
module tb_tick_gen;
  logic clk = 0, rst_n = 0;
  logic tick, flash;
  int checks = 0, failures = 0;

  tick_gen #(.CLK_HZ(10), .TICK_HZ(1), .FLASH_TICKS(2)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, last_tick = -1, ntick = 0;
  logic flash_prev;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    flash_prev = 0;
    while (ntick < 12) begin
      @(posedge clk);
      #1;
      cyc++;
      if (tick) begin
        ntick++;
        if (last_tick >= 0) check(cyc - last_tick == 10, $sformatf("tick period %0d", cyc - last_tick));
        last_tick = cyc;
        @(posedge clk); #1; cyc++;
        check(!tick, "tick is one clock wide");
        // flash toggles with the even ticks
        check(flash == ((ntick / 2) % 2 == 1), $sformatf("flash after tick %0d", ntick));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_barrier_drive - drives a barrier part raised -> 45 deg -> horizontal ->
// raised and a mid-travel reversal. Checks position flags, the number of coil
// pattern changes (one per step), the travel time (steps x STEP_DIV clocks)
// and that the coils are off at rest.
module tb_barrier_drive;
  import lx_pkg::*;
  localparam int DIV = 4, S45 = 6, S90 = 12;
  logic clk = 0, rst_n = 0;
  barrier_pos_e target = POS_RAISED;
  logic [3:0] coil;
  logic moving, at_target, is_raised, is_45, is_horizontal;
  int checks = 0, failures = 0;
  int changes = 0;
  logic [3:0] last_coil;

  barrier_drive #(.STEP_DIV(DIV), .STEPS_45(S45), .STEPS_90(S90)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (coil != last_coil && coil != 0 && last_coil != 0) changes++;
    last_coil <= coil;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic move(barrier_pos_e to, int steps, string name);
    int n = 0;
    changes = 0;
    @(negedge clk) target = to;
    #1;
    while (!at_target && n < 1000) begin @(posedge clk); #1; n++; end
    check(n == steps * DIV, $sformatf("%s travel %0d clocks, want %0d", name, n, steps * DIV));
    repeat (4) @(posedge clk);
    #1;
    check(changes == steps, $sformatf("%s coil changes %0d, want %0d", name, changes, steps));
    check(coil == 4'b0000, $sformatf("%s coils off at rest", name));
  endtask

  initial begin
    last_coil = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(is_raised && at_target && !moving, "home at reset");
    move(POS_LOWERED45, S45, "raised->45");
    check(is_45 && !is_raised && !is_horizontal, "at 45");
    move(POS_HORIZONTAL, S90 - S45, "45->horizontal");
    check(is_horizontal, "horizontal");
    move(POS_RAISED, S90, "horizontal->raised");
    check(is_raised, "raised again");
    // reversal mid-travel: go down about 3 steps, then back up. Every step
    // down must be undone by one step up, so the coil changes are even.
    repeat (4) @(posedge clk);
    changes = 0;
    @(negedge clk) target = POS_HORIZONTAL;
    repeat (3 * DIV) @(posedge clk);
    #1;
    check(moving && !is_raised, "travelling down");
    @(negedge clk) target = POS_RAISED;
    repeat (10 * DIV) @(posedge clk);
    #1;
    check(is_raised && at_target, "back home after reversal");
    check(changes % 2 == 0 && changes >= 4, $sformatf("reversal coil changes %0d, want even", changes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_crossing_ctrl_2train - runs the two-train crossing controller against a
// gate that reports `down`/`up` a set time after close/open. Paths: train 1
// alone; train 2 alone with the gate slower than the alarm limit (Alarm2);
// both trains entering together (EnteringBoth, both greens); train 2 arriving
// while train 1 is inside (InsideBoth) and leaving in either order; an
// approach heard while Leaving is held and taken once the gate is up. Checks
// every command pulse against the expected sequence.
module tb_crossing_ctrl_2train;
  localparam int TA = 6, TICK = 3;
  logic clk = 0, rst_n = 0, tick = 0;
  logic approach1 = 0, approach2 = 0, leave1 = 0, leave2 = 0, gate_down = 0, gate_up = 0;
  logic close, open, green1, green2, red1, red2, sound, alarm;
  logic [3:0] state_o;
  int checks = 0, failures = 0;
  int n_close = 0, n_open = 0, n_g1 = 0, n_g2 = 0, n_r1 = 0, n_r2 = 0, n_sound = 0;

  crossing_ctrl_2train #(.T_ALARM(TA)) dut (.*);

  always #5 clk = ~clk;
  int tc = 0;
  always @(posedge clk) begin
    tc   <= (tc == TICK - 1) ? 0 : tc + 1;
    tick <= (tc == TICK - 1);
    if (rst_n) begin
      n_close += close; n_open += open; n_g1 += green1; n_g2 += green2;
      n_r1 += red1; n_r2 += red2; n_sound += sound;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ev(ref logic sig);
    @(negedge clk) sig = 1;
    @(negedge clk) sig = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic counts(int c, int o, int g1, int g2, int r1, int r2, int snd, string what);
    check(n_close == c && n_open == o && n_g1 == g1 && n_g2 == g2 && n_r1 == r1 && n_r2 == r2 && n_sound == snd,
          $sformatf("%s: close %0d open %0d g1 %0d g2 %0d r1 %0d r2 %0d sound %0d", what,
                    n_close, n_open, n_g1, n_g2, n_r1, n_r2, n_sound));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    // train 1 alone
    ev(approach1);
    counts(1, 0, 0, 0, 0, 0, 0, "train 1 approaches: close");
    repeat (2 * TICK) @(negedge clk);
    ev(gate_down);
    counts(1, 0, 1, 0, 0, 0, 0, "gate down: green1");
    ev(leave1);
    counts(1, 1, 1, 0, 1, 0, 0, "train 1 leaves: red1 and open");
    ev(approach1);                              // held while Leaving
    counts(1, 1, 1, 0, 1, 0, 0, "no reaction to an approach while leaving");
    ev(gate_up);
    check(state_o == 4'd1, "held approach taken once the gate is up");
    counts(2, 1, 1, 0, 1, 0, 0, "held approach closes the gate");
    ev(gate_down);
    ev(leave1);
    ev(gate_up);
    check(state_o == 4'd0, "Outside again");

    // train 2 alone, gate slow: alarm after T_ALARM
    ev(approach2);
    counts(3, 2, 2, 0, 2, 0, 0, "train 2 approaches");
    repeat ((TA + 2) * TICK) @(negedge clk);
    check(alarm, "alarm after the limit");
    counts(3, 2, 2, 0, 2, 0, 1, "sound once");
    ev(gate_down);
    check(!alarm, "alarm over when gate is down");
    counts(3, 2, 2, 1, 2, 0, 1, "green2 from Alarm2");
    ev(leave2);
    ev(gate_up);
    counts(3, 3, 2, 1, 2, 1, 1, "train 2 passed");

    // both trains while entering
    ev(approach1);
    ev(approach2);
    check(state_o == 4'd3, "EnteringBoth");
    ev(gate_down);
    counts(4, 3, 3, 2, 2, 1, 1, "both greens");
    check(state_o == 4'd9, "InsideBoth");
    ev(leave2);
    check(state_o == 4'd7, "Inside1 after train 2 leaves");
    counts(4, 3, 3, 2, 2, 1, 1, "gate stays closed while train 1 inside");
    ev(leave1);
    counts(4, 4, 3, 2, 3, 1, 1, "last train out: open");
    ev(gate_up);

    // train 2 arrives while train 1 inside, train 1 leaves first
    ev(approach1);
    ev(gate_down);
    ev(approach2);
    check(state_o == 4'd9, "InsideBoth from Inside1");
    ev(leave1);
    check(state_o == 4'd8, "Inside2");
    counts(5, 4, 4, 2, 3, 1, 1, "no opening while train 2 inside");
    ev(leave2);
    counts(5, 5, 4, 2, 3, 2, 1, "opened after train 2");
    ev(gate_up);
    check(state_o == 4'd0, "Outside at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

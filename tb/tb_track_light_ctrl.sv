// tb_track_light_ctrl - sensor-zone scenarios for one track: start-up in the
// undefined state until operator reset; a short train left-to-right; a long
// train right-to-left covering all three sensors; an unexpected M signal; a
// train that enters and is lost (timeout); and the lights-off rule when the
// controller is disabled. Checks lights, enter/leave pulses and direction.
module tb_track_light_ctrl;
  import lx_pkg::*;
  localparam int TA = 20, TC = 20, TICK = 4;
  logic clk = 0, rst_n = 0, tick = 0, flash = 0, enable = 1, op_reset = 0;
  logic sen_l = 0, sen_m = 0, sen_r = 0;
  logic red, yellow, enter, leave, on_m, error;
  dir_e dir;
  logic [2:0] state_o;
  int checks = 0, failures = 0;
  int n_enter = 0, n_leave = 0;
  dir_e last_enter_dir, last_leave_dir;

  track_light_ctrl #(.T_APPROACH(TA), .T_CROSS(TC)) dut (.*);

  always #5 clk = ~clk;
  int tc = 0;
  always @(posedge clk) begin
    tc   <= (tc == TICK - 1) ? 0 : tc + 1;
    tick <= (tc == TICK - 1);
    if (tick) flash <= ~flash;
    if (rst_n && enter) begin n_enter++; last_enter_dir = dir; end
    if (rst_n && leave) begin n_leave++; last_leave_dir = dir; end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic settle(int n = 3);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // yellow flashing: over 3 ticks yellow must be seen both on and off, red off
  task automatic expect_yellow_flashing(string what);
    bit seen1 = 0, seen0 = 0, red_seen = 0;
    repeat (3 * TICK) begin
      @(posedge clk); #1;
      if (yellow) seen1 = 1; else seen0 = 1;
      if (red) red_seen = 1;
    end
    check(seen1 && seen0 && !red_seen, $sformatf("yellow flashing: %s", what));
  endtask

  task automatic op_rst();
    @(negedge clk) op_reset = 1;
    @(negedge clk) op_reset = 0;
    settle();
  endtask

  int n_unexp = 0, n_missing = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    settle();
    check(red && yellow && error, "start-up: red and yellow on");
    op_rst();
    expect_yellow_flashing("no train");

    // short train left to right: L, then M, then R
    sen_l = 1; settle(); sen_l = 0; settle();
    check(n_enter == 1 && last_enter_dir == DIR_LR, "enter from the left");
    check(red && !yellow, "red while approaching");
    sen_m = 1; settle();
    check(red && on_m, "red while on the road");
    sen_m = 0; settle();
    expect_yellow_flashing("leaving towards R");
    sen_r = 1; settle();
    check(n_leave == 0, "not yet left while on R");
    sen_r = 0; settle();
    check(n_leave == 1 && last_leave_dir == DIR_LR, "left to the right");
    expect_yellow_flashing("zone empty again");

    // long train right to left covering R, M and L at once
    sen_r = 1; settle();
    check(n_enter == 2 && last_enter_dir == DIR_RL, "enter from the right");
    sen_m = 1; settle();
    sen_l = 1; settle();
    check(red, "red while covering all sensors");
    sen_r = 0; settle();
    sen_m = 0; settle();
    check(!red, "leaving once M is clear");
    sen_l = 0; settle();
    check(n_leave == 2 && last_leave_dir == DIR_RL, "left to the left");

    // unexpected: M with no train announced
    sen_m = 1; settle(); sen_m = 0; settle();
    check(red && yellow && error, "unexpected M signal: red and yellow");
    n_unexp++;
    settle(4 * TICK * TA);
    check(red && yellow, "unexpected state held until reset");
    op_rst();
    check(!error, "operator reset clears");

    // lost train: enters at L, never reaches M
    sen_l = 1; settle(); sen_l = 0;
    settle(TICK * (TA + 2));
    check(red && yellow && error, "missing train after timeout");
    n_missing++;
    op_rst();

    // far sensor before the road sensor: unexpected
    sen_l = 1; settle(); sen_l = 0; settle();
    sen_r = 1; settle(); sen_r = 0; settle();
    check(error, "far sensor first is unexpected");
    n_unexp++;
    op_rst();

    // disabled controller: both lights off
    enable = 0; settle();
    check(!red && !yellow, "lights off when disabled");
    sen_l = 1; settle();
    check(!red && !yellow, "lights off when disabled, train present");
    enable = 1; settle();
    check(red, "red again when enabled");

    check(n_unexp >= 2 && n_missing >= 1, "error paths exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

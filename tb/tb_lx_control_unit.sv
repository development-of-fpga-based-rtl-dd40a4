// tb_lx_control_unit - scenario test of the LX control unit.
//
// The testbench plays the approach buffer (a pending-train count), the four
// barrier parts (each reaches horizontal BAR clocks after being commanded
// there) and the road sensors. It runs: a normal single train with the
// durations of the warning phases measured in ticks; a vehicle briefly under
// an arriving barrier; a second train while the first is inside; a TIME-OUT
// that is restarted by a new request and then ends in a faulty situation; a
// TIME-OUT with a train blocking the road (DISASTER); an arriving barrier that
// stays blocked beyond t4 and a leaving side that stays occupied beyond t5
// (both DISASTER); a train that leaves during the obstacle check, so the
// road reopens without a TIME-OUT (this design's choice). Expected values
// come from the crossing's rules, not from the RTL. A monitor checks on
// every clock that the rail signal never shows go unless all four parts are
// horizontal.
module tb_lx_control_unit;
  import lx_pkg::*;
  localparam int T1 = 2, T2 = 3, T3 = 2, T4 = 8, T5 = 8, T6 = 2, TO = 6;
  localparam int TICK = 4, BAR = 10;

  logic clk = 0, rst_n = 0, tick = 0, flash = 0;
  logic buf_all_zero, request_in = 0, train_passed = 0, buf_flush;
  logic [1:0] veh_under_arr = 0, veh_on_road = 0;
  logic train_blocking = 0, dmf_clear = 0;
  barrier_pos_e arr_target [2];
  barrier_pos_e lv_target  [2];
  logic [1:0] arr_horizontal, lv_horizontal;
  road_aspect_t road_aspect;
  rail_aspect_t rail_aspect;
  logic road_green, road_yellow, road_red, rail_green, rail_red;
  logic alarm, disaster, fault;
  lcd_msg_e lcd_msg;
  lx_state_e state;

  int checks = 0, failures = 0;
  int pending = 0;
  int arr_cnt [2], lv_cnt [2];

  lx_control_unit #(.T1(T1), .T2(T2), .T3(T3), .T4(T4), .T5(T5), .T6(T6), .TIMEOUT(TO)) dut (.*);

  always #5 clk = ~clk;

  // tick every TICK clocks
  int tc = 0;
  always @(posedge clk) begin
    tc   <= (tc == TICK - 1) ? 0 : tc + 1;
    tick <= (tc == TICK - 1);
  end

  // behavioural approach buffer
  assign buf_all_zero = (pending == 0);
  always @(posedge clk) if (buf_flush) pending <= 0;

  // behavioural barrier parts: horizontal BAR clocks after being commanded so
  always @(posedge clk) begin
    for (int s = 0; s < 2; s++) begin
      arr_cnt[s] <= (arr_target[s] == POS_HORIZONTAL) ? (arr_cnt[s] < BAR ? arr_cnt[s] + 1 : BAR) : 0;
      lv_cnt[s]  <= (lv_target[s]  == POS_HORIZONTAL) ? (lv_cnt[s]  < BAR ? lv_cnt[s]  + 1 : BAR) : 0;
    end
  end
  always_comb for (int s = 0; s < 2; s++) begin
    arr_horizontal[s] = (arr_cnt[s] == BAR);
    lv_horizontal[s]  = (lv_cnt[s]  == BAR);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // safety monitor
  always @(posedge clk) if (rst_n && rail_aspect.green != ASP_OFF)
    if (!(&arr_horizontal && &lv_horizontal)) begin
      failures++;
      $display("FAIL @%0t: rail go with a barrier part not horizontal", $time);
    end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // wait until the state becomes s; returns the number of ticks spent waiting
  task automatic wait_state(lx_state_e s, output int ticks);
    int n = 0;
    ticks = 0;
    while (state != s && n < 3000) begin
      @(posedge clk); #1;
      if (tick) ticks++;
      n++;
    end
    check(state == s, $sformatf("reached state %s", s.name()));
  endtask

  task automatic new_train();
    @(negedge clk);
    request_in = 1;
    pending++;
    @(negedge clk);
    request_in = 0;
  endtask

  task automatic train_leaves();
    @(negedge clk);
    train_passed = 1;
    pending--;
    @(negedge clk);
    train_passed = 0;
  endtask

  task automatic expect_road(aspect_e g, aspect_e y, aspect_e r, string what);
    check(road_aspect.green == g && road_aspect.yellow == y && road_aspect.red == r,
          $sformatf("road aspect %s", what));
  endtask

  // from a request up to the rail signal showing go, all sensors clear
  task automatic close_crossing(bit measure);
    int t;
    wait_state(LX_WARN_GREEN, t);
    check(lcd_msg == MSG_TRAIN_ARRIVING, "message: train arriving");
    expect_road(ASP_FLASH, ASP_OFF, ASP_OFF, "green during t1");
    check(alarm, "alarm on during warning");
    wait_state(LX_WARN_YELLOW, t);
    if (measure) check(t == T1, $sformatf("t1 = %0d ticks", t));
    expect_road(ASP_OFF, ASP_FLASH, ASP_OFF, "yellow during t2");
    wait_state(LX_WARN_RED, t);
    if (measure) check(t == T2, $sformatf("t2 = %0d ticks", t));
    expect_road(ASP_OFF, ASP_OFF, ASP_FLASH, "red during t3");
    check(arr_target[0] == POS_RAISED && lv_target[1] == POS_RAISED, "barriers still raised during t3");
    wait_state(LX_CHK_OBST, t);
    if (measure) check(t == T3, $sformatf("t3 = %0d ticks", t));
    wait_state(LX_CHK_DEPART, t);
    check(!alarm, "alarm off once barriers are down");
    check(rail_aspect.red == ASP_FLASH && rail_aspect.green == ASP_OFF, "rail stop during t6");
    t = 0;
    while (rail_aspect.green == ASP_OFF && t < 1000) begin @(posedge clk); #1; t++; end
    if (measure) check(t >= (T6 - 1) * TICK && t <= T6 * TICK + 1, $sformatf("t6 = %0d clocks", t));
    check(rail_aspect.green == ASP_FLASH && rail_green == flash, "rail flashing green");
    check(lcd_msg == MSG_TRAIN_INSIDE, "message: train inside");
  endtask

  task automatic expect_released();
    int t;
    wait_state(LX_WAIT_IRQ, t);
    @(posedge clk); #1;
    check(arr_target[0] == POS_RAISED && arr_target[1] == POS_RAISED &&
          lv_target[0] == POS_RAISED && lv_target[1] == POS_RAISED, "barriers raised");
    expect_road(ASP_FLASH, ASP_OFF, ASP_OFF, "road green after release");
    check(rail_aspect.red == ASP_FLASH && rail_aspect.green == ASP_OFF, "rail red after release");
  endtask

  int n_gone = 0, n_obstacle = 0, n_second = 0, n_fault = 0, n_disaster = 0, n_restart = 0;

  initial begin
    int t;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    #1;
    // ---- initial setting ----
    check(state == LX_WAIT_IRQ, "initial setting -> waiting for interrupt");
    expect_road(ASP_FLASH, ASP_OFF, ASP_OFF, "initial road flashing green");
    check(rail_aspect.red == ASP_FLASH, "initial rail flashing red");
    check(arr_target[0] == POS_RAISED && lv_target[0] == POS_RAISED, "initial barriers raised");
    check(!alarm && lcd_msg == MSG_NO_TRAIN, "initial alarm off, no train");

    // ---- 1: one train, nothing on the road ----
    new_train();
    close_crossing(1);
    train_leaves();
    expect_released();
    check(lcd_msg == MSG_PASSED_OK, "message: passed");

    // ---- 2: vehicle under arriving part A for a while ----
    veh_under_arr = 2'b01;
    new_train();
    wait_state(LX_CHK_OBST, t);
    repeat (3 * TICK) @(posedge clk);
    #1;
    check(state == LX_CHK_OBST, "held in obstacle check");
    check(arr_target[0] == POS_LOWERED45, "blocked part stays at 45 deg");
    check(arr_target[1] == POS_HORIZONTAL, "free part goes horizontal");
    check(lv_target[0] == POS_LOWERED45, "leaving parts at 45 deg meanwhile");
    check(lcd_msg == MSG_OBSTACLE, "message: obstacle");
    n_obstacle++;
    veh_under_arr = 2'b00;
    wait_state(LX_CHK_DEPART, t);

    // ---- 3: second train while the first is inside ----
    new_train();
    train_leaves();
    wait_state(LX_CHK_OBST, t);
    check(lcd_msg == MSG_SECOND_TRAIN, "message: second train");
    check(arr_target[0] == POS_HORIZONTAL && lv_target[1] == POS_HORIZONTAL, "barriers stay horizontal");
    n_second++;
    wait_state(LX_CHK_DEPART, t);
    train_leaves();
    expect_released();

    // ---- 4: TIME-OUT restarted by a new request, then a fault ----
    new_train();
    close_crossing(0);
    repeat ((TO - 2) * TICK) @(posedge clk);
    new_train();                                  // restarts TIME-OUT
    n_restart++;
    t = 0;
    while (state == LX_CHK_DEPART && t < 5000) begin @(posedge clk); #1; t++; end
    check(t >= (TO - 1) * TICK, $sformatf("TIME-OUT restarted (%0d clocks after restart)", t));
    check(state == LX_CHK_FAULT && fault, "faulty situation");
    check(buf_flush, "unsuccessful requests destroyed");
    n_fault++;
    expect_released();
    check(lcd_msg == MSG_NO_FAULT_PASSED, "message: no fault");
    check(pending == 0, "buffer emptied");

    // ---- 5: TIME-OUT with the train blocking the road ----
    new_train();
    close_crossing(0);
    train_blocking = 1;
    wait_state(LX_INFORM_DMF, t);
    check(disaster && alarm && lcd_msg == MSG_DISASTER, "disaster reported");
    check(arr_target[0] == POS_HORIZONTAL, "barriers held down in disaster");
    repeat (5 * TICK) @(posedge clk);
    #1;
    check(state == LX_INFORM_DMF, "disaster holds until cleared");
    n_disaster++;
    train_blocking = 0;
    @(negedge clk) dmf_clear = 1;
    @(negedge clk) dmf_clear = 0;
    expect_released();
    check(pending == 0, "requests cleared after disaster");

    // ---- 6: arriving part blocked beyond t4 ----
    veh_under_arr = 2'b10;
    new_train();
    wait_state(LX_CHK_OBST, t);
    wait_state(LX_INFORM_DMF, t);
    check(t == T4, $sformatf("t4 window = %0d ticks", t));
    check(lcd_msg == MSG_NOT_LOWERED, "message: barrier not lowered");
    n_disaster++;
    veh_under_arr = 0;
    @(negedge clk) dmf_clear = 1;
    @(negedge clk) dmf_clear = 0;
    expect_released();

    // ---- 7: road side B occupied beyond t5 ----
    veh_on_road = 2'b10;
    new_train();
    wait_state(LX_CHK_LOWER, t);
    repeat (2) @(posedge clk);
    #1;
    check(lv_target[0] == POS_HORIZONTAL && lv_target[1] == POS_LOWERED45, "only the clear side's leaving part lowers");
    wait_state(LX_INFORM_DMF, t);
    check(t == T5, $sformatf("t5 window = %0d ticks", t));
    n_disaster++;
    veh_on_road = 0;
    @(negedge clk) dmf_clear = 1;
    @(negedge clk) dmf_clear = 0;
    expect_released();

    // ---- 8: train gone before departure checking starts ----
    veh_under_arr = 2'b01;
    new_train();
    wait_state(LX_CHK_OBST, t);
    train_leaves();                               // buffer now empty
    veh_under_arr = 0;
    wait_state(LX_CHK_DEPART, t);
    t = 0;
    while (state != LX_WAIT_IRQ && t < 5000) begin
      @(posedge clk); #1;
      check(!fault, "no fault for a train already gone");
      t++;
    end
    check(t < TO * TICK, $sformatf("reopened without waiting for TIME-OUT (%0d clocks)", t));
    expect_released();
    check(lcd_msg == MSG_PASSED_OK, "message: passed");
    n_gone++;

    check(n_obstacle > 0 && n_second > 0 && n_fault > 0 && n_disaster >= 3 && n_restart > 0 && n_gone > 0,
          "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

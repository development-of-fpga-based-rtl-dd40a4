// tb_two_train_properties - checks the reachability, safety and liveness
// properties stated for the two-train crossing model, by random simulation of
// the controller (crossing_ctrl_2train) and gate (gate_fsm) with their model
// timings (alarm after 30 s, 20 s gate travel; one tick = one second = 4
// clocks here) and two behavioural trains.
//
// Train model (test only): Faraway for a random time, then approach; it
// enters the crossing on its green, or, if no green has come 30 s after the
// approach, as soon as the gate is closed; it stays on the crossing for more
// than 20 and at most 40 s, then leaves. As in the model's handshake, a train
// does not announce itself while the controller is in Leaving.
//
// Properties checked on every clock or counted over the run:
//   reachable: train 1 on the crossing, train 2 on the crossing, both at once
//   safety:    a train on the crossing implies the gate is Closed;
//              the gate Open implies no train on the crossing
//   liveness:  every approach is followed by the train on the crossing
//              (within 200 s) and by its leaving
module tb_two_train_properties;
  localparam int TICK = 4;
  localparam int N_TRIPS = 120;          // trips per train

  logic clk = 0, rst_n = 0, tick = 0;
  logic [1:0] approach = 0, leave = 0;
  logic close, open, green1, green2, red1, red2, sound, alarm;
  logic lowered, raised;
  logic [3:0] cstate;
  logic [1:0] gstate;

  crossing_ctrl_2train u_ctl (
    .clk, .rst_n, .tick, .approach1(approach[0]), .approach2(approach[1]),
    .leave1(leave[0]), .leave2(leave[1]), .gate_down(lowered), .gate_up(raised),
    .close, .open, .green1, .green2, .red1, .red2, .sound, .alarm, .state_o(cstate));
  gate_fsm u_gate (
    .clk, .rst_n, .tick, .close_req(close), .open_req(open),
    .lowered, .raised, .state_o(gstate));

  always #5 clk = ~clk;
  int tc = 0;
  always @(posedge clk) begin
    tc   <= (tc == TICK - 1) ? 0 : tc + 1;
    tick <= (tc == TICK - 1);
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin : watchdog
    repeat (N_TRIPS * 400 * TICK) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- trains ----------------
  logic [1:0] on_cross = 0, got_green = 0;
  int trips [2] = '{0, 0};
  int sound_seen = 0;
  always @(posedge clk) begin
    if (green1) got_green[0] <= 1'b1;
    if (green2) got_green[1] <= 1'b1;
    if (sound) sound_seen++;
  end

  task automatic wait_ticks(int n);
    repeat (n) @(posedge clk iff tick);
  endtask

  task automatic train(int k);
    for (int trip = 0; trip < N_TRIPS; trip++) begin
      int waited;
      wait_ticks($urandom_range(0, 60));
      // the controller takes an approach only outside Leaving
      while (cstate inside {4'd10, 4'd11}) @(negedge clk);
      @(negedge clk);
      got_green[k] = 1'b0;
      approach[k] = 1'b1;
      @(negedge clk) approach[k] = 1'b0;
      waited = 0;
      while (!got_green[k] && !(waited >= 30 && gstate == 2'd2) && waited < 200) begin
        @(posedge clk iff tick);
        waited++;
        @(negedge clk);
      end
      check(waited < 200, $sformatf("liveness: train %0d on the crossing after its approach", k + 1));
      on_cross[k] = 1'b1;
      wait_ticks($urandom_range(21, 40));
      @(negedge clk);
      on_cross[k] = 1'b0;
      leave[k] = 1'b1;
      @(negedge clk) leave[k] = 1'b0;
      trips[k]++;
    end
  endtask

  // ---------------- properties ----------------
  int bad_closed = 0, bad_open = 0, seen1 = 0, seen2 = 0, seen_both = 0;
  always @(posedge clk) if (rst_n) begin
    if ((on_cross[0] || on_cross[1]) && gstate != 2'd2) bad_closed++;
    if (gstate == 2'd0 && (on_cross[0] || on_cross[1])) bad_open++;
    if (on_cross[0]) seen1++;
    if (on_cross[1]) seen2++;
    if (&on_cross) seen_both++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      train(0);
      train(1);
    join
    wait_ticks(50);
    check(bad_closed == 0, $sformatf("safety: train on crossing with gate not Closed, %0d clocks", bad_closed));
    check(bad_open == 0, $sformatf("safety: gate Open with a train on the crossing, %0d clocks", bad_open));
    check(seen1 > 0, "reachable: train 1 on crossing");
    check(seen2 > 0, "reachable: train 2 on crossing");
    check(seen_both > 0, "reachable: both trains on the crossing at once");
    check(trips[0] == N_TRIPS && trips[1] == N_TRIPS, "liveness: every trip completed");
    check(cstate == 4'd0 && gstate == 2'd0, "idle at the end: Outside, gate Open");
    $display("trips %0d/%0d, both-on-crossing clocks %0d, alarms %0d", trips[0], trips[1], seen_both, sound_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_lx_soc_top - end-to-end test of the level-crossing top level, run with a
// slow clock (CLK_HZ=200, so one second is 200 clocks) and a short sensor
// debounce; all times inside the design keep their default values in seconds.
//
// Trains are simulated by pulling the active-low IR lines low in the order a
// train passes them. The run walks through:
//   1 normal passage on track 0 left-to-right (green, yellow, red warning,
//     barriers lowered, rail signal go, train passes, crossing reopened)
//   2 a vehicle under an arriving barrier and on the road (lowering stalls)
//   3 two trains, second on track 1 right-to-left (second-train loop)
//   4 a driver plunger request with no train (TIME-OUT, fault, flush)
//   5 a train stopped on the road sensor (TIME-OUT, disaster, DMF clear)
//   6 unexpected train at a road sensor and a train lost after entering
//   7 the two-train controller with both trains and its gate model
//   8 the RF gate sequencer with its own stepper gate
//   9 an AXI-Lite write to the LED register
// Each mechanism increments its own counter when it is seen to happen; any
// counter still zero at the end is a failure. A monitor checks throughout that
// the rail signal never shows go outside the departure state (entered only with
// all four barrier parts horizontal) and never together with road green. Only
// top-level ports are observed.
module tb_lx_soc_top;
  import lx_pkg::*;
  localparam int CLK_HZ = 200;
  localparam int SEC = CLK_HZ;

  logic clk = 0, rst_n = 0;
  logic [1:0] ir_l_n = '1, ir_m_n = '1, ir_r_n = '1, ir_under_gate_n = '1, ir_on_road_n = '1;
  logic [1:0][1:0] plunger = '0;
  logic dmf_clear = 0, op_reset = 0, lights_enable = 1;
  logic road_green, road_yellow, road_red, rail_green, rail_red, alarm, disaster, fault;
  logic [3:0] lcd_msg, lx_state;
  logic [1:0][3:0] arr_coil, lv_coil;
  logic [1:0] track_red, track_yellow, track_error;
  logic x_approach1 = 0, x_approach2 = 0, x_leave1 = 0, x_leave2 = 0;
  logic x_green1, x_green2, x_red1, x_red2, x_alarm;
  logic [1:0] x_gate_state;
  logic [3:0] x_state;
  logic gs_rf_vt = 0, gs_ir_depart_n = 1;
  logic [3:0] gs_rf_data = 0;
  logic [3:0] gs_coil;
  logic gs_red, gs_green, gs_buzzer;
  logic s_axi_aresetn = 0;
  logic [3:0] s_axi_awaddr = 0, s_axi_araddr = 0, s_axi_wstrb = 0;
  logic [2:0] s_axi_awprot = 0, s_axi_arprot = 0;
  logic s_axi_awvalid = 0, s_axi_wvalid = 0, s_axi_bready = 0, s_axi_arvalid = 0, s_axi_rready = 0;
  logic [31:0] s_axi_wdata = 0;
  logic s_axi_awready, s_axi_wready, s_axi_bvalid, s_axi_arready, s_axi_rvalid;
  logic [1:0] s_axi_bresp, s_axi_rresp;
  logic [31:0] s_axi_rdata;
  logic [3:0] led;

  lx_soc_top #(.CLK_HZ(CLK_HZ), .DEBOUNCE(2), .STEP_HZ(10)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---------------- mechanism counters ----------------
  int m_warn = 0, m_lowered = 0, m_rail_go = 0, m_passed = 0, m_obst = 0, m_road_stall = 0;
  int m_second = 0, m_plunger = 0, m_fault = 0, m_disaster = 0, m_dmf = 0;
  int m_unexpected = 0, m_missing = 0, m_x_single = 0, m_x_both = 0, m_gs = 0, m_led = 0;

  // ---------------- safety monitor ----------------
  int unsafe = 0;
  always @(posedge clk) if (rst_n) begin
    if (rail_green && lx_state != 4'(LX_CHK_DEPART)) unsafe++;   // entered only with all parts down
    if (rail_green && road_green) unsafe++;
  end

  // Lamps flash (one second on, one off), so a signal counts as showing an
  // aspect while its lamp has been lit within the last flash period.
  int rg_age = 1 << 30, ag_age = 1 << 30;
  always @(posedge clk) begin
    rg_age <= road_green ? 0 : rg_age + 1;
    ag_age <= rail_green ? 0 : ag_age + 1;
  end
  function automatic bit road_go();
    return rg_age <= 2 * SEC + 2;
  endfunction
  function automatic bit rail_go();
    return ag_age <= 2 * SEC + 2;
  endfunction

  // warning order: green -> yellow -> red seen through the state output
  logic [3:0] prev_state = 0;
  int warn_step = 0;
  always @(posedge clk) if (rst_n) begin
    prev_state <= lx_state;
    if (lx_state != prev_state) begin
      if (prev_state == 4'(LX_CHK_BUFFER) && lx_state == 4'(LX_CHK_OBST)) m_second++;
      if (lx_state == 4'(LX_WARN_GREEN)  && road_go())  warn_step = 1;
      if (lx_state == 4'(LX_WARN_YELLOW) && warn_step == 1) warn_step = 2;
      if (lx_state == 4'(LX_WARN_RED)    && warn_step == 2) warn_step = 3;
      if (lx_state == 4'(LX_CHK_OBST)    && warn_step == 3) begin
        if (!road_go() && alarm) m_warn++;
        warn_step = 0;
      end
      if (lx_state == 4'(LX_CHK_DEPART)) m_lowered++;
    end
  end
  always @(posedge rail_green) if (rst_n) m_rail_go++;

  initial begin : watchdog
    #(5000 * SEC * 10);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- helpers ----------------
  task automatic secs(int n);
    repeat (n * SEC) @(negedge clk);
  endtask

  task automatic wait_state(lx_state_e s, int max_s, string what);
    int n = 0;
    while (lx_state != 4'(s) && n < max_s * SEC) begin @(negedge clk); n++; end
    check(lx_state == 4'(s), $sformatf("%s: state %0d, want %s", what, lx_state, s.name()));
  endtask

  // one train passes the three zone sensors of a track
  task automatic beam(int t, int which, int hold_clk);
    case (which)
      0: ir_l_n[t] = 0;
      1: ir_m_n[t] = 0;
      default: ir_r_n[t] = 0;
    endcase
    repeat (hold_clk) @(negedge clk);
    ir_l_n[t] = 1; ir_m_n[t] = 1; ir_r_n[t] = 1;
    repeat (20) @(negedge clk);
  endtask

  task automatic enter(int t, bit rl);
    beam(t, rl ? 2 : 0, 20);
  endtask
  task automatic pass_and_leave(int t, bit rl);
    beam(t, 1, 40);
    beam(t, rl ? 0 : 2, 20);
  endtask

  task automatic axi_write(logic [3:0] addr, logic [31:0] d);
    @(negedge clk);
    s_axi_awaddr = addr; s_axi_wdata = d; s_axi_wstrb = 4'hF;
    s_axi_awvalid = 1; s_axi_wvalid = 1; s_axi_bready = 1;
    do @(posedge clk); while (!(s_axi_awready && s_axi_wready));
    @(negedge clk) begin s_axi_awvalid = 0; s_axi_wvalid = 0; end
    while (!s_axi_bvalid) @(negedge clk);
    @(negedge clk) s_axi_bready = 0;
  endtask

  // ---------------- stimulus ----------------
  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1; s_axi_aresetn = 1;
    // track zones start in Start and need the operator's reset
    @(negedge clk) op_reset = 1;
    @(negedge clk) op_reset = 0;
    repeat (10) @(negedge clk);
    check(track_error == 2'b00, "zones idle after operator reset");
    wait_state(LX_WAIT_IRQ, 2, "idle");
    secs(3);
    check(road_go() && !rail_go() && !alarm, "road open, rail stop when idle");

    // 1 normal passage
    enter(0, 0);
    wait_state(LX_WARN_GREEN, 1, "train announced");
    check(lcd_msg == 4'(MSG_TRAIN_ARRIVING), "LCD: train arriving");
    check(track_red[0], "track 0 crossing light red while approaching");
    wait_state(LX_CHK_DEPART, 60, "barriers down, train may go");
    secs(5);
    check(rail_go(), "rail signal go");
    pass_and_leave(0, 0);
    wait_state(LX_WAIT_IRQ, 2, "crossing released");
    if (lcd_msg == 4'(MSG_PASSED_OK)) m_passed++;
    secs(12);
    check(road_go() && !rail_go() && arr_coil == '0 && lv_coil == '0,
          $sformatf("barriers raised, coils off (%h %h)", arr_coil, lv_coil));

    // 2 vehicle under arriving barrier A, vehicle on road side B
    ir_under_gate_n[0] = 0;
    ir_on_road_n[1] = 0;
    enter(0, 0);
    wait_state(LX_CHK_OBST, 30, "obstacle check");
    secs(5);
    if (lx_state == 4'(LX_CHK_OBST) && lcd_msg == 4'(MSG_OBSTACLE)) m_obst++;
    ir_under_gate_n[0] = 1;
    wait_state(LX_CHK_LOWER, 15, "arriving parts down after vehicle left");
    secs(12);
    if (lx_state == 4'(LX_CHK_LOWER)) m_road_stall++;
    ir_on_road_n[1] = 1;
    wait_state(LX_CHK_DEPART, 15, "leaving parts down after road cleared");
    pass_and_leave(0, 0);
    wait_state(LX_WAIT_IRQ, 2, "released after obstacle case");
    secs(12);

    // 3 two trains: track 0 L->R, then track 1 R->L before the first has left
    enter(0, 0);
    wait_state(LX_CHK_DEPART, 60, "first of two trains");
    enter(1, 1);
    pass_and_leave(0, 0);
    wait_state(LX_CHK_DEPART, 2, "second train loop");
    check(!road_go(), "road stays closed for the second train");
    wait_state(LX_CHK_DEPART, 30, "second train may go");
    pass_and_leave(1, 1);
    wait_state(LX_WAIT_IRQ, 2, "released after two trains");
    secs(12);

    // 4 plunger request, no train follows: TIME-OUT and fault
    @(negedge clk) plunger[1][0] = 1;
    repeat (10) @(negedge clk);
    plunger[1][0] = 0;
    wait_state(LX_WARN_GREEN, 1, "plunger request");
    if (lx_state == 4'(LX_WARN_GREEN)) m_plunger++;
    wait_state(LX_CHK_DEPART, 60, "plunger: go");
    wait_state(LX_CHK_FAULT, 25, "TIME-OUT");
    if (fault) m_fault++;
    wait_state(LX_WAIT_IRQ, 2, "flushed after fault");
    check(lcd_msg == 4'(MSG_NO_FAULT_PASSED), "LCD: no fault");
    secs(12);

    // 5 train stops on the road: disaster
    enter(1, 0);
    wait_state(LX_CHK_DEPART, 60, "stopping train: go");
    ir_m_n[1] = 0;                       // held on the road sensor
    wait_state(LX_INFORM_DMF, 30, "disaster reported");
    if (disaster && lcd_msg == 4'(MSG_DISASTER) && !rail_green) m_disaster++;
    secs(5);
    check(lx_state == 4'(LX_INFORM_DMF), "waits for the disaster force");
    ir_m_n[1] = 1;
    repeat (20) @(negedge clk);
    beam(1, 2, 20);                       // finally leaves
    @(negedge clk) dmf_clear = 1;
    @(negedge clk) dmf_clear = 0;
    wait_state(LX_WAIT_IRQ, 2, "cleared by DMF");
    if (lx_state == 4'(LX_WAIT_IRQ) && !disaster) m_dmf++;
    secs(12);

    // 6a unexpected: road sensor of track 1 with no train announced
    beam(1, 1, 20);
    if (track_error[1] && track_red[1] && track_yellow[1]) m_unexpected++;
    @(negedge clk) op_reset = 1;
    @(negedge clk) op_reset = 0;
    repeat (5) @(negedge clk);
    check(!track_error[1], "operator reset clears the error");
    // 6b missing: train enters track 0 and never reaches the road
    enter(0, 1);
    begin
      automatic int n = 0;
      while (!track_error[0] && n < 200 * SEC) begin @(negedge clk); n++; end
      if (track_error[0]) m_missing++;
    end
    wait_state(LX_WAIT_IRQ, 2, "crossing released after lost train");
    @(negedge clk) op_reset = 1;
    @(negedge clk) op_reset = 0;

    // 7 two-train controller: train 1 alone, then both together
    @(negedge clk) x_approach1 = 1;
    @(negedge clk) x_approach1 = 0;
    secs(22);
    if (x_green1 && !x_red1 && x_gate_state == 2'd2) m_x_single++;
    @(negedge clk) x_leave1 = 1;
    @(negedge clk) x_leave1 = 0;
    secs(22);
    check(x_gate_state == 2'd0 && x_state == 4'd0, "two-train controller: gate open again");
    @(negedge clk) begin x_approach1 = 1; x_approach2 = 1; end
    @(negedge clk) begin x_approach1 = 0; x_approach2 = 0; end
    secs(22);
    if (x_green1 && x_green2 && !x_alarm) m_x_both++;
    @(negedge clk) x_leave1 = 1;
    @(negedge clk) x_leave1 = 0;
    secs(2);
    check(x_gate_state == 2'd2 && x_red1 && x_green2, "gate held for train 2");
    @(negedge clk) x_leave2 = 1;
    @(negedge clk) x_leave2 = 0;
    secs(22);
    check(x_gate_state == 2'd0, "gate open after both trains");

    // 8 RF gate sequencer
    @(negedge clk) begin gs_rf_data = 4'b0001; gs_rf_vt = 1; end
    repeat (10) @(negedge clk);
    gs_rf_vt = 0;
    secs(12);
    if (gs_red && gs_buzzer && !gs_green && gs_coil == '0) m_gs++;
    gs_ir_depart_n = 0;
    repeat (20) @(negedge clk);
    gs_ir_depart_n = 1;
    secs(12);
    check(gs_green && !gs_red && !gs_buzzer && gs_coil == '0, "RF gate open, green");

    // 9 LED peripheral
    axi_write(4'h0, 32'h0000_0009);
    repeat (2) @(negedge clk);
    if (led == 4'h9) m_led++;

    // ---------------- summary ----------------
    check(unsafe == 0, $sformatf("safety monitor: %0d violations", unsafe));
    check(m_warn >= 5,       $sformatf("warning sequence x%0d", m_warn));
    check(m_lowered >= 5,    $sformatf("barriers lowered x%0d", m_lowered));
    check(m_rail_go >= 5,    $sformatf("rail go x%0d", m_rail_go));
    check(m_passed == 1,     $sformatf("train passed x%0d", m_passed));
    check(m_obst == 1,       $sformatf("obstacle stall x%0d", m_obst));
    check(m_road_stall == 1, $sformatf("road-vehicle stall x%0d", m_road_stall));
    check(m_second == 1,     $sformatf("second train x%0d", m_second));
    check(m_plunger == 1,    $sformatf("plunger x%0d", m_plunger));
    check(m_fault >= 1,      $sformatf("fault x%0d", m_fault));
    check(m_disaster == 1,   $sformatf("disaster x%0d", m_disaster));
    check(m_dmf == 1,        $sformatf("DMF clear x%0d", m_dmf));
    check(m_unexpected == 1, $sformatf("unexpected train x%0d", m_unexpected));
    check(m_missing == 1,    $sformatf("missing train x%0d", m_missing));
    check(m_x_single == 1,   $sformatf("two-train ctl single x%0d", m_x_single));
    check(m_x_both == 1,     $sformatf("two-train ctl both x%0d", m_x_both));
    check(m_gs == 1,         $sformatf("RF gate sequencer x%0d", m_gs));
    check(m_led == 1,        $sformatf("LED write x%0d", m_led));
    $display("mechanisms: warn=%0d lowered=%0d rail_go=%0d passed=%0d obst=%0d road=%0d second=%0d plunger=%0d fault=%0d disaster=%0d dmf=%0d unexp=%0d missing=%0d x1=%0d x2=%0d gs=%0d led=%0d",
             m_warn, m_lowered, m_rail_go, m_passed, m_obst, m_road_stall, m_second, m_plunger,
             m_fault, m_disaster, m_dmf, m_unexpected, m_missing, m_x_single, m_x_both, m_gs, m_led);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

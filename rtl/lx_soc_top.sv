// lx_soc_top - programmable-logic side of the automatic level-crossing SoC.
//
// The crossing has two tracks and a road with two sides (A and B). Along each
// track three IR beam sensors (L, M, R) watch a sensor zone; at the road each
// side has a sensor under its arriving barrier part and a sensor on the road
// inside the crossing. Every raw sensor line is active low and passes through
// an ir_sensor_in filter. Per track a track_light_ctrl follows the train
// through its zone (direction, passage of the road sensor, lost or unexpected
// trains) and drives that track's red/yellow crossing lights. Its
// zone-entry and zone-exit events, plus the driver's plunger requests, fill
// and empty the Approaching Request Buffer (approach_buffer). The LX control
// unit (lx_control_unit) reads the buffer and the road sensors and sequences
// road signal, rail signal, alarm and four barrier parts, each moved by a
// barrier_drive stepper positioner whose coil lines go to ULN2003 drivers.
// A tick_gen supplies the one-second tick and the flash phase.
//
// Two further controllers the design describes stand beside this main path
// with ports of their own: the two-train crossing controller with its timed
// gate model (crossing_ctrl_2train + gate_fsm, ports x_*), and the RF-triggered
// gate sequencer of the prototype with its own gate drive (gate_seq_fsm +
// barrier_drive, ports gs_*). The led_ip AXI4-Lite peripheral, written by the
// processor, drives LED[3:0]; its slave port is brought out because the
// processor system and the AXI interconnect are outside this RTL.
//
// Timing: all logic on clk (CLK_HZ, default 100 MHz), active-low asynchronous
// reset rst_n, except led_ip which resets synchronously on s_axi_aresetn and
// runs on the same clock.
module lx_soc_top
  import lx_pkg::*;
#(
  parameter int unsigned CLK_HZ   = 100_000_000,
  parameter int unsigned DEBOUNCE = 10_000,     // clocks a sensor level must hold
  parameter int unsigned STEP_HZ  = 10          // barrier motor steps per second
) (
  input  logic              clk,
  input  logic              rst_n,
  // train sensors, raw active-low receiver outputs, index = track
  input  logic [1:0]        ir_l_n,
  input  logic [1:0]        ir_m_n,
  input  logic [1:0]        ir_r_n,
  // road sensors, index 0 = side A, 1 = side B
  input  logic [1:0]        ir_under_gate_n,
  input  logic [1:0]        ir_on_road_n,
  // driver plungers [track][direction], operator and disaster-force inputs
  input  logic [1:0][1:0]   plunger,
  input  logic              dmf_clear,
  input  logic              op_reset,
  input  logic              lights_enable,
  // LX road and rail signal lamps, alarm
  output logic              road_green,
  output logic              road_yellow,
  output logic              road_red,
  output logic              rail_green,
  output logic              rail_red,
  output logic              alarm,
  output logic              disaster,
  output logic              fault,
  output logic [3:0]        lcd_msg,
  output logic [3:0]        lx_state,
  // barrier motor coils D0..D3, index = side
  output logic [1:0][3:0]   arr_coil,
  output logic [1:0][3:0]   lv_coil,
  // per-track crossing lights
  output logic [1:0]        track_red,
  output logic [1:0]        track_yellow,
  output logic [1:0]        track_error,
  // two-train crossing controller and gate model
  input  logic              x_approach1,
  input  logic              x_approach2,
  input  logic              x_leave1,
  input  logic              x_leave2,
  output logic              x_green1,
  output logic              x_green2,
  output logic              x_red1,
  output logic              x_red2,
  output logic              x_alarm,
  output logic [1:0]        x_gate_state,
  output logic [3:0]        x_state,
  // RF-triggered gate sequencer
  input  logic              gs_rf_vt,
  input  logic [3:0]        gs_rf_data,
  input  logic              gs_ir_depart_n,
  output logic [3:0]        gs_coil,
  output logic              gs_red,
  output logic              gs_green,
  output logic              gs_buzzer,
  // led_ip AXI4-Lite slave
  input  logic              s_axi_aresetn,
  input  logic [3:0]        s_axi_awaddr,
  input  logic [2:0]        s_axi_awprot,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  input  logic [3:0]        s_axi_araddr,
  input  logic [2:0]        s_axi_arprot,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  output logic [3:0]        led
);
  localparam int unsigned STEP_DIV = (CLK_HZ / STEP_HZ) < 1 ? 1 : CLK_HZ / STEP_HZ;

  logic tick, flash;

  tick_gen #(.CLK_HZ(CLK_HZ)) u_tick (
    .clk(clk), .rst_n(rst_n), .tick(tick), .flash(flash)
  );

  // ---------------- sensor front ends ----------------
  logic [1:0] sen_l, sen_m, sen_r, under_gate, on_road;

  for (genvar t = 0; t < 2; t++) begin : g_track_sensors
    ir_sensor_in #(.DEBOUNCE(DEBOUNCE)) u_l (
      .clk(clk), .rst_n(rst_n), .ir_n(ir_l_n[t]), .present(sen_l[t]), .rise(), .fall());
    ir_sensor_in #(.DEBOUNCE(DEBOUNCE)) u_m (
      .clk(clk), .rst_n(rst_n), .ir_n(ir_m_n[t]), .present(sen_m[t]), .rise(), .fall());
    ir_sensor_in #(.DEBOUNCE(DEBOUNCE)) u_r (
      .clk(clk), .rst_n(rst_n), .ir_n(ir_r_n[t]), .present(sen_r[t]), .rise(), .fall());
  end

  for (genvar s = 0; s < 2; s++) begin : g_road_sensors
    ir_sensor_in #(.DEBOUNCE(DEBOUNCE)) u_under (
      .clk(clk), .rst_n(rst_n), .ir_n(ir_under_gate_n[s]), .present(under_gate[s]), .rise(), .fall());
    ir_sensor_in #(.DEBOUNCE(DEBOUNCE)) u_road (
      .clk(clk), .rst_n(rst_n), .ir_n(ir_on_road_n[s]), .present(on_road[s]), .rise(), .fall());
  end

  // ---------------- per-track sensor zones ----------------
  logic [1:0] enter, leave, on_m;
  dir_e       dir [2];

  for (genvar t = 0; t < 2; t++) begin : g_zone
    track_light_ctrl u_zone (
      .clk(clk), .rst_n(rst_n), .tick(tick), .flash(flash),
      .enable(lights_enable), .op_reset(op_reset),
      .sen_l(sen_l[t]), .sen_m(sen_m[t]), .sen_r(sen_r[t]),
      .red(track_red[t]), .yellow(track_yellow[t]),
      .enter(enter[t]), .leave(leave[t]), .dir(dir[t]), .on_m(on_m[t]),
      .error(track_error[t]), .state_o());
  end

  // plunger: synchronise and take the rising edge
  logic [1:0][1:0] pl_s1, pl_s2, pl_s3;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pl_s1 <= '0;
      pl_s2 <= '0;
      pl_s3 <= '0;
    end else begin
      pl_s1 <= plunger;
      pl_s2 <= pl_s1;
      pl_s3 <= pl_s2;
    end
  end

  // ---------------- approaching request buffer ----------------
  logic [1:0][1:0] buf_inc, buf_dec;
  logic            buf_all_zero, buf_flush;

  always_comb begin
    for (int t = 0; t < 2; t++) begin
      for (int d = 0; d < 2; d++) begin
        buf_inc[t][d] = (enter[t] && dir[t] == dir_e'(d)) || (pl_s2[t][d] && !pl_s3[t][d]);
        buf_dec[t][d] =  leave[t] && dir[t] == dir_e'(d);
      end
    end
  end

  approach_buffer #(.N_TRACKS(2)) u_buf (
    .clk(clk), .rst_n(rst_n), .inc(buf_inc), .dec(buf_dec), .flush(buf_flush),
    .count(), .all_zero(buf_all_zero), .overflow());

  // ---------------- LX control unit and barrier drives ----------------
  barrier_pos_e arr_target [2];
  barrier_pos_e lv_target  [2];
  logic [1:0]   arr_horizontal, lv_horizontal;
  lcd_msg_e     msg;
  lx_state_e    st;

  lx_control_unit u_lxcu (
    .clk(clk), .rst_n(rst_n), .tick(tick), .flash(flash),
    .buf_all_zero(buf_all_zero), .request_in(|buf_inc), .train_passed(|buf_dec),
    .buf_flush(buf_flush),
    .veh_under_arr(under_gate), .veh_on_road(on_road),
    .train_blocking(|on_m), .dmf_clear(dmf_clear),
    .arr_target(arr_target), .lv_target(lv_target),
    .arr_horizontal(arr_horizontal), .lv_horizontal(lv_horizontal),
    .road_aspect(), .rail_aspect(),
    .road_green(road_green), .road_yellow(road_yellow), .road_red(road_red),
    .rail_green(rail_green), .rail_red(rail_red),
    .alarm(alarm), .disaster(disaster), .fault(fault),
    .lcd_msg(msg), .state(st));

  assign lcd_msg  = msg;
  assign lx_state = st;

  for (genvar s = 0; s < 2; s++) begin : g_barrier
    barrier_drive #(.STEP_DIV(STEP_DIV)) u_arr (
      .clk(clk), .rst_n(rst_n), .target(arr_target[s]), .coil(arr_coil[s]),
      .moving(), .at_target(), .is_raised(), .is_45(), .is_horizontal(arr_horizontal[s]));
    barrier_drive #(.STEP_DIV(STEP_DIV)) u_lv (
      .clk(clk), .rst_n(rst_n), .target(lv_target[s]), .coil(lv_coil[s]),
      .moving(), .at_target(), .is_raised(), .is_45(), .is_horizontal(lv_horizontal[s]));
  end

  // ---------------- two-train controller and gate model ----------------
  logic x_close, x_open, x_lowered, x_raised;
  logic x_g1, x_g2, x_r1, x_r2;

  crossing_ctrl_2train u_xctl (
    .clk(clk), .rst_n(rst_n), .tick(tick),
    .approach1(x_approach1), .approach2(x_approach2),
    .leave1(x_leave1), .leave2(x_leave2),
    .gate_down(x_lowered), .gate_up(x_raised),
    .close(x_close), .open(x_open),
    .green1(x_g1), .green2(x_g2), .red1(x_r1), .red2(x_r2),
    .sound(), .alarm(x_alarm), .state_o(x_state));

  gate_fsm u_xgate (
    .clk(clk), .rst_n(rst_n), .tick(tick),
    .close_req(x_close), .open_req(x_open),
    .lowered(x_lowered), .raised(x_raised), .state_o(x_gate_state));

  // Hold each train's aspect between its green and red events.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_green1 <= 1'b0;
      x_green2 <= 1'b0;
    end else begin
      if (x_g1) x_green1 <= 1'b1; else if (x_r1 || x_leave1) x_green1 <= 1'b0;
      if (x_g2) x_green2 <= 1'b1; else if (x_r2 || x_leave2) x_green2 <= 1'b0;
    end
  end
  assign x_red1 = !x_green1;
  assign x_red2 = !x_green2;

  // ---------------- RF-triggered gate sequencer ----------------
  logic gs_depart, gs_lower, gs_closed, gs_open, gs_vt_s1, gs_vt_s2;
  logic [3:0] gs_data_s1, gs_data_s2;
  barrier_pos_e gs_target;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gs_vt_s1   <= 1'b0;
      gs_vt_s2   <= 1'b0;
      gs_data_s1 <= '0;
      gs_data_s2 <= '0;
    end else begin
      gs_vt_s1   <= gs_rf_vt;
      gs_vt_s2   <= gs_vt_s1;
      gs_data_s1 <= gs_rf_data;
      gs_data_s2 <= gs_data_s1;
    end
  end

  ir_sensor_in #(.DEBOUNCE(DEBOUNCE)) u_gs_depart (
    .clk(clk), .rst_n(rst_n), .ir_n(gs_ir_depart_n), .present(gs_depart), .rise(), .fall());

  gate_seq_fsm u_gseq (
    .clk(clk), .rst_n(rst_n), .ri(gs_vt_s2), .rf_data(gs_data_s2), .depart(gs_depart),
    .gate_closed(gs_closed), .gate_open(gs_open), .gate_lower(gs_lower),
    .red(gs_red), .green(gs_green), .buzzer(gs_buzzer), .state_o());

  assign gs_target = gs_lower ? POS_HORIZONTAL : POS_RAISED;

  barrier_drive #(.STEP_DIV(STEP_DIV)) u_gs_gate (
    .clk(clk), .rst_n(rst_n), .target(gs_target), .coil(gs_coil),
    .moving(), .at_target(), .is_raised(gs_open), .is_45(), .is_horizontal(gs_closed));

  // ---------------- LED peripheral ----------------
  led_ip u_led (
    .s_axi_aclk(clk), .s_axi_aresetn(s_axi_aresetn),
    .s_axi_awaddr(s_axi_awaddr), .s_axi_awprot(s_axi_awprot),
    .s_axi_awvalid(s_axi_awvalid), .s_axi_awready(s_axi_awready),
    .s_axi_wdata(s_axi_wdata), .s_axi_wstrb(s_axi_wstrb),
    .s_axi_wvalid(s_axi_wvalid), .s_axi_wready(s_axi_wready),
    .s_axi_bresp(s_axi_bresp), .s_axi_bvalid(s_axi_bvalid), .s_axi_bready(s_axi_bready),
    .s_axi_araddr(s_axi_araddr), .s_axi_arprot(s_axi_arprot),
    .s_axi_arvalid(s_axi_arvalid), .s_axi_arready(s_axi_arready),
    .s_axi_rdata(s_axi_rdata), .s_axi_rresp(s_axi_rresp),
    .s_axi_rvalid(s_axi_rvalid), .s_axi_rready(s_axi_rready),
    .led(led));
endmodule

// tb_lx_soc_top_full - the level-crossing top at its default parameters
// (100 MHz clock, one-second tick, 10,000-clock sensor debounce, 10 motor
// steps per second), no parameter overrides.
//
// Simulating a whole train passage at 100 MHz would take about four billion
// clocks, so this test covers the first seconds of one operation, in which
// every clock-rate dependent number of the top is exercised:
//   - a train breaking the L beam of track 0 is announced after the debounce
//     (checked against DEBOUNCE + synchroniser + zone + buffer latency) and
//     starts the warning with the road green and the alarm on
//   - the green warning lasts t1 = 3 s, i.e. between 2 and 3 tick periods of
//     100,000,000 clocks (the first tick comes at an unknown phase)
//   - the RF gate sequencer, given the arrival code, starts its gate motor and
//     the coil pattern advances once every 10,000,000 clocks (0.1 s)
//   - an AXI-Lite write of register 0 sets the LEDs
module tb_lx_soc_top_full;
  import lx_pkg::*;
  localparam longint SEC = 100_000_000;

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

  lx_soc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    wait (cyc == 4 * SEC);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic gs_lower_seen = 0;
  always @(posedge clk) if (gs_coil != 0) gs_lower_seen <= 1;

  // RF gate motor: clocks between coil pattern changes
  longint last_change = 0, n_changes = 0, bad_spacing = 0;
  logic [3:0] gs_prev = 0;
  always @(posedge clk) begin
    gs_prev <= gs_coil;
    if (gs_coil != gs_prev && gs_prev != 4'b0000 && gs_coil != 4'b0000) begin
      if (n_changes > 0 && cyc - last_change != SEC / 10) bad_spacing++;
      n_changes++;
      last_change = cyc;
    end else if (gs_coil != gs_prev) begin
      last_change = cyc;
    end
  end

  initial begin
    longint t0, t1;
    repeat (5) @(negedge clk);
    rst_n = 1; s_axi_aresetn = 1;
    @(negedge clk) op_reset = 1;
    @(negedge clk) op_reset = 0;
    repeat (5) @(negedge clk);
    check(lx_state == 4'(LX_WAIT_IRQ), "waiting for a request");

    // LED register
    @(negedge clk);
    s_axi_awaddr = 0; s_axi_wdata = 32'h6; s_axi_wstrb = 4'hF;
    s_axi_awvalid = 1; s_axi_wvalid = 1; s_axi_bready = 1;
    do @(posedge clk); while (!(s_axi_awready && s_axi_wready));
    @(negedge clk) begin s_axi_awvalid = 0; s_axi_wvalid = 0; end
    while (!s_axi_bvalid) @(negedge clk);
    @(negedge clk) s_axi_bready = 0;
    check(led == 4'h6, "LED register written");

    // RF arrival code to the gate sequencer
    @(negedge clk) begin gs_rf_data = 4'b0001; gs_rf_vt = 1; end
    repeat (100) @(negedge clk);
    gs_rf_vt = 0;

    // train on track 0, left to right
    @(negedge clk) ir_l_n[0] = 0;
    t0 = cyc;
    while (lx_state != 4'(LX_WARN_GREEN) && cyc - t0 < 20_000) @(negedge clk);
    check(lx_state == 4'(LX_WARN_GREEN), "train announced");
    check(cyc - t0 >= 10_000 && cyc - t0 <= 10_010,
          $sformatf("announce latency %0d clocks, want debounce 10000 + pipeline", cyc - t0));
    check(alarm && track_red[0] && lcd_msg == 4'(MSG_TRAIN_ARRIVING), "alarm, track red, LCD message");
    repeat (1000) @(negedge clk);
    ir_l_n[0] = 1;
    t1 = cyc;
    while (lx_state == 4'(LX_WARN_GREEN) && cyc - t1 < 4 * SEC) @(negedge clk);
    check(lx_state == 4'(LX_WARN_YELLOW), "yellow warning follows green");
    check(cyc - t0 > 2 * SEC && cyc - t0 <= 3 * SEC + 10_020,
          $sformatf("green warning %0d clocks, want 2..3 s", cyc - t0));
    check(n_changes >= 20 && bad_spacing == 0,
          $sformatf("RF gate motor: %0d steps, %0d badly spaced", n_changes, bad_spacing));
    check(gs_lower_seen, "RF gate commanded down");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// track_light_ctrl - sensor-zone supervisor and crossing lights for one track.
//
// Three train sensors lie along the track: L at the left end of the sensor
// zone, M at the road, R at the right end. A train may come from either side,
// never reverses, and may be short or long enough to cover several sensors at
// once; at most one train per track is in the zone. The sensor a train meets
// first is its Sensor1, the far one its Sensor2.
//
// Light rules (from the design):
//   * both lights off while the controller is disabled;
//   * yellow flashing when no train is in the zone, or when the train has
//     passed M and is leaving the zone;
//   * red on while a train is between Sensor1 and M moving towards M, and
//     while it covers M;
//   * red and yellow both on in undefined situations: after start-up, after an
//     unexpected sensor signal, and when the expected sensor signal did not
//     come within a timeout (a lost train). Only the operator's reset leaves
//     these states (START, UNEXPECTED, MISSING).
// The rules and the states START, MISSING and UNEXPECTED are the document's;
// the transition diagram itself is not available, so the transitions below are
// built from the rules. The timeouts T_APPROACH and T_CROSS are assumed.
//
// Also produced for the LX control unit: enter (one clock, with dir) when a
// train enters the zone, leave (one clock, with dir) when it has left it, and
// on_m while a train covers M. Inputs are filtered, active-high sensor levels.
// Timing: registered outputs; timeouts advance on tick.
module track_light_ctrl
  import lx_pkg::*;
#(
  parameter int unsigned T_APPROACH = 180,  // Sensor1 -> M at most (ticks)
  parameter int unsigned T_CROSS    = 180,  // M -> zone left at most (ticks)
  parameter int unsigned TW         = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic flash,
  input  logic enable,
  input  logic op_reset,
  input  logic sen_l,
  input  logic sen_m,
  input  logic sen_r,
  output logic red,
  output logic yellow,
  output logic enter,
  output logic leave,
  output dir_e dir,
  output logic on_m,
  output logic error,
  output logic [2:0] state_o
);
  typedef enum logic [2:0] {
    TL_START      = 3'd0,
    TL_IDLE       = 3'd1,
    TL_APPROACH   = 3'd2,
    TL_CROSSING   = 3'd3,
    TL_LEAVING    = 3'd4,
    TL_MISSING    = 3'd5,
    TL_UNEXPECTED = 3'd6
  } tl_state_e;

  tl_state_e     state;
  logic          l_q, m_q, r_q;
  logic          s2_seen;
  logic [TW-1:0] secs;

  wire l_rise = sen_l & ~l_q;
  wire m_rise = sen_m & ~m_q;
  wire r_rise = sen_r & ~r_q;
  wire s1_rise = (dir == DIR_LR) ? l_rise : r_rise;
  wire s2_rise = (dir == DIR_LR) ? r_rise : l_rise;
  wire s2_lvl  = (dir == DIR_LR) ? sen_r  : sen_l;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= TL_START;
      l_q     <= 1'b0;
      m_q     <= 1'b0;
      r_q     <= 1'b0;
      dir     <= DIR_LR;
      s2_seen <= 1'b0;
      secs    <= '0;
      enter   <= 1'b0;
      leave   <= 1'b0;
    end else begin
      l_q   <= sen_l;
      m_q   <= sen_m;
      r_q   <= sen_r;
      enter <= 1'b0;
      leave <= 1'b0;
      if (tick && secs != '1) secs <= secs + 1'b1;
      unique case (state)
        TL_START, TL_MISSING, TL_UNEXPECTED:
          if (op_reset) state <= TL_IDLE;
        TL_IDLE: begin
          secs    <= '0;
          s2_seen <= 1'b0;
          if (m_rise) begin
            state <= TL_UNEXPECTED;          // M signals a train none announced
          end else if (l_rise && r_rise) begin
            state <= TL_UNEXPECTED;
          end else if (l_rise) begin
            dir   <= DIR_LR;
            enter <= 1'b1;
            state <= TL_APPROACH;
          end else if (r_rise) begin
            dir   <= DIR_RL;
            enter <= 1'b1;
            state <= TL_APPROACH;
          end
        end
        TL_APPROACH: begin
          if (m_rise) begin
            secs  <= '0;
            state <= TL_CROSSING;
          end else if (s2_rise) begin
            state <= TL_UNEXPECTED;          // far sensor before the road sensor
          end else if (tick && secs >= TW'(T_APPROACH - 1)) begin
            state <= TL_MISSING;             // train never reached the road
          end
        end
        TL_CROSSING: begin
          if (s2_lvl) s2_seen <= 1'b1;
          if (s1_rise) begin
            state <= TL_UNEXPECTED;          // a second train on this track
          end else if (!sen_m) begin
            state <= TL_LEAVING;
          end else if (tick && secs >= TW'(T_CROSS - 1)) begin
            state <= TL_MISSING;
          end
        end
        TL_LEAVING: begin
          if (s2_lvl) s2_seen <= 1'b1;
          if (s1_rise || m_rise) begin
            state <= TL_UNEXPECTED;
          end else if (s2_seen && !s2_lvl) begin
            leave <= 1'b1;
            state <= TL_IDLE;
          end else if (tick && secs >= TW'(T_CROSS - 1)) begin
            state <= TL_MISSING;
          end
        end
        default: state <= TL_START;
      endcase
    end
  end

  always_comb begin
    red    = 1'b0;
    yellow = 1'b0;
    if (enable) begin
      unique case (state)
        TL_IDLE, TL_LEAVING:                  yellow = flash;
        TL_APPROACH, TL_CROSSING:             red    = 1'b1;
        TL_START, TL_MISSING, TL_UNEXPECTED: begin
          red    = 1'b1;
          yellow = 1'b1;
        end
        default: ;
      endcase
    end
  end

  assign on_m    = sen_m;
  assign error   = state inside {TL_START, TL_MISSING, TL_UNEXPECTED};
  assign state_o = state;
endmodule

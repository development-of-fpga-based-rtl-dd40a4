// lx_control_unit - the LX Control Unit of the automatic level crossing.
//
// It sequences the road signal, the rail signal, the four barrier parts (an
// arriving and a leaving part on road side A and side B) and the alarm while
// trains approach and cross, and it detects the two failure classes of the
// design: a barrier that cannot be lowered in time or a train blocking the road
// after TIME-OUT (a DISASTER, reported to the Disaster Management Force), and
// a train that does not cross within TIME-OUT but does not block the road (a
// faulty situation, whose request is destroyed so road traffic can resume).
//
// Sequence (all times counted in `tick` periods, 1 s by default):
//   INIT / WAIT_IRQ  rail red flashing, road green flashing, barriers raised.
//   a request in the Approaching Request Buffer starts the warning:
//   WARN_GREEN  t1   road still green, alarm on
//   WARN_YELLOW t2   road flashing yellow
//   WARN_RED    t3   road flashing red (gate delay)
//   CHK_OBST    t4   all parts to 45 deg; each arriving part goes horizontal
//                    once no vehicle is under it; both horizontal within t4,
//                    else DISASTER
//   CHK_LOWER   t5   each leaving part goes horizontal once its side of the
//                    road inside the LX is clear; within t5, else DISASTER
//   CHK_DEPART       rail red for t6, then rail flashing green; TIME-OUT runs
//                    from the green and restarts on every new request.
//                    A train passing, or a buffer already emptied by a train
//                    that left during the checks -> CHK_BUFFER (design
//                    choice); TIME-OUT -> CHK_FAULT
//   CHK_BUFFER       buffer not empty: back to CHK_OBST with the barriers kept
//                    horizontal (second train); empty: raise, back to WAIT_IRQ
//   CHK_FAULT        train blocking the road: INFORM_DMF; otherwise destroy
//                    the pending requests and go to CHK_BUFFER (barriers rise)
//   INFORM_DMF       disaster high, alarm on, barriers held, until dmf_clear,
//                    then INIT.
// The states, their order, and the signal/barrier/alarm actions follow the
// document's state table and system flow. Where the two disagree this block
// keeps the barriers horizontal between successive trains and keeps the rail
// signal at stop while a disaster is reported. The timing values, the exact
// points where each timer starts, the flush of requests on a fault, and the
// route from obstacle check through lowering check are this design's choices.
//
// Interface: request_in / train_passed are one-clock pulses from the sensor
// zone logic; buf_all_zero comes from the approach buffer. Barrier feedback is
// the open-loop position of each barrier drive. Lamp outputs already include
// flashing. Timing: one state step per clock; timers advance on `tick`.
module lx_control_unit
  import lx_pkg::*;
#(
  parameter int unsigned T1      = 3,    // road green -> yellow
  parameter int unsigned T2      = 5,    // yellow -> red
  parameter int unsigned T3      = 10,   // red -> barriers start to lower (gate delay)
  parameter int unsigned T4      = 20,   // arriving parts horizontal within
  parameter int unsigned T5      = 20,   // leaving parts horizontal within
  parameter int unsigned T6      = 2,    // barriers down -> rail green
  parameter int unsigned TIMEOUT = 20,   // train expected to cross within
  parameter int unsigned TW      = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            tick,
  input  logic            flash,
  // approach buffer
  input  logic            buf_all_zero,
  input  logic            request_in,
  input  logic            train_passed,
  output logic            buf_flush,
  // road sensors, index 0 = side A, 1 = side B
  input  logic [1:0]      veh_under_arr,
  input  logic [1:0]      veh_on_road,
  input  logic            train_blocking,
  input  logic            dmf_clear,
  // barrier drives
  output barrier_pos_e    arr_target [2],
  output barrier_pos_e    lv_target  [2],
  input  logic [1:0]      arr_horizontal,
  input  logic [1:0]      lv_horizontal,
  // indications
  output road_aspect_t    road_aspect,
  output rail_aspect_t    rail_aspect,
  output logic            road_green, road_yellow, road_red,
  output logic            rail_green, rail_red,
  output logic            alarm,
  output logic            disaster,
  output logic            fault,
  output lcd_msg_e        lcd_msg,
  output lx_state_e       state
);
  lx_state_e     nstate;
  logic [TW-1:0] secs, tout;
  logic [1:0]    arr_down, lv_down;
  lcd_msg_e      msg_q, msg_d;

  wire rail_go = (state == LX_CHK_DEPART) && (secs >= TW'(T6));

  // ---------------- next state ----------------
  always_comb begin
    nstate    = state;
    buf_flush = 1'b0;
    msg_d     = msg_q;
    case (state)
      LX_INIT: begin
        nstate = LX_WAIT_IRQ;
        msg_d  = MSG_NO_TRAIN;
      end
      LX_WAIT_IRQ: if (!buf_all_zero) begin
        nstate = LX_WARN_GREEN;
        msg_d  = MSG_TRAIN_ARRIVING;
      end
      LX_WARN_GREEN:  if (tick && secs >= TW'(T1 - 1)) nstate = LX_WARN_YELLOW;
      LX_WARN_YELLOW: if (tick && secs >= TW'(T2 - 1)) nstate = LX_WARN_RED;
      LX_WARN_RED:    if (tick && secs >= TW'(T3 - 1)) nstate = LX_CHK_OBST;
      LX_CHK_OBST: begin
        if (|veh_under_arr) msg_d = MSG_OBSTACLE;
        if (&arr_horizontal) begin
          nstate = LX_CHK_LOWER;
        end else if (tick && secs >= TW'(T4 - 1)) begin
          nstate = LX_INFORM_DMF;
          msg_d  = MSG_NOT_LOWERED;
        end
      end
      LX_CHK_LOWER: begin
        if (&lv_horizontal) begin
          nstate = LX_CHK_DEPART;
          msg_d  = MSG_TRAIN_INSIDE;
        end else if (tick && secs >= TW'(T5 - 1)) begin
          nstate = LX_INFORM_DMF;
          msg_d  = MSG_NOT_LOWERED;
        end
      end
      LX_CHK_DEPART: begin
        // a train that left while the barriers were still being checked
        // has already emptied the buffer
        if (train_passed || buf_all_zero) begin
          nstate = LX_CHK_BUFFER;
        end else if (rail_go && tick && tout >= TW'(TIMEOUT - 1)) begin
          nstate = LX_CHK_FAULT;
        end
      end
      LX_CHK_BUFFER: begin
        if (!buf_all_zero) begin
          nstate = LX_CHK_OBST;
          msg_d  = MSG_SECOND_TRAIN;
        end else begin
          nstate = LX_WAIT_IRQ;
          if (msg_q != MSG_NO_FAULT_PASSED) msg_d = MSG_PASSED_OK;
        end
      end
      LX_CHK_FAULT: begin
        if (train_blocking) begin
          nstate = LX_INFORM_DMF;
          msg_d  = MSG_DISASTER;
        end else begin
          nstate    = LX_CHK_BUFFER;
          buf_flush = 1'b1;
          msg_d     = MSG_NO_FAULT_PASSED;
        end
      end
      LX_INFORM_DMF: if (dmf_clear) begin
        nstate    = LX_INIT;
        buf_flush = 1'b1;
      end
      default: nstate = LX_INIT;
    endcase
  end

  // ---------------- state, timers, barrier latches ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= LX_INIT;
      secs      <= '0;
      tout      <= '0;
      arr_down  <= '0;
      lv_down   <= '0;
      msg_q     <= MSG_NO_TRAIN;
    end else begin
      state <= nstate;
      msg_q <= msg_d;
      if (nstate != state)            secs <= '0;
      else if (tick && secs != '1)    secs <= secs + 1'b1;

      // TIME-OUT: runs while the rail signal shows go, restarts on a new request
      if (state != LX_CHK_DEPART || !rail_go || request_in) tout <= '0;
      else if (tick && tout != '1)                           tout <= tout + 1'b1;

      // Arriving parts go horizontal once no vehicle is under them; leaving
      // parts once their side of the road inside the LX is clear. Once down they
      // stay down until the crossing is released.
      if (state == LX_CHK_OBST) begin
        for (int s = 0; s < 2; s++) if (!veh_under_arr[s]) arr_down[s] <= 1'b1;
      end
      if (state == LX_CHK_LOWER)
        for (int s = 0; s < 2; s++) if (!veh_on_road[s]) lv_down[s] <= 1'b1;
      if (nstate == LX_WAIT_IRQ || nstate == LX_INIT) begin
        arr_down  <= '0;
        lv_down   <= '0;
      end
    end
  end

  // ---------------- outputs ----------------
  wire closing = (state inside {LX_CHK_OBST, LX_CHK_LOWER, LX_CHK_DEPART,
                                LX_CHK_FAULT, LX_INFORM_DMF})
              || (state == LX_CHK_BUFFER && !buf_all_zero);

  always_comb begin
    for (int s = 0; s < 2; s++) begin
      arr_target[s] = !closing ? POS_RAISED : (arr_down[s] ? POS_HORIZONTAL : POS_LOWERED45);
      lv_target[s]  = !closing ? POS_RAISED : (lv_down[s]  ? POS_HORIZONTAL : POS_LOWERED45);
    end
  end

  always_comb begin
    road_aspect = '{green: ASP_OFF, yellow: ASP_OFF, red: ASP_FLASH};
    rail_aspect = '{green: ASP_OFF, red: ASP_FLASH};
    alarm       = 1'b0;
    case (state)
      LX_INIT, LX_WAIT_IRQ, LX_WARN_GREEN:
        road_aspect = '{green: ASP_FLASH, yellow: ASP_OFF, red: ASP_OFF};
      LX_WARN_YELLOW:
        road_aspect = '{green: ASP_OFF, yellow: ASP_FLASH, red: ASP_OFF};
      LX_CHK_BUFFER:
        if (buf_all_zero) road_aspect = '{green: ASP_FLASH, yellow: ASP_OFF, red: ASP_OFF};
      default: ;
    endcase
    if (rail_go) rail_aspect = '{green: ASP_FLASH, red: ASP_OFF};
    alarm = state inside {LX_WARN_GREEN, LX_WARN_YELLOW, LX_WARN_RED, LX_CHK_OBST,
                          LX_CHK_LOWER, LX_CHK_FAULT, LX_INFORM_DMF};
  end

  assign road_green  = lamp(road_aspect.green,  flash);
  assign road_yellow = lamp(road_aspect.yellow, flash);
  assign road_red    = lamp(road_aspect.red,    flash);
  assign rail_green  = lamp(rail_aspect.green,  flash);
  assign rail_red    = lamp(rail_aspect.red,    flash);
  assign disaster    = (state == LX_INFORM_DMF);
  assign fault       = (state == LX_CHK_FAULT);
  assign lcd_msg     = msg_q;

  // Safety rule of the crossing: the rail signal may show go only while every
  // barrier part is commanded horizontal and has reached it.
  a_rail_go_needs_barriers: assert property (@(posedge clk) disable iff (!rst_n)
    rail_go |-> (&arr_horizontal && &lv_horizontal));
endmodule

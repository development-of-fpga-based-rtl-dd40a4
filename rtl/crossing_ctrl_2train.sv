// crossing_ctrl_2train - railroad-crossing controller for two trains.
//
// A timed-automaton controller: it hears approach/leave events of train 1 and
// train 2, commands the gate (close, open), hears when the gate is down or up,
// and gives each train its green or red. States: Outside, Entering1/2/Both,
// Alarm1/2/Both, Inside1/2/Both, Leaving1/2. The transitions are those of the
// model:
//   Outside --approachN--> close, t:=0 --> EnteringN
//   Entering1 --approach2--> EnteringBoth (and symmetrically)
//   EnteringX --gate down--> greenN (both greens for Both) --> InsideX
//   EnteringX --t>30--> sound --> AlarmX ; AlarmX --gate down--> as above
//   Inside1 --approach2--> InsideBoth ; InsideBoth --leave2--> Inside1,
//   InsideBoth --leave1--> Inside2 (and symmetrically)
//   InsideN --leaveN--> redN, open --> LeavingN ; LeavingN --gate up--> Outside
// Instantaneous (committed) locations of the model become output pulses on the
// transition. In the model an approach is a handshake: a train that approaches
// while the controller cannot take it (Leaving, Alarm, or a clock in which
// another event wins) waits until the controller can. Here the approach is a
// one-clock pulse, so an approach that no transition takes is held
// (pend1/pend2) until one does; this holding is this design's, and without it
// a train could be forgotten and the gate opened in front of it. Both trains
// leaving InsideBoth in one clock are taken as leave1 then leave2. Other events the model does not take in a state are ignored there;
// in particular a second train that arrives while the first is Inside gets no
// green of its own in this model. The alarm limit of 30 is the model's; the
// tick period (1 s) is this design's.
//
// Interface: all event inputs and all command outputs are one-clock pulses;
// `alarm` is a level while in an Alarm state.
module crossing_ctrl_2train #(
  parameter int unsigned T_ALARM = 30,
  parameter int unsigned TW      = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,
  input  logic       approach1,
  input  logic       approach2,
  input  logic       leave1,
  input  logic       leave2,
  input  logic       gate_down,
  input  logic       gate_up,
  output logic       close,
  output logic       open,
  output logic       green1,
  output logic       green2,
  output logic       red1,
  output logic       red2,
  output logic       sound,
  output logic       alarm,
  output logic [3:0] state_o
);
  typedef enum logic [3:0] {
    C_OUTSIDE   = 4'd0,
    C_ENTER1    = 4'd1,
    C_ENTER2    = 4'd2,
    C_ENTERB    = 4'd3,
    C_ALARM1    = 4'd4,
    C_ALARM2    = 4'd5,
    C_ALARMB    = 4'd6,
    C_INSIDE1   = 4'd7,
    C_INSIDE2   = 4'd8,
    C_INSIDEB   = 4'd9,
    C_LEAVING1  = 4'd10,
    C_LEAVING2  = 4'd11
  } cc_state_e;

  cc_state_e     state;
  logic [TW-1:0] t;

  wire late = tick && (t >= TW'(T_ALARM));   // t > T_ALARM after this tick

  // approaches waiting for the controller to return to Outside
  logic pend1, pend2;
  wire  a1 = approach1 || pend1;
  wire  a2 = approach2 || pend2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= C_OUTSIDE;
      t      <= '0;
      close  <= 1'b0;
      open   <= 1'b0;
      green1 <= 1'b0;
      green2 <= 1'b0;
      red1   <= 1'b0;
      red2   <= 1'b0;
      sound  <= 1'b0;
      pend1  <= 1'b0;
      pend2  <= 1'b0;
    end else begin
      {close, open, green1, green2, red1, red2, sound} <= '0;
      // an approach stays pending until a transition below takes it
      pend1 <= a1;
      pend2 <= a2;
      if (tick && t != '1) t <= t + 1'b1;
      unique case (state)
        C_OUTSIDE: begin
          if (a1 && a2) begin                 // both in the same clock
            close <= 1'b1; t <= '0; state <= C_ENTERB; pend1 <= 1'b0; pend2 <= 1'b0;
          end else if (a1) begin
            close <= 1'b1; t <= '0; state <= C_ENTER1; pend1 <= 1'b0;
          end else if (a2) begin
            close <= 1'b1; t <= '0; state <= C_ENTER2; pend2 <= 1'b0;
          end
        end
        C_ENTER1: begin
          if (gate_down)      begin green1 <= 1'b1; state <= C_INSIDE1; end
          else if (a2)        begin state <= C_ENTERB; pend2 <= 1'b0; end
          else if (late)      begin sound <= 1'b1; state <= C_ALARM1; end
        end
        C_ENTER2: begin
          if (gate_down)      begin green2 <= 1'b1; state <= C_INSIDE2; end
          else if (a1)        begin state <= C_ENTERB; pend1 <= 1'b0; end
          else if (late)      begin sound <= 1'b1; state <= C_ALARM2; end
        end
        C_ENTERB: begin
          if (gate_down) begin
            green1 <= 1'b1; green2 <= 1'b1; state <= C_INSIDEB;
          end else if (late) begin
            sound <= 1'b1; state <= C_ALARMB;
          end
        end
        C_ALARM1: if (gate_down) begin green1 <= 1'b1; state <= C_INSIDE1; end
        C_ALARM2: if (gate_down) begin green2 <= 1'b1; state <= C_INSIDE2; end
        C_ALARMB: if (gate_down) begin
          green1 <= 1'b1; green2 <= 1'b1; state <= C_INSIDEB;
        end
        C_INSIDE1: begin
          if (leave1)         begin red1 <= 1'b1; open <= 1'b1; state <= C_LEAVING1; end
          else if (a2)        begin state <= C_INSIDEB; pend2 <= 1'b0; end
        end
        C_INSIDE2: begin
          if (leave2)         begin red2 <= 1'b1; open <= 1'b1; state <= C_LEAVING2; end
          else if (a1)        begin state <= C_INSIDEB; pend1 <= 1'b0; end
        end
        C_INSIDEB: begin
          if (leave1 && leave2) begin      // as leave1 then leave2
            red2 <= 1'b1; open <= 1'b1; state <= C_LEAVING2;
          end else if (leave1) state <= C_INSIDE2;
          else if (leave2) state <= C_INSIDE1;
        end
        C_LEAVING1, C_LEAVING2: if (gate_up) state <= C_OUTSIDE;
        default: state <= C_OUTSIDE;
      endcase
    end
  end

  assign alarm   = state inside {C_ALARM1, C_ALARM2, C_ALARMB};
  assign state_o = state;

  // The gate is opened only as the last train leaves.
  a_open_on_leave: assert property (@(posedge clk) disable iff (!rst_n)
    open |-> (state inside {C_LEAVING1, C_LEAVING2}));
endmodule

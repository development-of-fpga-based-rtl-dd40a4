// gate_seq_fsm - RF-triggered gate sequencer of the FPGA prototype.
//
// The prototype's controller is a loop of nine actions, apart from reset:
//   WAIT_RI     wait for the receiver interrupt (RF decoder valid-transmission)
//   READ_RF     latch the 4-bit data word of the RF decoder
//   PROCESS     forward it to data processing: only the train-arrival code
//               starts a closing, any other code returns to WAIT_RI
//   CLOSE_GATE  enable the step-pulse generator to close the gate step by step;
//               wait until the gate drive reports horizontal
//   RED_BUZZER  switch on the red signal and the buzzer
//   WAIT_DEPART wait for the IR departure sensor
//   OPEN_GATE   enable the step-pulse generator to open the gate
//   GREEN       switch the signal to green, buzzer off, and go back to
//               WAIT_RI once the interrupt line has dropped
// The list of actions is the document's (its state diagram is not available);
// the arrival code, the use of the gate drive's position feedback to leave
// CLOSE_GATE and OPEN_GATE, and green-at-reset are this design's choices.
//
// Interface: ri is a level (decoder VT), depart the filtered departure sensor,
// gate_closed / gate_open come from a barrier_drive; waiting for ri to drop before
// WAIT_RI, so that one transmission starts one closing, is also this design's. gate_lower = 1 asks the
// drive for the horizontal position, 0 for raised.
// Timing: one state per clock except where a wait is named above.
module gate_seq_fsm #(
  parameter logic [3:0] ARRIVAL_CODE = 4'b0001
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ri,
  input  logic [3:0] rf_data,
  input  logic       depart,
  input  logic       gate_closed,
  input  logic       gate_open,
  output logic       gate_lower,
  output logic       red,
  output logic       green,
  output logic       buzzer,
  output logic [3:0] state_o
);
  typedef enum logic [3:0] {
    S_WAIT_RI     = 4'd0,
    S_READ_RF     = 4'd1,
    S_PROCESS     = 4'd2,
    S_CLOSE_GATE  = 4'd3,
    S_RED_BUZZER  = 4'd4,
    S_WAIT_DEPART = 4'd5,
    S_OPEN_GATE   = 4'd6,
    S_GREEN       = 4'd7
  } gs_state_e;

  gs_state_e  state;
  logic [3:0] data_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_WAIT_RI;
      data_q     <= '0;
      gate_lower <= 1'b0;
      red        <= 1'b0;
      green      <= 1'b1;
      buzzer     <= 1'b0;
    end else begin
      unique case (state)
        S_WAIT_RI:    if (ri) state <= S_READ_RF;
        S_READ_RF: begin
          data_q <= rf_data;
          state  <= S_PROCESS;
        end
        S_PROCESS:    state <= (data_q == ARRIVAL_CODE) ? S_CLOSE_GATE : S_WAIT_RI;
        S_CLOSE_GATE: begin
          gate_lower <= 1'b1;
          green      <= 1'b0;
          if (gate_lower && gate_closed) state <= S_RED_BUZZER;
        end
        S_RED_BUZZER: begin
          red    <= 1'b1;
          buzzer <= 1'b1;
          state  <= S_WAIT_DEPART;
        end
        S_WAIT_DEPART: if (depart) state <= S_OPEN_GATE;
        S_OPEN_GATE: begin
          gate_lower <= 1'b0;
          if (!gate_lower && gate_open) state <= S_GREEN;
        end
        S_GREEN: begin
          red    <= 1'b0;
          buzzer <= 1'b0;
          green  <= 1'b1;
          if (!ri) state <= S_WAIT_RI;
        end
        default: state <= S_WAIT_RI;
      endcase
    end
  end

  assign state_o = state;
endmodule

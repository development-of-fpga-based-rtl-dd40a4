// gate_fsm - timed model of the crossing gate: Open, Closing, Closed, Opening.
//
// A close request in Open starts Closing; an open request in Closed starts
// Opening. Each travel takes TRAVEL ticks (the gate model bounds it by 20 s),
// after which the gate reports completion with a one-clock pulse: `lowered`
// when Closing ends in Closed, `raised` when Opening ends in Open. Requests in
// any other state are ignored, as in the model, where only those two
// transitions take requests. The four states, the two requests and the 20 s
// bound are the document's. The model lets the travel end at any time up to
// 20 s; here it always takes exactly TRAVEL ticks, this design's choice. The
// model prints the completion events with the names up!/down! on the opposite
// edges to those the crossing controller waits for; this block names them by
// what they mean (lowered, raised).
// Timing: lowered/raised pulse on the clock where the TRAVEL-th tick arrives.
module gate_fsm #(
  parameter int unsigned TRAVEL = 20,
  parameter int unsigned TW     = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,
  input  logic       close_req,
  input  logic       open_req,
  output logic       lowered,
  output logic       raised,
  output logic [1:0] state_o
);
  typedef enum logic [1:0] {
    G_OPEN    = 2'd0,
    G_CLOSING = 2'd1,
    G_CLOSED  = 2'd2,
    G_OPENING = 2'd3
  } gate_state_e;

  gate_state_e   state;
  logic [TW-1:0] t;

  wire done = tick && (t >= TW'(TRAVEL - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= G_OPEN;
      t       <= '0;
      lowered <= 1'b0;
      raised  <= 1'b0;
    end else begin
      lowered <= 1'b0;
      raised  <= 1'b0;
      unique case (state)
        G_OPEN: if (close_req) begin
          state <= G_CLOSING;
          t     <= '0;
        end
        G_CLOSING: begin
          if (tick) t <= t + 1'b1;
          if (done) begin
            state   <= G_CLOSED;
            lowered <= 1'b1;
          end
        end
        G_CLOSED: if (open_req) begin
          state <= G_OPENING;
          t     <= '0;
        end
        G_OPENING: begin
          if (tick) t <= t + 1'b1;
          if (done) begin
            state  <= G_OPEN;
            raised <= 1'b1;
          end
        end
      endcase
    end
  end

  assign state_o = state;
endmodule

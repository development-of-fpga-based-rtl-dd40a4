// approach_buffer - the (n x 2)-cell Approaching Request Buffer of the LX.
//
// One counter per track and direction (row = track, column 0 = left-to-right,
// column 1 = right-to-left), all cleared to zero at reset, as the design
// specifies. A Train Approaching Request (a train entering the Influence Area,
// or a fresh request from the driver's plunger) adds one to its cell; a train
// that has crossed the LX removes one. `all_zero` tells the control unit that
// no other train is waiting, so the barriers may be raised. `flush` destroys
// all pending requests; the control unit uses it when a train has failed to
// cross within TIME-OUT and is not blocking the road. The cell layout and
// zero-check are the document's; counter width, saturation at both ends, and
// the flush port are this design's choices.
//
// Timing: registered; counts and all_zero change one clock after inc/dec.
// inc and dec on the same cell in the same clock cancel.
module approach_buffer #(
  parameter int unsigned N_TRACKS = 2,
  parameter int unsigned CNT_W    = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_TRACKS-1:0][1:0] inc,
  input  logic [N_TRACKS-1:0][1:0] dec,
  input  logic                 flush,
  output logic [N_TRACKS-1:0][1:0][CNT_W-1:0] count,
  output logic                 all_zero,
  output logic                 overflow
);
  localparam logic [CNT_W-1:0] MAX = '1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (flush) begin
      count <= '0;
    end else begin
      for (int t = 0; t < int'(N_TRACKS); t++) begin
        for (int d = 0; d < 2; d++) begin
          if (inc[t][d] && !dec[t][d]) begin
            if (count[t][d] != MAX) count[t][d] <= count[t][d] + 1'b1;
            else                    overflow    <= 1'b1;
          end else if (dec[t][d] && !inc[t][d]) begin
            if (count[t][d] != '0) count[t][d] <= count[t][d] - 1'b1;
          end
        end
      end
    end
  end

  always_comb begin
    all_zero = 1'b1;
    for (int t = 0; t < int'(N_TRACKS); t++)
      for (int d = 0; d < 2; d++)
        if (count[t][d] != '0) all_zero = 1'b0;
  end
endmodule

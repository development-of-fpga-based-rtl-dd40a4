// ir_sensor_in - front end for one IR beam sensor (TSOP1356 receiver output).
//
// The receiver output is active low: high while the IR link from the
// transmitter is received, low when a train or a vehicle breaks the beam. This
// block brings that asynchronous pin into the clock domain with a two-flop
// synchroniser, inverts it, and accepts a new level only after it has been
// stable for DEBOUNCE consecutive clocks, so that short dropouts of the
// demodulated signal do not reach the controllers. The polarity is the
// document's; synchroniser and debounce filter are this design's choice.
//
// Interface: ir_n is the raw receiver pin, present is high while the beam is
// broken, rise/fall are one-clock pulses on the filtered edges.
// Timing: present follows a stable change of ir_n on the DEBOUNCE + 2nd rising
// clock edge after the change (two synchroniser stages, then DEBOUNCE clocks).
module ir_sensor_in #(
  parameter int unsigned DEBOUNCE = 1000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ir_n,
  output logic present,
  output logic rise,
  output logic fall
);
  localparam int unsigned DW = $clog2(DEBOUNCE + 1);

  logic          s1, s2;
  logic [DW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1      <= 1'b1;
      s2      <= 1'b1;
      cnt     <= '0;
      present <= 1'b0;
      rise    <= 1'b0;
      fall    <= 1'b0;
    end else begin
      s1   <= ir_n;
      s2   <= s1;
      rise <= 1'b0;
      fall <= 1'b0;
      if (~s2 == present) begin
        cnt <= '0;
      end else if (cnt == DW'(DEBOUNCE - 1)) begin
        cnt     <= '0;
        present <= ~s2;
        rise    <= ~s2;
        fall    <= s2;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule

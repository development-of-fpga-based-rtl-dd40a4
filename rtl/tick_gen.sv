// tick_gen - one-second tick and flash square wave for the crossing timers.
//
// A free-running counter divides the fabric clock by CLK_HZ/TICK_HZ and emits a
// one-cycle pulse `tick` at TICK_HZ (default 1 Hz, so the controllers count
// their timings in seconds). `flash` toggles every FLASH_TICKS ticks and is the
// on/off phase of every flashing lamp. The design counts its timings with a
// millisecond / one-second timer; the counter here is this design's own way of
// doing so in hardware, and the 100 MHz default comes from the name of the
// processor-system reset block of the SoC (rst_processing_system7_0_100M).
//
// Timing: tick is high for one clock every CLK_HZ/TICK_HZ clocks, first after
// that many clocks from reset. flash starts low after reset.
module tick_gen #(
  parameter int unsigned CLK_HZ      = 100_000_000,
  parameter int unsigned TICK_HZ     = 1,
  parameter int unsigned FLASH_TICKS = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick,
  output logic flash
);
  localparam int unsigned DIV = (CLK_HZ / TICK_HZ) < 1 ? 1 : (CLK_HZ / TICK_HZ);
  localparam int unsigned CW  = $clog2(DIV + 1);
  localparam int unsigned FW  = $clog2(FLASH_TICKS + 1);

  logic [CW-1:0] cnt;
  logic [FW-1:0] fcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      tick  <= 1'b0;
      fcnt  <= '0;
      flash <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (cnt == CW'(DIV - 1)) begin
        cnt  <= '0;
        tick <= 1'b1;
        if (fcnt == FW'(FLASH_TICKS - 1)) begin
          fcnt  <= '0;
          flash <= ~flash;
        end else begin
          fcnt <= fcnt + 1'b1;
        end
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule

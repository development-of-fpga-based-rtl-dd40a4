// led_ip - AXI4-Lite slave peripheral driving the four road warning LEDs.
//
// In the SoC the processor writes this peripheral (base 0x43C00000, 4 KB
// window) and its LED[3:0] output drives the road warning lamps. Register 0
// holds the LED value: a write to byte offset 0 stores WDATA[3:0] (under byte
// strobe 0) and LED follows it; reset clears the LEDs. Registers 1..3 are
// plain read/write scratch registers of the standard four-register AXI4-Lite
// slave, and every register reads back. Port names follow the AXI4-Lite
// slave convention of the SoC. The write-register-0-to-LED behaviour and the
// address window are the document's; the register file, read path and
// response timing are this design's.
//
// Timing: a write is accepted when AWVALID and WVALID are both high (AWREADY
// and WREADY pulse together for one clock), BVALID follows one clock later and
// holds until BREADY. A read answers one clock after ARVALID/ARREADY, RVALID
// holds until RREADY. Responses are always OKAY.
module led_ip #(
  parameter int unsigned C_S_AXI_DATA_WIDTH = 32,
  parameter int unsigned C_S_AXI_ADDR_WIDTH = 4
) (
  input  logic                            s_axi_aclk,
  input  logic                            s_axi_aresetn,
  input  logic [C_S_AXI_ADDR_WIDTH-1:0]   s_axi_awaddr,
  input  logic [2:0]                      s_axi_awprot,
  input  logic                            s_axi_awvalid,
  output logic                            s_axi_awready,
  input  logic [C_S_AXI_DATA_WIDTH-1:0]   s_axi_wdata,
  input  logic [C_S_AXI_DATA_WIDTH/8-1:0] s_axi_wstrb,
  input  logic                            s_axi_wvalid,
  output logic                            s_axi_wready,
  output logic [1:0]                      s_axi_bresp,
  output logic                            s_axi_bvalid,
  input  logic                            s_axi_bready,
  input  logic [C_S_AXI_ADDR_WIDTH-1:0]   s_axi_araddr,
  input  logic [2:0]                      s_axi_arprot,
  input  logic                            s_axi_arvalid,
  output logic                            s_axi_arready,
  output logic [C_S_AXI_DATA_WIDTH-1:0]   s_axi_rdata,
  output logic [1:0]                      s_axi_rresp,
  output logic                            s_axi_rvalid,
  input  logic                            s_axi_rready,
  output logic [3:0]                      led
);
  localparam int unsigned NB = C_S_AXI_DATA_WIDTH / 8;

  logic [C_S_AXI_DATA_WIDTH-1:0] regs [4];
  logic [1:0] widx, ridx;

  assign widx = s_axi_awaddr[3:2];
  assign ridx = s_axi_araddr[3:2];

  wire wr_go = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid && !s_axi_awready;
  wire rd_go = s_axi_arvalid && !s_axi_rvalid && !s_axi_arready;

  always_ff @(posedge s_axi_aclk) begin
    if (!s_axi_aresetn) begin
      s_axi_awready <= 1'b0;
      s_axi_wready  <= 1'b0;
      s_axi_bvalid  <= 1'b0;
      s_axi_arready <= 1'b0;
      s_axi_rvalid  <= 1'b0;
      s_axi_rdata   <= '0;
      for (int i = 0; i < 4; i++) regs[i] <= '0;
    end else begin
      s_axi_awready <= 1'b0;
      s_axi_wready  <= 1'b0;
      s_axi_arready <= 1'b0;
      if (wr_go) begin
        s_axi_awready <= 1'b1;
        s_axi_wready  <= 1'b1;
        for (int b = 0; b < int'(NB); b++)
          if (s_axi_wstrb[b]) regs[widx][b*8 +: 8] <= s_axi_wdata[b*8 +: 8];
      end
      if (s_axi_awready) s_axi_bvalid <= 1'b1;
      else if (s_axi_bready) s_axi_bvalid <= 1'b0;

      if (rd_go) begin
        s_axi_arready <= 1'b1;
        s_axi_rdata   <= regs[ridx];
      end
      if (s_axi_arready) s_axi_rvalid <= 1'b1;
      else if (s_axi_rready) s_axi_rvalid <= 1'b0;
    end
  end

  assign s_axi_bresp = 2'b00;
  assign s_axi_rresp = 2'b00;
  assign led         = regs[0][3:0];

  // AXI handshake rule: a response, once valid, holds until it is taken.
  a_bvalid_hold: assert property (@(posedge s_axi_aclk) disable iff (!s_axi_aresetn)
    s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  a_rvalid_hold: assert property (@(posedge s_axi_aclk) disable iff (!s_axi_aresetn)
    s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));
endmodule

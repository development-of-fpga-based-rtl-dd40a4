// tb_led_ip - AXI4-Lite master tasks write and read the four registers of
// led_ip. Checks: LED follows register 0 bits 3:0, byte strobes, read-back of
// all registers, write and read response handshakes with a slow master
// (BREADY/RREADY delayed), and LED cleared by reset.
module tb_led_ip;
  logic clk = 0, rstn = 0;
  logic [3:0] awaddr = 0, araddr = 0;
  logic awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic [31:0] wdata = 0;
  logic [3:0] wstrb = 0;
  logic awready, wready, bvalid, arready, rvalid;
  logic [1:0] bresp, rresp;
  logic [31:0] rdata;
  logic [3:0] led;
  int checks = 0, failures = 0;
  logic [31:0] model [4];

  led_ip dut (
    .s_axi_aclk(clk), .s_axi_aresetn(rstn),
    .s_axi_awaddr(awaddr), .s_axi_awprot(3'b000), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arprot(3'b000), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .led(led));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic axi_write(int idx, logic [31:0] d, logic [3:0] strb, int bdelay);
    @(negedge clk);
    awaddr = 4'(idx * 4); wdata = d; wstrb = strb; awvalid = 1; wvalid = 1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk) begin awvalid = 0; wvalid = 0; end
    while (!bvalid) @(negedge clk);
    repeat (bdelay) begin
      @(negedge clk);
      check(bvalid, "BVALID held until BREADY");
    end
    bready = 1;
    @(posedge clk);
    @(negedge clk) bready = 0;
    check(!bvalid, "BVALID dropped after handshake");
    check(bresp == 2'b00, "OKAY write response");
    for (int b = 0; b < 4; b++) if (strb[b]) model[idx][b*8 +: 8] = d[b*8 +: 8];
  endtask

  task automatic axi_read(int idx, int rdelay, output logic [31:0] d);
    @(negedge clk);
    araddr = 4'(idx * 4); arvalid = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk) arvalid = 0;
    while (!rvalid) @(negedge clk);
    repeat (rdelay) @(negedge clk);
    check(rvalid, "RVALID held until RREADY");
    d = rdata;
    rready = 1;
    @(posedge clk);
    @(negedge clk) rready = 0;
  endtask

  initial begin
    logic [31:0] d;
    foreach (model[i]) model[i] = 0;
    repeat (3) @(posedge clk);
    rstn = 1;
    @(negedge clk);
    check(led == 4'h0, "LEDs off after reset");
    axi_write(0, 32'h0000_0005, 4'hF, 0);
    check(led == 4'h5, "LED = 5");
    axi_write(0, 32'h0000_000A, 4'hE, 2);          // byte 0 not enabled
    check(led == 4'h5, "LED unchanged without byte-0 strobe");
    axi_write(0, 32'hDEAD_BE0C, 4'hF, 3);
    check(led == 4'hC, "LED = C");
    for (int i = 1; i < 4; i++) axi_write(i, 32'h1111_1111 * i, 4'hF, i);
    axi_write(2, 32'hFF00_0000, 4'h8, 0);
    for (int i = 0; i < 4; i++) begin
      axi_read(i, i, d);
      check(d == model[i], $sformatf("read reg %0d = %h, want %h", i, d, model[i]));
    end
    check(led == 4'hC, "LED kept while other registers change");
    @(negedge clk) rstn = 0;
    @(negedge clk) rstn = 1;
    check(led == 4'h0, "LEDs cleared by reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ir_sensor_in - checks inversion, debouncing and edge pulses of the IR
// sensor front end. A low glitch shorter than DEBOUNCE clocks must not show;
// a held low must raise `present` on the DEBOUNCE+2nd clock edge, with one rise pulse;
// going high again must clear it with one fall pulse.
module tb_ir_sensor_in;
  localparam int DB = 5;
  logic clk = 0, rst_n = 0, ir_n = 1;
  logic present, rise, fall;
  int checks = 0, failures = 0;
  int nrise = 0, nfall = 0;

  ir_sensor_in #(.DEBOUNCE(DB)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (rise) nrise++;
    if (fall) nfall++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    check(!present, "idle: beam received, nothing present");
    // glitch of DB-2 clocks
    @(negedge clk) ir_n = 0;
    repeat (DB - 2) @(negedge clk);
    ir_n = 1;
    repeat (DB + 5) @(posedge clk);
    check(!present && nrise == 0, "short glitch filtered");
    // held low
    @(negedge clk) ir_n = 0;
    n = 0;
    while (!present && n < 50) begin @(posedge clk); #1; n++; end
    check(present, "beam broken reported");
    check(n == DB + 2, $sformatf("latency %0d clocks after the first edge", n));
    repeat (3) @(posedge clk);
    check(nrise == 1, "one rise pulse");
    @(negedge clk) ir_n = 1;
    repeat (DB + 5) @(posedge clk);
    #1;
    check(!present && nfall == 1, "released, one fall pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

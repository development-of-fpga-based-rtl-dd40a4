// tb_gate_fsm - the gate model: close request -> Closing -> Closed after
// exactly TRAVEL ticks with one `lowered` pulse; open request -> Opening ->
// Open after TRAVEL ticks with one `raised` pulse; requests in the wrong state
// are ignored.
module tb_gate_fsm;
  localparam int TRAVEL = 5, TICK = 3;
  logic clk = 0, rst_n = 0, tick = 0, close_req = 0, open_req = 0;
  logic lowered, raised;
  logic [1:0] state_o;
  int checks = 0, failures = 0;

  gate_fsm #(.TRAVEL(TRAVEL)) dut (.*);

  always #5 clk = ~clk;
  int tc = 0;
  always @(posedge clk) begin
    tc   <= (tc == TICK - 1) ? 0 : tc + 1;
    tick <= (tc == TICK - 1);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(ref logic sig);
    @(negedge clk) sig = 1;
    @(negedge clk) sig = 0;
  endtask

  task automatic travel(ref logic done_sig, input string name);
    int ticks = 0, pulses = 0, n = 0;
    while (pulses == 0 && n < 500) begin
      @(posedge clk); #1;
      if (tick) ticks++;
      if (done_sig) pulses++;
      n++;
    end
    check(ticks == TRAVEL, $sformatf("%s took %0d ticks", name, ticks));
    @(posedge clk); #1;
    check(!done_sig, $sformatf("%s pulse is one clock", name));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(state_o == 2'd0, "Open at reset");
    pulse(open_req);
    repeat (4 * TICK) @(posedge clk); #1;
    check(state_o == 2'd0 && !raised, "open request ignored while Open");
    // align to just after a tick so the count is exact
    @(posedge tick); @(negedge clk);
    close_req = 1; @(negedge clk); close_req = 0;
    check(state_o == 2'd1, "Closing");
    fork
      travel(lowered, "closing");
      begin
        @(negedge clk) open_req = 1;     // ignored while Closing
        @(negedge clk) open_req = 0;
      end
    join
    check(state_o == 2'd2, "Closed");
    @(posedge tick); @(negedge clk);
    open_req = 1; @(negedge clk); open_req = 0;
    check(state_o == 2'd3, "Opening");
    travel(raised, "opening");
    check(state_o == 2'd0, "Open again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gate_seq_fsm - the RF-triggered gate sequencer with a behavioural gate
// (closed / open BAR clocks after the command changes). A transmission with a
// code other than the arrival code must not move the gate; the arrival code
// must close it, then red and buzzer on, then wait for departure, open, green.
module tb_gate_seq_fsm;
  localparam int BAR = 12;
  logic clk = 0, rst_n = 0, ri = 0, depart = 0;
  logic [3:0] rf_data = 0;
  logic gate_closed, gate_open, gate_lower, red, green, buzzer;
  logic [3:0] state_o;
  int checks = 0, failures = 0;
  int pos = 0;

  gate_seq_fsm #(.ARRIVAL_CODE(4'b0001)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (!rst_n) pos <= 0;
    else if (gate_lower && pos < BAR) pos <= pos + 1;
    else if (!gate_lower && pos > 0) pos <= pos - 1;
  end
  assign gate_closed = (pos == BAR);
  assign gate_open   = (pos == 0);

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

  task automatic transmit(logic [3:0] code);
    @(negedge clk) begin rf_data = code; ri = 1; end
    repeat (4) @(negedge clk);
    ri = 0;
  endtask

  initial begin
    int n;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    check(green && !red && !buzzer && gate_open, "idle: green, gate open");
    transmit(4'b0100);
    repeat (10) @(negedge clk);
    check(!gate_lower && gate_open && green, "other code ignored");
    transmit(4'b0001);
    n = 0;
    while (!gate_closed && n < 100) begin @(negedge clk); n++; end
    check(gate_closed && !green, "gate closed on arrival code");
    repeat (3) @(negedge clk);
    check(red && buzzer, "red and buzzer after closing");
    repeat (20) @(negedge clk);
    check(gate_closed && red, "waits for departure");
    @(negedge clk) depart = 1;
    @(negedge clk) depart = 0;
    n = 0;
    while (!gate_open && n < 100) begin @(negedge clk); n++; end
    check(gate_open, "gate opened after departure");
    check(red, "red held while opening");
    repeat (3) @(negedge clk);
    check(green && !red && !buzzer, "green, buzzer off");
    check(state_o == 4'd0, "back to waiting for RI");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

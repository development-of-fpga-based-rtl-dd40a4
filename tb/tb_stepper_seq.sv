// tb_stepper_seq - checks the full-step and half-step coil tables, both
// directions, and that disable de-energises the coils. Expected rows are the
// full-step table (one winding at a time, D0 first) and the half-step table
// (D0, D0+D1, D1, D1+D2, D2, D2+D3, D3, D3+D0).
module tb_stepper_seq;
  logic clk = 0, rst_n = 0, enable = 0, step = 0, dir = 0;
  logic [3:0] coil_f, coil_h;
  int checks = 0, failures = 0;

  // rows as {D3,D2,D1,D0}
  localparam logic [3:0] FULL [4] = '{4'b0001, 4'b0010, 4'b0100, 4'b1000};
  localparam logic [3:0] HALF [8] = '{4'b0001, 4'b0011, 4'b0010, 4'b0110,
                                      4'b0100, 4'b1100, 4'b1000, 4'b1001};

  stepper_seq #(.HALF_STEP(1'b0)) u_full (.clk, .rst_n, .enable, .step, .dir, .coil(coil_f));
  stepper_seq #(.HALF_STEP(1'b1)) u_half (.clk, .rst_n, .enable, .step, .dir, .coil(coil_h));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_step();
    @(negedge clk) step = 1;
    @(negedge clk) step = 0;
    @(negedge clk);
  endtask

  initial begin
    int fi, hi;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(coil_f == 0 && coil_h == 0, "coils off while disabled");
    enable = 1;
    @(negedge clk); @(negedge clk);
    fi = 0; hi = 0;
    check(coil_f == FULL[0] && coil_h == HALF[0], "first row after enable");
    // forward 20 steps
    for (int s = 0; s < 20; s++) begin
      do_step();
      fi = (fi + 1) % 4; hi = (hi + 1) % 8;
      check(coil_f == FULL[fi], $sformatf("full fwd row %0d got %b", fi, coil_f));
      check(coil_h == HALF[hi], $sformatf("half fwd row %0d got %b", hi, coil_h));
    end
    // reverse 20 steps
    dir = 1;
    for (int s = 0; s < 20; s++) begin
      do_step();
      fi = (fi + 3) % 4; hi = (hi + 7) % 8;
      check(coil_f == FULL[fi], $sformatf("full rev row %0d got %b", fi, coil_f));
      check(coil_h == HALF[hi], $sformatf("half rev row %0d got %b", hi, coil_h));
    end
    // full step: exactly one winding on
    check($countones(coil_f) == 1, "full step energises one winding");
    enable = 0;
    @(negedge clk); @(negedge clk);
    check(coil_f == 0 && coil_h == 0, "coils off after disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_approach_buffer - random increments/decrements against a reference
// count per (track, direction) cell; checks every count, all_zero, the
// saturation at zero and at the top, the overflow flag, and flush.
module tb_approach_buffer;
  localparam int N = 3, W = 3;
  logic clk = 0, rst_n = 0, flush = 0;
  logic [N-1:0][1:0] inc = '0, dec = '0;
  logic [N-1:0][1:0][W-1:0] count;
  logic all_zero, overflow;
  int checks = 0, failures = 0;
  int ref_cnt [N][2];
  bit ref_ovf;

  approach_buffer #(.N_TRACKS(N), .CNT_W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    bit z = 1;
    for (int t = 0; t < N; t++)
      for (int d = 0; d < 2; d++) begin
        check(count[t][d] == W'(ref_cnt[t][d]), $sformatf("cell %0d/%0d = %0d, want %0d", t, d, count[t][d], ref_cnt[t][d]));
        if (ref_cnt[t][d] != 0) z = 0;
      end
    check(all_zero == z, "all_zero");
    check(overflow == ref_ovf, "overflow");
  endtask

  initial begin
    foreach (ref_cnt[t, d]) ref_cnt[t][d] = 0;
    ref_ovf = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    compare();
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      flush = ($urandom_range(0, 60) == 0);
      for (int t = 0; t < N; t++)
        for (int d = 0; d < 2; d++) begin
          // bias towards increments in the first half to reach saturation
          inc[t][d] = ($urandom_range(0, 9) < (it < 200 ? 5 : 2));
          dec[t][d] = ($urandom_range(0, 9) < (it < 200 ? 2 : 5));
        end
      @(posedge clk);
      if (flush) begin
        foreach (ref_cnt[t, d]) ref_cnt[t][d] = 0;
      end else begin
        foreach (ref_cnt[t, d]) begin
          if (inc[t][d] && !dec[t][d]) begin
            if (ref_cnt[t][d] == (1 << W) - 1) ref_ovf = 1;
            else ref_cnt[t][d]++;
          end else if (dec[t][d] && !inc[t][d] && ref_cnt[t][d] > 0) begin
            ref_cnt[t][d]--;
          end
        end
      end
      #1;
      compare();
    end
    check(ref_ovf, "saturation was reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

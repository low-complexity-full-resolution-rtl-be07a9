// tb_time_align: checks loop-delay measurement and ramp pairing. For several
// delays D, a stream of below-threshold samples is followed, D clocks after
// arm, by the ramp echo (first sample above the threshold); the measured delay
// must be D and the j-th valid echo sample must be paired with ramp amplitude
// 4095-j (invalid clocks skipped), with `done` on the last of 4096 pairs.
// A run with no echo must raise `timeout` after MAX_DELAY+1 clocks.
module tb_time_align;
  localparam int unsigned AM_W = 12, PH_W = 12, LEN = 4096, MAX_DELAY = 255;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;
  logic arm = 1'b0, in_valid = 1'b0;
  logic [AM_W-1:0] thr = 12'd2048, in_mag = '0;
  logic [PH_W-1:0] in_phase = '0;
  logic locked, out_valid, done, timeout;
  logic [7:0] delay;
  logic [AM_W-1:0] out_ref, out_mag;
  logic [PH_W-1:0] out_phase;

  time_align dut (.clk, .rst_n, .arm, .thr, .in_valid, .in_mag, .in_phase,
                  .locked, .delay, .out_valid, .out_ref, .out_mag, .out_phase, .done, .timeout);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pairs produced, checked on the clock after each accepted sample
  int exp_mag[$], exp_ph[$];
  int npairs, ndone;
  always @(posedge clk) begin
    if (out_valid) begin
      check(exp_mag.size() > 0, "unexpected pair");
      if (exp_mag.size() > 0) begin
        int m, p;
        m = exp_mag.pop_front();
        p = exp_ph.pop_front();
        check(out_ref == AM_W'(LEN - 1 - npairs) && out_mag == AM_W'(m) && out_phase == PH_W'(p),
              $sformatf("pair %0d: ref %0d mag %0d", npairs, out_ref, out_mag));
      end
      npairs++;
    end
    if (done) begin
      ndone++;
      check(npairs == LEN && out_valid, "done with the last pair");
    end
  end

  task automatic run(int d, bit echo);
    npairs = 0; ndone = 0;
    @(negedge clk) arm <= 1'b1;
    @(negedge clk) arm <= 1'b0;
    // cnt = 0 on this clock; sample presented at count d is the echo
    for (int c = 0; c < d; c++) begin
      in_valid <= 1'($urandom_range(1));
      in_mag   <= AM_W'($urandom_range(2047));
      @(negedge clk);
    end
    if (!echo) begin
      for (int c = d; c < MAX_DELAY + 3; c++) begin
        in_valid <= 1'b1; in_mag <= AM_W'($urandom_range(2047));
        @(negedge clk);
        if (c < MAX_DELAY) check(!timeout, "no early timeout");
      end
      in_valid <= 1'b0;
      check(timeout && !locked, "timeout without echo");
      return;
    end
    for (int j = 0; j < LEN; ) begin
      bit v;
      int m, p;
      v = (j == 0) || ($urandom_range(7) != 0);
      m = (j == 0) ? 2048 + $urandom_range(2047) : $urandom_range(4095);
      p = $urandom_range(4095);
      in_valid <= v; in_mag <= AM_W'(m); in_phase <= PH_W'(p);
      if (v) begin exp_mag.push_back(m); exp_ph.push_back(p); j++; end
      @(negedge clk);
      if (j == 1 && v) check(locked && delay == 8'(d), $sformatf("delay %0d expected %0d", delay, d));
    end
    in_valid <= 1'b0;
    repeat (4) @(negedge clk);
    check(npairs == LEN && ndone == 1, $sformatf("%0d pairs, %0d done", npairs, ndone));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(28, 1'b1);
    run(0, 1'b1);
    run(200, 1'b1);
    run(5, 1'b0);
    run(3, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

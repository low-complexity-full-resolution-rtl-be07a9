// tb_ramp_gen: checks the training ramp: after start, 4096 samples on
// consecutive clocks descending from 4095 to 0 with the programmed phase,
// `done` one clock after the last sample, amplitude 0 outside the ramp, a
// restart, and that `stop` aborts a running ramp.
module tb_ramp_gen;
  localparam int unsigned AM_W = 12, PH_W = 12, LEN = 4096;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;
  logic start = 1'b0, stop = 1'b0;
  logic [PH_W-1:0] ramp_phase = 12'd1234;
  logic active, done;
  logic [AM_W-1:0] amp;
  logic [PH_W-1:0] phase;

  ramp_gen dut (.clk, .rst_n, .start, .stop, .ramp_phase, .active, .amp, .phase, .done);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_ramp(int abort_at);
    @(negedge clk) start <= 1'b1;
    @(negedge clk) start <= 1'b0;
    for (int k = 0; k < LEN; k++) begin
      if (k == abort_at) begin
        stop <= 1'b1;
        @(negedge clk) stop <= 1'b0;
        check(!active && amp == 0, "stop aborts the ramp");
        return;
      end
      check(active && amp == AM_W'(LEN - 1 - k) && phase == ramp_phase && !done,
            $sformatf("sample %0d amp %0d", k, amp));
      @(negedge clk);
    end
    check(!active && amp == 0 && done, "done after the last sample");
    @(negedge clk);
    check(!done && amp == 0, "done is one clock");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!active && amp == 0 && !done, "idle after reset");
    run_ramp(-1);
    repeat (10) begin
      @(negedge clk);
      check(!active && amp == 0, "idle between ramps");
    end
    ramp_phase = 12'd4000;
    run_ramp(-1);
    run_ramp(1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

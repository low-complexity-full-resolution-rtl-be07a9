// tb_train_ctrl: checks the training sequencer with scripted responses:
// IDLE -> CLEAR (one clock: lut_clear and ramp_start) -> WRITE (MODE_TRAIN,
// rx_sel) -> INTERP (ip_start pulse, MODE_INTERP) -> DONE (trained,
// MODE_OPERATE), the train_cycles count, the two failure paths (ta_timeout
// in WRITE, ip_empty at the end of INTERP), and a restart from FAIL and DONE.
module tb_train_ctrl;
  import dpd_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;
  logic start = 1'b0, ta_done = 1'b0, ta_timeout = 1'b0, ip_done = 1'b0, ip_empty = 1'b0;
  train_state_e state;
  lut_mode_e mode;
  logic lut_clear, ramp_start, ip_start, rx_sel, trained, failed;
  logic [15:0] train_cycles;

  train_ctrl dut (.clk, .rst_n, .start, .ta_done, .ta_timeout, .ip_done, .ip_empty,
                  .state, .mode, .lut_clear, .ramp_start, .ip_start, .rx_sel,
                  .trained, .failed, .train_cycles);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one training: WRITE lasts w clocks, INTERP i clocks; fail_at: 0 none, 1 timeout, 2 empty
  task automatic train(int w, int i, int fail_at);
    @(negedge clk) start <= 1'b1;
    @(negedge clk) start <= 1'b0;
    check(state == TS_CLEAR && lut_clear && ramp_start && mode == MODE_OPERATE && !trained,
          "CLEAR: one clock of clear and ramp start");
    @(negedge clk);
    for (int k = 0; k < w; k++) begin
      check(state == TS_WRITE && mode == MODE_TRAIN && rx_sel && !lut_clear && !ramp_start,
            $sformatf("WRITE clock %0d", k));
      if (k == w - 1) begin
        if (fail_at == 1) ta_timeout <= 1'b1; else ta_done <= 1'b1;
      end
      @(negedge clk);
    end
    ta_done <= 1'b0;
    ta_timeout <= 1'b0;
    if (fail_at == 1) begin
      check(state == TS_FAIL && failed && !trained && mode == MODE_OPERATE, "FAIL after timeout");
      return;
    end
    check(state == TS_INTERP && mode == MODE_INTERP && ip_start && !rx_sel, "INTERP entry with ip_start");
    for (int k = 0; k < i; k++) begin
      if (k > 0) check(state == TS_INTERP && !ip_start, "INTERP, ip_start one clock");
      if (k == i - 1) begin ip_done <= 1'b1; ip_empty <= (fail_at == 2); end
      @(negedge clk);
    end
    ip_done <= 1'b0;
    ip_empty <= 1'b0;
    if (fail_at == 2) begin
      check(state == TS_FAIL && failed && !trained, "FAIL after empty table");
      return;
    end
    check(state == TS_DONE && trained && mode == MODE_OPERATE && !failed, "DONE");
    check(int'(train_cycles) == 1 + w + i, $sformatf("train_cycles %0d expected %0d", train_cycles, 1 + w + i));
    repeat (5) @(negedge clk);
    check(int'(train_cycles) == 1 + w + i, "train_cycles holds");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(state == TS_IDLE && mode == MODE_OPERATE && !trained && !failed, "IDLE after reset");
    train(50, 40, 0);
    train(30, 10, 1);
    train(20, 5, 2);
    train(4124, 4100, 0);
    train(1, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

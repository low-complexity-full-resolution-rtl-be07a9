// tb_mirror_dpd_top: end-to-end test of the predistorter with a behavioural
// polar PA and receiver loop-back, at the default sizes (4096-entry tables,
// 18-stage CORDIC).
//
// Sequence: (1) training with the receiver disconnected must time out and
// leave the predistorter untrained (bypass); (2) a real training: the loop
// delay must equal model delay + CORDIC latency + 1, the training time must
// be loop delay + 2*4096 clocks plus at most 12 clocks of sequencing, and
// the AM-AM table gaps must have been interpolated; (3) operation: random
// I/Q samples go through the predistorter and the PA model, and the PA output
// must be linear (amplitude * loop gain == input magnitude within tolerance)
// and free of AM-PM (output phase == input phase within tolerance), with the
// fixed latency; (4) bypass (dpd_en = 0): output equals the plain polar
// conversion and the PA output is visibly distorted.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_mirror_dpd_top;
  import dpd_pkg::*;
  import pa_model_pkg::*;

  localparam int unsigned N     = N_ENTRIES_DEF;
  localparam int unsigned AM_W  = AM_W_DEF;
  localparam int unsigned PH_W  = PH_W_DEF;
  localparam int unsigned IQ_W  = IQ_W_DEF;
  localparam int unsigned DELAY = 7;
  localparam int unsigned LAT   = cordic_latency(STAGES_DEF) + 3;
  localparam int unsigned NOPS  = 3000;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;   // 100 MHz

  logic                   train_start = 1'b0;
  logic                   dpd_en = 1'b1;
  logic [GAIN_W-1:0]      gain;
  logic [AM_W-1:0]        det_thr;
  logic [PH_W-1:0]        ramp_phase;
  logic                   tx_valid = 1'b0;
  logic signed [IQ_W-1:0] tx_i = '0, tx_q = '0;
  logic                   rx_valid, m_rx_valid, rx_connect;
  logic signed [IQ_W-1:0] rx_i, rx_q;
  logic                   pa_valid;
  logic [AM_W-1:0]        pa_amp;
  logic [PH_W-1:0]        pa_phase;
  train_state_e           train_state;
  logic                   trained, train_failed, delay_locked;
  logic [7:0]             loop_delay;
  logic [15:0]            train_cycles;
  logic [AM_W:0]          interp_gaps, interp_fills;

  mirror_dpd_top dut (
    .clk, .rst_n, .train_start, .dpd_en, .gain, .det_thr, .ramp_phase,
    .tx_valid, .tx_i, .tx_q, .rx_valid, .rx_i, .rx_q,
    .pa_valid, .pa_amp, .pa_phase,
    .train_state, .trained, .train_failed, .delay_locked, .loop_delay,
    .train_cycles, .interp_gaps, .interp_fills
  );

  pa_loop_model #(.AM_W(AM_W), .PH_W(PH_W), .IQ_W(IQ_W), .DELAY(DELAY)) u_pa (
    .clk, .in_valid(pa_valid), .in_amp(pa_amp), .in_phase(pa_phase),
    .rx_valid(m_rx_valid), .rx_i, .rx_q
  );
  assign rx_valid = m_rx_valid && rx_connect;

  int checks = 0, failures = 0;
  int n_timeout = 0, n_lock = 0, n_gapfill = 0, n_operate = 0, n_bypass = 0, n_train = 0;
  real gain_r;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_train();
    @(posedge clk) train_start <= 1'b1;
    @(posedge clk) train_start <= 1'b0;
    @(posedge clk);
    wait (train_state == TS_DONE || train_state == TS_FAIL);
    @(posedge clk);
  endtask

  // Operation run: send n samples, check each PA output against the model.
  task automatic run_ops(int n, bit en);
    int sent = 0, got = 0, cyc = 0;
    int sent_cyc[$];
    int mags[$];
    real phs[$];
    real max_aerr = 0.0, max_perr = 0.0, max_bend = 0.0;
    dpd_en <= en;
    repeat (2) @(posedge clk);
    while (got < n) begin
      @(posedge clk);
      cyc++;
      // outputs of the previous clock
      if (pa_valid) begin
        real y, phi_out, m, aerr, perr;
        m       = real'(mags.pop_front());
        y       = pa_amp_f(real'(pa_amp));
        phi_out = 2.0 * PI * real'(pa_phase) / real'(2**PH_W) + pa_phase_f(real'(pa_amp));
        perr    = phi_out - phs.pop_front();
        while (perr >  PI) perr -= 2.0 * PI;
        while (perr < -PI) perr += 2.0 * PI;
        check(cyc - sent_cyc.pop_front() == LAT, "operation latency");
        if (en) begin
          aerr = y * gain_r - m;
          check((aerr < 0 ? -aerr : aerr) <= 3.0 + 0.004 * m, $sformatf("linearised amplitude m=%0.0f got %0.1f", m, y * gain_r));
          check((perr < 0 ? -perr : perr) <= 0.012, $sformatf("linearised phase m=%0.0f err %f", m, perr));
          if ((aerr < 0 ? -aerr : aerr) > max_aerr) max_aerr = (aerr < 0 ? -aerr : aerr);
          if ((perr < 0 ? -perr : perr) > max_perr) max_perr = (perr < 0 ? -perr : perr);
          n_operate++;
        end else begin
          check((real'(pa_amp) - m) <= 1.0 && (m - real'(pa_amp)) <= 1.0, "bypass amplitude");
          if ((m - y * gain_r) > max_bend) max_bend = m - y * gain_r;
          if ((y * gain_r - m) > max_bend) max_bend = y * gain_r - m;
          n_bypass++;
        end
        got++;
      end
      if (sent < n) begin
        real r, th;
        int ii, qq;
        r  = real'($urandom_range(3900, 20));
        th = 2.0 * PI * real'($urandom_range(65535)) / 65536.0;
        ii = $rtoi($floor(r * $cos(th) + 0.5));
        qq = $rtoi($floor(r * $sin(th) + 0.5));
        tx_valid <= 1'b1;
        tx_i <= IQ_W'(ii);
        tx_q <= IQ_W'(qq);
        // reference polar form of what was sent
        mags.push_back($rtoi($floor($sqrt(real'(ii * ii + qq * qq)) + 0.5)));
        phs.push_back($atan2(real'(qq), real'(ii)));
        sent_cyc.push_back(cyc + 1);
        sent++;
      end else begin
        tx_valid <= 1'b0;
      end
    end
    tx_valid <= 1'b0;
    if (en) $display("operation: max amplitude error %0.2f codes, max phase error %0.4f rad", max_aerr, max_perr);
    else begin
      $display("bypass: PA amplitude error up to %0.1f codes", max_bend);
      check(max_bend > 200.0, "PA is nonlinear without predistortion");
    end
  endtask

  initial begin
    gain_r     = 4095.0 / pa_amp_f(4095.0);
    gain       = GAIN_W'($rtoi($floor(gain_r * 16384.0)));
    gain_r     = real'(gain) / 16384.0;
    det_thr    = AM_W'(2048);
    ramp_phase = PH_W'(0);
    rx_connect = 1'b0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);

    // (1) no loop-back: must time out
    do_train();
    check(train_state == TS_FAIL && train_failed && !trained, "training without loop-back fails");
    if (train_failed) n_timeout++;

    // (2) real training, after the loop has drained
    repeat (300) @(posedge clk);
    rx_connect = 1'b1;
    do_train();
    check(train_state == TS_DONE && trained, "training completes");
    if (trained) n_train++;
    check(delay_locked, "time alignment locked");
    if (delay_locked) n_lock++;
    check(int'(loop_delay) == int'(DELAY + cordic_latency(STAGES_DEF) + 1),
          $sformatf("loop delay %0d", loop_delay));
    check(interp_gaps > 0 && interp_fills > 0, "AM-AM table gaps interpolated");
    if (interp_fills > 0) n_gapfill++;
    check(int'(train_cycles) >= int'(loop_delay) + 2 * N &&
          int'(train_cycles) <= int'(loop_delay) + 2 * N + 12,
          $sformatf("training time %0d cycles", train_cycles));
    $display("training: loop delay %0d, %0d cycles (%0.2f us at 100 MHz), %0d gaps, %0d entries interpolated",
             loop_delay, train_cycles, real'(train_cycles) / 100.0, interp_gaps, interp_fills);

    // (3) operation with predistortion
    run_ops(NOPS, 1'b1);
    // (4) bypass
    run_ops(500, 1'b0);

    check(n_timeout > 0, "mechanism: timeout");
    check(n_train > 0,   "mechanism: training");
    check(n_lock > 0,    "mechanism: delay lock");
    check(n_gapfill > 0, "mechanism: gap interpolation");
    check(n_operate > 0, "mechanism: predistorted operation");
    check(n_bypass > 0,  "mechanism: bypass");
    $display("mechanisms: timeout=%0d train=%0d lock=%0d gapfill=%0d operate=%0d bypass=%0d",
             n_timeout, n_train, n_lock, n_gapfill, n_operate, n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_ofdm_workload: runs a 20 MHz-bandwidth 64-QAM OFDM signal through the
// trained predistorter and the behavioural PA, at 100 MS/s (one sample per
// clock at 100 MHz), and measures EVM and ACLR with and without predistortion.
//
// Signal: 52 occupied subcarriers (k = -26..26 without 0) with 312.5 kHz
// spacing, i.e. a 320-point inverse DFT at 100 MS/s (16.6 MHz occupied in a
// 20 MHz channel); random 64-QAM symbols; scaled to an RMS magnitude of
// RMS_AMP and clipped at 4000 codes. Each 320-sample block is one OFDM symbol
// (no cyclic prefix: the PA model is memoryless, so each block stays periodic).
// The loop-back path rotates the phase by 0.7 rad to show that training is
// insensitive to it.
// Measurement, per symbol, from a 320-point DFT of the PA output:
//   EVM  = rms(Y_k - g*X_k) / rms(g*X_k) over the data subcarriers, with g the
//          least-squares complex gain over the whole run;
//   ACLR = power in the channel (|k| <= 26) / power in the worse adjacent
//          channel (same width, 20 MHz away: |k| in 38..90).
// Checks: with predistortion EVM < 2 % and ACLR > 40 dB; without it EVM and
// ACLR at least 5x and 10 dB worse; training completes.
module tb_ofdm_workload;
  import dpd_pkg::*;
  import pa_model_pkg::*;

  localparam int unsigned AM_W = AM_W_DEF, PH_W = PH_W_DEF, IQ_W = IQ_W_DEF;
  localparam int NFFT = 320, NSC = 26, NSYM = 12;
  localparam real RMS_AMP = 1100.0;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;

  logic                   train_start = 1'b0, dpd_en = 1'b1;
  logic [GAIN_W-1:0]      gain;
  logic [AM_W-1:0]        det_thr = 12'd2048;
  logic [PH_W-1:0]        ramp_phase = '0;
  logic                   tx_valid = 1'b0;
  logic signed [IQ_W-1:0] tx_i = '0, tx_q = '0;
  logic                   rx_valid;
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

  pa_loop_model #(.AM_W(AM_W), .PH_W(PH_W), .IQ_W(IQ_W), .DELAY(9), .LOOP_ROT(0.7)) u_pa (
    .clk, .in_valid(pa_valid), .in_amp(pa_amp), .in_phase(pa_phase),
    .rx_valid, .rx_i, .rx_q
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real cos_t [NFFT], sin_t [NFFT];
  real xk_re [NSYM][-NSC:NSC], xk_im [NSYM][-NSC:NSC];
  int  tx_iv [NSYM*NFFT], tx_qv [NSYM*NFFT];
  real y_re [NSYM*NFFT], y_im [NSYM*NFFT];

  function automatic real qam_level(int v);   // 0..7 -> -7..7 odd
    return real'(2 * v - 7);
  endfunction

  task automatic make_signal();
    real s_re [NSYM*NFFT], s_im [NSYM*NFFT];
    real p = 0.0, scale;
    for (int m = 0; m < NFFT; m++) begin
      cos_t[m] = $cos(2.0 * PI * real'(m) / real'(NFFT));
      sin_t[m] = $sin(2.0 * PI * real'(m) / real'(NFFT));
    end
    for (int s = 0; s < NSYM; s++) begin
      for (int k = -NSC; k <= NSC; k++) begin
        xk_re[s][k] = (k == 0) ? 0.0 : qam_level($urandom_range(7));
        xk_im[s][k] = (k == 0) ? 0.0 : qam_level($urandom_range(7));
      end
      for (int n = 0; n < NFFT; n++) begin
        real re = 0.0, im = 0.0;
        for (int k = -NSC; k <= NSC; k++) begin
          int m;
          m = ((k * n) % NFFT + NFFT) % NFFT;
          re += xk_re[s][k] * cos_t[m] - xk_im[s][k] * sin_t[m];
          im += xk_re[s][k] * sin_t[m] + xk_im[s][k] * cos_t[m];
        end
        s_re[s*NFFT+n] = re;
        s_im[s*NFFT+n] = im;
        p += re * re + im * im;
      end
    end
    scale = RMS_AMP / $sqrt(p / real'(NSYM * NFFT));
    foreach (tx_iv[n]) begin
      real re, im, mag;
      re = s_re[n] * scale;
      im = s_im[n] * scale;
      mag = $sqrt(re * re + im * im);
      if (mag > 4000.0) begin re = re * 4000.0 / mag; im = im * 4000.0 / mag; end
      tx_iv[n] = $rtoi($floor(re + 0.5));
      tx_qv[n] = $rtoi($floor(im + 0.5));
    end
  endtask

  // stream the signal, collect the PA output (complex, from the PA curves)
  task automatic run_signal(bit en);
    int sent = 0, got = 0;
    dpd_en <= en;
    repeat (2) @(posedge clk);
    while (got < NSYM * NFFT) begin
      @(posedge clk);
      if (pa_valid) begin
        real a, ph;
        a  = pa_amp_f(real'(pa_amp));
        ph = 2.0 * PI * real'(pa_phase) / real'(2**PH_W) + pa_phase_f(real'(pa_amp));
        y_re[got] = a * $cos(ph);
        y_im[got] = a * $sin(ph);
        got++;
      end
      if (sent < NSYM * NFFT) begin
        tx_valid <= 1'b1;
        tx_i <= IQ_W'(tx_iv[sent]);
        tx_q <= IQ_W'(tx_qv[sent]);
        sent++;
      end else tx_valid <= 1'b0;
    end
    tx_valid <= 1'b0;
  endtask

  // EVM (percent) and ACLR (dB) of the collected output
  task automatic measure(output real evm_pct, output real aclr_db);
    real yk_re [NSYM][NFFT], yk_im [NSYM][NFFT];
    real num_re = 0.0, num_im = 0.0, den = 0.0, g_re, g_im, e = 0.0, r = 0.0;
    real p_main = 0.0, p_up = 0.0, p_lo = 0.0;
    for (int s = 0; s < NSYM; s++)
      for (int k = 0; k < NFFT; k++) begin
        real re = 0.0, im = 0.0;
        for (int n = 0; n < NFFT; n++) begin
          int m;
          m = (k * n) % NFFT;
          // forward DFT: multiply by exp(-j 2 pi k n / N)
          re += y_re[s*NFFT+n] * cos_t[m] + y_im[s*NFFT+n] * sin_t[m];
          im += y_im[s*NFFT+n] * cos_t[m] - y_re[s*NFFT+n] * sin_t[m];
        end
        yk_re[s][k] = re;
        yk_im[s][k] = im;
      end
    for (int s = 0; s < NSYM; s++)
      for (int k = -NSC; k <= NSC; k++) if (k != 0) begin
        int b;
        b = (k + NFFT) % NFFT;
        num_re += yk_re[s][b] * xk_re[s][k] + yk_im[s][b] * xk_im[s][k];
        num_im += yk_im[s][b] * xk_re[s][k] - yk_re[s][b] * xk_im[s][k];
        den    += xk_re[s][k] * xk_re[s][k] + xk_im[s][k] * xk_im[s][k];
      end
    g_re = num_re / den;
    g_im = num_im / den;
    for (int s = 0; s < NSYM; s++) begin
      for (int k = -NSC; k <= NSC; k++) if (k != 0) begin
        int b;
        real rr, ri, dr, di;
        b  = (k + NFFT) % NFFT;
        rr = g_re * xk_re[s][k] - g_im * xk_im[s][k];
        ri = g_re * xk_im[s][k] + g_im * xk_re[s][k];
        dr = yk_re[s][b] - rr;
        di = yk_im[s][b] - ri;
        e += dr * dr + di * di;
        r += rr * rr + ri * ri;
      end
      for (int k = -90; k <= 90; k++) begin
        int b;
        real pw;
        b  = (k + NFFT) % NFFT;
        pw = yk_re[s][b] * yk_re[s][b] + yk_im[s][b] * yk_im[s][b];
        if (k >= -NSC && k <= NSC) p_main += pw;
        else if (k >= 38)          p_up   += pw;
        else if (k <= -38)         p_lo   += pw;
      end
    end
    evm_pct = 100.0 * $sqrt(e / r);
    aclr_db = 10.0 * $log10(p_main / ((p_up > p_lo) ? p_up : p_lo));
  endtask

  initial begin
    real evm_on, aclr_on, evm_off, aclr_off;
    real gain_r;
    gain_r = 4095.0 / pa_amp_f(4095.0);
    gain   = GAIN_W'($rtoi($floor(gain_r * 16384.0)));
    make_signal();
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);
    @(posedge clk) train_start <= 1'b1;
    @(posedge clk) train_start <= 1'b0;
    @(posedge clk);
    wait (train_state == TS_DONE || train_state == TS_FAIL);
    check(trained, "training completes with a rotated loop");
    $display("training: loop delay %0d, %0d cycles (%0.2f us at 100 MHz)",
             loop_delay, train_cycles, real'(train_cycles) / 100.0);

    run_signal(1'b0);
    measure(evm_off, aclr_off);
    run_signal(1'b1);
    measure(evm_on, aclr_on);
    $display("64-QAM OFDM, 20 MHz, %0d symbols: without DPD EVM %0.2f %%, ACLR %0.2f dB; with DPD EVM %0.2f %%, ACLR %0.2f dB",
             NSYM, evm_off, aclr_off, evm_on, aclr_on);
    check(evm_on < 2.0, "EVM with predistortion below 2 %");
    check(aclr_on > 40.0, "ACLR with predistortion above 40 dB");
    check(evm_off > 5.0 * evm_on, "predistortion improves EVM at least 5x");
    check(aclr_on > aclr_off + 10.0, "predistortion improves ACLR by 10 dB or more");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

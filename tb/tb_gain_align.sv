// tb_gain_align: checks gain alignment: out = min(4095, round(mag*gain/2^14))
// with one clock latency for random amplitudes and gains (including gains
// that saturate), phase and valid delayed by one clock.
module tb_gain_align;
  import dpd_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;
  logic [GAIN_W-1:0] gain = '0;
  logic in_valid = 1'b0, out_valid;
  logic [11:0] in_mag = '0, out_mag;
  logic [11:0] in_phase = '0, out_phase;

  gain_align dut (.clk, .rst_n, .gain, .in_valid, .in_mag, .in_phase, .out_valid, .out_mag, .out_phase);

  int checks = 0, failures = 0, nsat = 0;
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

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 10000; n++) begin
      longint e;
      int m, g, p;
      bit v;
      m = $urandom_range(4095);
      g = (n % 2) ? $urandom_range(16384, 24000) : $urandom_range(65535);
      p = $urandom_range(4095);
      v = $urandom_range(1);
      @(negedge clk);
      in_mag <= 12'(m); gain <= 16'(g); in_phase <= 12'(p); in_valid <= v;
      @(negedge clk);
      e = (longint'(m) * g + 8192) / 16384;
      if (e > 4095) begin e = 4095; nsat++; end
      check(out_mag == 12'(e), $sformatf("mag %0d gain %0d -> %0d expected %0d", m, g, out_mag, e));
      check(out_phase == 12'(p) && out_valid == v, "phase/valid delayed one clock");
    end
    check(nsat > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

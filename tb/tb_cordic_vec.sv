// tb_cordic_vec: checks the vectoring CORDIC against real-number arithmetic.
// Random and corner-case I/Q samples (axes, all quadrants, zero, full scale)
// are fed with random gaps in in_valid. Magnitude must equal round(|I+jQ|)
// within 1 code (saturated at 4095) and phase must equal atan2(Q,I) scaled to
// 4096 codes per turn within 1 code; every output must appear exactly
// STAGES+2 clocks after its input.
module tb_cordic_vec;
  import dpd_pkg::*;
  localparam int unsigned IQ_W = IQ_W_DEF, AM_W = AM_W_DEF, PH_W = PH_W_DEF;
  localparam int unsigned LAT  = cordic_latency(STAGES_DEF);
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;
  logic in_valid = 1'b0;
  logic signed [IQ_W-1:0] in_i = '0, in_q = '0;
  logic out_valid;
  logic [AM_W-1:0] out_mag;
  logic [PH_W-1:0] out_phase;

  cordic_vec dut (.clk, .rst_n, .in_valid, .in_i, .in_q, .out_valid, .out_mag, .out_phase);

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

  int exp_mag[$], exp_ph[$], exp_t[$];
  bit has_ph[$];
  int cyc = 0;

  task automatic send(int i, int q);
    real m, p;
    in_valid <= 1'b1;
    in_i <= IQ_W'(i);
    in_q <= IQ_W'(q);
    m = $sqrt(real'(i * i + q * q));
    p = $atan2(real'(q), real'(i)) / (2.0 * PI) * real'(2**PH_W);
    exp_mag.push_back(m > 4095.0 ? 4095 : $rtoi($floor(m + 0.5)));
    exp_ph.push_back($rtoi($floor(p + 0.5)));
    has_ph.push_back(m >= 40.0);   // phase of tiny vectors is not checked
    exp_t.push_back(cyc + LAT);
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (out_valid) begin
      int em, ep, d, t;
      bit hp;
      em = exp_mag.pop_front();
      ep = exp_ph.pop_front();
      hp = has_ph.pop_front();
      t  = exp_t.pop_front();
      check(cyc == t, $sformatf("latency: output at %0d expected %0d", cyc, t));
      check(int'(out_mag) - em <= 1 && em - int'(out_mag) <= 1,
            $sformatf("mag %0d expected %0d", out_mag, em));
      if (hp) begin
        d = (int'(out_phase) - ep) & (2**PH_W - 1);
        check(d <= 1 || d >= 2**PH_W - 1, $sformatf("phase %0d expected %0d", out_phase, ep & (2**PH_W-1)));
      end
    end
  end

  initial begin
    static int corners[8][2] = '{'{4095, 0}, '{0, 4095}, '{-4095, 0}, '{0, -4095},
                          '{-4096, 0}, '{2000, -2000}, '{-2896, 2896}, '{0, 0}};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (corners[k]) begin
      @(negedge clk);
      send(corners[k][0], corners[k][1]);
    end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      if ($urandom_range(3) == 0) in_valid <= 1'b0;
      else begin
        int i, q;
        i = $urandom_range(8190) - 4095;
        q = $urandom_range(8190) - 4095;
        send(i, q);
      end
    end
    @(negedge clk) in_valid <= 1'b0;
    repeat (LAT + 5) @(posedge clk);
    check(exp_mag.size() == 0, "all outputs arrived");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mirror_switch: checks the LUT port switch and the operation path with
// two real 4096-entry tables attached.
//  * MODE_TRAIN: a descending ramp of pairs is written; AM[tw_mag] must get
//    tw_ref (address and data swapped) and PM[tw_ref] must get
//    tw_phase - ramp_phase.
//  * MODE_INTERP: the interpolator ports reach the AM table (writes of all
//    entries, reads back through ip_raddr), the PM table is untouched.
//  * MODE_OPERATE with dpd_en: out_amp = AM[m], out_phase = ph - PM[AM[m]],
//    exactly 3 clocks after the input; training writes are ignored.
//  * dpd_en = 0: samples pass unchanged with the same latency.
module tb_mirror_switch;
  import dpd_pkg::*;
  localparam int unsigned N = 4096;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;

  lut_mode_e mode = MODE_OPERATE;
  logic dpd_en = 1'b0;
  logic tw_valid = 1'b0;
  logic [11:0] tw_ref = '0, tw_mag = '0, tw_phase = '0, ramp_phase = 12'd300;
  logic [11:0] ip_raddr = '0, ip_waddr = '0, ip_wdata = '0;
  logic ip_we = 1'b0;
  logic op_valid = 1'b0;
  logic [11:0] op_mag = '0, op_phase = '0;
  logic am_we, pm_we, am_rflag, pm_rflag, out_valid;
  logic [11:0] am_waddr, am_wdata, am_raddr, am_rdata, pm_waddr, pm_wdata, pm_raddr, pm_rdata;
  logic [11:0] out_amp, out_phase;

  mirror_switch dut (
    .clk, .rst_n, .mode, .dpd_en, .tw_valid, .tw_ref, .tw_mag, .tw_phase, .ramp_phase,
    .ip_raddr, .ip_we, .ip_waddr, .ip_wdata, .op_valid, .op_mag, .op_phase,
    .am_we, .am_waddr, .am_wdata, .am_raddr, .am_rdata,
    .pm_we, .pm_waddr, .pm_wdata, .pm_raddr, .pm_rdata,
    .out_valid, .out_amp, .out_phase);
  dpd_lut #(.DEPTH(N), .DW(12), .HAS_FLAG(1'b1)) u_am (
    .clk, .rst_n, .clear(1'b0), .we(am_we), .waddr(am_waddr), .wdata(am_wdata),
    .raddr(am_raddr), .rdata(am_rdata), .rflag(am_rflag));
  dpd_lut #(.DEPTH(N), .DW(12), .HAS_FLAG(1'b0)) u_pm (
    .clk, .rst_n, .clear(1'b0), .we(pm_we), .waddr(pm_waddr), .wdata(pm_wdata),
    .raddr(pm_raddr), .rdata(pm_rdata), .rflag(pm_rflag));

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

  int am_ref [N], pm_ref [N];
  bit am_hit [N];

  // expected operation outputs
  int q_amp[$], q_ph[$], q_t[$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (out_valid) begin
      int ea, ep, t;
      ea = q_amp.pop_front(); ep = q_ph.pop_front(); t = q_t.pop_front();
      check(cyc == t, $sformatf("latency: at %0d expected %0d", cyc, t));
      check(out_amp == 12'(ea) && out_phase == 12'(ep),
            $sformatf("out %0d/%0d expected %0d/%0d", out_amp, out_phase, ea, ep));
    end
  end

  task automatic operate(int n, bit en);
    dpd_en <= en;
    for (int k = 0; k < n; k++) begin
      int m, p, x;
      @(negedge clk);
      m = $urandom_range(N - 1);
      p = $urandom_range(4095);
      op_valid <= 1'b1; op_mag <= 12'(m); op_phase <= 12'(p);
      // training writes must be ignored in operation
      tw_valid <= 1'b1; tw_mag <= 12'(m); tw_ref <= 12'($urandom_range(4095));
      x = en ? am_ref[m] : m;
      q_amp.push_back(x);
      q_ph.push_back(en ? (p - pm_ref[x]) & 12'hfff : p);
      q_t.push_back(cyc + 3);
    end
    @(negedge clk) op_valid <= 1'b0; tw_valid <= 1'b0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // training writes: descending ramp, received amplitude a steep-then-flat curve
    @(negedge clk) mode <= MODE_TRAIN;
    for (int j = 0; j < N; j++) begin
      int x, y, p;
      x = N - 1 - j;
      y = (x < 2048) ? x * 3 / 2 : 3072 + (x - 2048) / 2;
      p = $urandom_range(4095);
      tw_valid <= 1'b1; tw_ref <= 12'(x); tw_mag <= 12'(y); tw_phase <= 12'(p);
      am_ref[y] = x; am_hit[y] = 1'b1;
      pm_ref[x] = (p - 300) & 12'hfff;
      @(negedge clk);
    end
    tw_valid <= 1'b0;

    // interpolator ports: read back the trained AM entries, then fill every entry
    mode <= MODE_INTERP;
    for (int a = 0; a < N; a++) begin
      ip_raddr <= 12'(a);
      @(negedge clk);
      if (am_hit[a]) check(am_rdata == 12'(am_ref[a]) && am_rflag, $sformatf("AM[%0d] after training", a));
    end
    for (int a = 0; a < N; a++) begin
      int v;
      v = $urandom_range(4095);
      ip_we <= 1'b1; ip_waddr <= 12'(a); ip_wdata <= 12'(v);
      am_ref[a] = v;
      @(negedge clk);
    end
    ip_we <= 1'b0;

    // operation and bypass
    mode <= MODE_OPERATE;
    operate(3000, 1'b1);
    operate(500, 1'b0);
    operate(500, 1'b1);
    check(q_amp.size() == 0, "all outputs arrived");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

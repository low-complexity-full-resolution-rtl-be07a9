// tb_lut_interp: checks the gap interpolation on a 4096-entry table.
// Each scenario writes a chosen set of entries through the table's write
// port, runs the interpolator and compares every entry with a reference
// computed here: written entries unchanged; an entry between written
// neighbours (a0,v0),(a1,v1) equal to v0 +/- floor((k*|v1-v0| + (a1-a0)/2)/(a1-a0));
// entries outside the written range equal to the nearest written value.
// Scenarios: sparse (filler keeps up: done within DEPTH+3+last gap clocks),
// dense gaps with rising and falling values (scanner waits), leading and
// trailing gaps, one single entry, and an empty table (`empty` set).
// Gap and fill counts are checked too.
module tb_lut_interp;
  localparam int unsigned DEPTH = 4096, DW = 12, AW = 12;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;

  logic start = 1'b0;
  logic clear = 1'b0;
  logic tb_we = 1'b0;
  logic [AW-1:0] tb_waddr = '0;
  logic [DW-1:0] tb_wdata = '0;
  logic [AW-1:0] tb_raddr = '0;
  logic [AW-1:0] raddr, ip_raddr, ip_waddr, waddr;
  logic [DW-1:0] rdata, ip_wdata, wdata;
  logic rflag, ip_we, we, busy, done, empty;
  logic [AW:0] fills, gaps;

  assign we    = busy ? ip_we : tb_we;
  assign waddr = busy ? ip_waddr : tb_waddr;
  assign wdata = busy ? ip_wdata : tb_wdata;
  assign raddr = busy ? ip_raddr : tb_raddr;

  dpd_lut #(.DEPTH(DEPTH), .DW(DW)) u_lut (
    .clk, .rst_n, .clear, .we, .waddr, .wdata, .raddr, .rdata, .rflag);
  lut_interp #(.DEPTH(DEPTH), .DW(DW)) dut (
    .clk, .rst_n, .start, .raddr(ip_raddr), .rdata, .rflag,
    .we(ip_we), .waddr(ip_waddr), .wdata(ip_wdata), .busy, .done, .empty, .fills, .gaps);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit written [DEPTH];
  int last_cycles;
  int val [DEPTH];

  task automatic run(string name, int max_cycles);
    int exp [DEPTH];
    int first = -1, last = -1, prev = -1, ngaps = 0, nfills = 0, cyc = 0, last_gap = 0;
    // load the table
    @(negedge clk) clear <= 1'b1;
    @(negedge clk) clear <= 1'b0;
    for (int a = 0; a < DEPTH; a++) if (written[a]) begin
      tb_we <= 1'b1; tb_waddr <= AW'(a); tb_wdata <= DW'(val[a]);
      @(negedge clk);
    end
    tb_we <= 1'b0;
    // reference
    for (int a = 0; a < DEPTH; a++) if (written[a]) begin
      if (first < 0) first = a;
      if (prev >= 0 && a > prev + 1) begin
        int mag, da;
        bit neg;
        ngaps++; last_gap = a - prev - 1;
        neg = val[a] < val[prev];
        mag = neg ? val[prev] - val[a] : val[a] - val[prev];
        da  = a - prev;
        for (int k = 1; k < da; k++)
          exp[prev + k] = neg ? val[prev] - (k * mag + da / 2) / da : val[prev] + (k * mag + da / 2) / da;
      end
      exp[a] = val[a];
      prev = a;
      last = a;
    end
    if (first > 0) begin ngaps++; for (int a = 0; a < first; a++) exp[a] = val[first]; end
    if (last >= 0 && last < DEPTH - 1) begin
      ngaps++; last_gap = DEPTH - 1 - last;
      for (int a = last + 1; a < DEPTH; a++) exp[a] = val[last];
    end
    for (int a = 0; a < DEPTH; a++) if (!written[a]) nfills++;
    if (last < 0) begin ngaps = 0; nfills = 0; end
    // run
    start <= 1'b1;
    @(negedge clk) start <= 1'b0;
    while (!done) begin @(negedge clk); cyc++; end
    if (max_cycles > 0)
      check(cyc <= max_cycles + last_gap, $sformatf("%s: %0d cycles, limit %0d", name, cyc, max_cycles + last_gap));
    check(empty == (last < 0), $sformatf("%s: empty flag", name));
    check(int'(gaps) == ngaps && int'(fills) == nfills,
          $sformatf("%s: gaps %0d/%0d fills %0d/%0d", name, gaps, ngaps, fills, nfills));
    @(negedge clk);
    // compare the table, using the read port while the interpolator is idle
    if (last >= 0) begin
      for (int a = 0; a < DEPTH; a++) begin
        tb_raddr <= AW'(a);
        @(negedge clk);
        check(rdata == DW'(exp[a]), $sformatf("%s: entry %0d = %0d expected %0d", name, a, rdata, exp[a]));
      end
    end
    $display("%s: %0d cycles, %0d gaps, %0d fills", name, cyc, gaps, fills);
    last_cycles = cyc;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // sparse: about one entry in four missing, values rising like the mirrored PA curve
    for (int a = 0; a < DEPTH; a++) begin
      written[a] = (a == 0) || ($urandom_range(3) != 0);
      val[a] = a / 2 + $urandom_range(3);
    end
    run("sparse", DEPTH + 3);

    // dense gaps, random values up and down
    for (int a = 0; a < DEPTH; a++) begin
      written[a] = ($urandom_range(5) == 0);
      val[a] = $urandom_range(4095);
    end
    written[DEPTH-1] = 1'b1;
    run("dense", 0);
    check(last_cycles > DEPTH + 3, "dense gaps make the scanner wait for the filler");

    // leading and trailing gaps, long interior gaps
    for (int a = 0; a < DEPTH; a++) begin
      written[a] = (a >= 100 && a <= 3900 && a % 250 == 0);
      val[a] = 4095 - a;
    end
    run("lead_trail", 0);

    // a single written entry
    for (int a = 0; a < DEPTH; a++) begin written[a] = (a == 1234); val[a] = 777; end
    run("single", 0);

    // nothing written
    for (int a = 0; a < DEPTH; a++) written[a] = 1'b0;
    run("empty", DEPTH + 3);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

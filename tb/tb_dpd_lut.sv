// tb_dpd_lut: checks the LUT storage and its written flags against a
// reference array: random writes and reads (one-clock read latency, old data
// on a same-address read/write), flags set only by writes, the bulk clear
// (and that a write in the clear clock still sets its flag), and the table
// without flags (rflag always 1).
module tb_dpd_lut;
  localparam int unsigned DEPTH = 4096, DW = 12, AW = 12;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;

  logic clear = 1'b0, we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wdata = '0, rdata, rdata2;
  logic rflag, rflag2;

  dpd_lut #(.DEPTH(DEPTH), .DW(DW), .HAS_FLAG(1'b1)) dut (
    .clk, .rst_n, .clear, .we, .waddr, .wdata, .raddr, .rdata, .rflag);
  dpd_lut #(.DEPTH(DEPTH), .DW(DW), .HAS_FLAG(1'b0)) dut2 (
    .clk, .rst_n, .clear(1'b0), .we, .waddr, .wdata, .raddr, .rdata(rdata2), .rflag(rflag2));

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

  logic [DW-1:0] ref_mem [DEPTH];
  bit            ref_flag [DEPTH];
  bit            ref_known [DEPTH];

  // one clock: optional write, read of ra; checks the read one clock later
  task automatic cycle(bit w, int wa, int wd, int ra, bit clr);
    int exp_d; bit exp_f, known;
    @(negedge clk);
    we <= w; waddr <= AW'(wa); wdata <= DW'(wd); raddr <= AW'(ra); clear <= clr;
    exp_d = ref_mem[ra]; exp_f = ref_flag[ra]; known = ref_known[ra];
    @(posedge clk);
    if (clr) foreach (ref_flag[k]) ref_flag[k] = 1'b0;
    if (w) begin ref_mem[wa] = DW'(wd); ref_flag[wa] = 1'b1; ref_known[wa] = 1'b1; end
    #1;
    if (known) check(rdata == DW'(exp_d) && rdata2 == DW'(exp_d), $sformatf("read data at %0d", ra));
    check(rflag == exp_f, $sformatf("flag at %0d", ra));
    check(rflag2, "table without flags reports written");
  endtask

  initial begin
    foreach (ref_flag[k]) begin ref_flag[k] = 0; ref_known[k] = 0; ref_mem[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 6000; n++) begin
      int a;
      a = $urandom_range(DEPTH - 1);
      cycle($urandom_range(1), $urandom_range(DEPTH - 1), $urandom_range(2**DW - 1),
            ($urandom_range(3) == 0) ? a : $urandom_range(DEPTH - 1), 1'b0);
    end
    // same-address read and write: old data comes out
    cycle(1'b1, 77, 123, 77, 1'b0);
    cycle(1'b1, 77, 456, 77, 1'b0);
    cycle(1'b0, 0, 0, 77, 1'b0);
    // bulk clear together with a write
    cycle(1'b1, 5, 99, 5, 1'b1);
    for (int n = 0; n < 2000; n++)
      cycle(1'b0, 0, 0, $urandom_range(DEPTH - 1), 1'b0);
    cycle(1'b0, 0, 0, 5, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

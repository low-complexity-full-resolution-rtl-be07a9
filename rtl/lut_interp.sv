// lut_interp: fills the AM-AM table entries that the training ramp missed.
//
// After the training write, the AM-AM table holds the ramp amplitude at every
// address (received amplitude) that was hit; where the PA gain is steep some
// addresses are skipped. As in the published design, the gaps are filled once
// per training with linear interpolation (not in real time), in about one
// table length of clocks.
// How (this implementation): a scanner reads the table in address order,
// one entry per clock, through the read port and looks at each entry's
// "written" flag. When a written entry (a1,v1) follows the previous written
// entry (a0,v0) with a gap, it computes q,r = |v1-v0| divmod (a1-a0) and
// queues a gap descriptor in a small FIFO (FIFO_DEPTH). A filler, working in
// parallel through the write port, takes descriptors and writes the gap
// addresses a0+k (k = 1 .. a1-a0-1) one per clock with
//     v0 +/- floor((k*|v1-v0| + floor((a1-a0)/2)) / (a1-a0))
// (nearest-integer linear interpolation), produced by a Bresenham-style
// accumulator, so no multiplier and only one divider per gap is needed.
// Entries below the first written one take its value; entries above the last
// written one take the last value. If nothing was written, `empty` is set.
// The filler only writes addresses the scanner has passed, so the two never
// conflict; if the FIFO fills up, the scanner waits.
// Interface: start pulse; table read port (raddr -> rdata/rflag one clock
// later) and write port (we/waddr/wdata); busy, done pulse, fills/gaps
// counters. Timing: DEPTH + 3 clocks when the filler keeps up (it does while
// on average fewer than one entry in two is missing), otherwise longer by the
// scanner's waits.
module lut_interp #(
  parameter int unsigned DEPTH      = 4096,
  parameter int unsigned DW         = 12,
  parameter int unsigned FIFO_DEPTH = 8,
  localparam int unsigned AW        = $clog2(DEPTH),
  localparam int unsigned MW        = (AW > DW) ? AW : DW,   // divider width
  localparam int unsigned FW        = $clog2(FIFO_DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic [AW-1:0] raddr,
  input  logic [DW-1:0] rdata,
  input  logic          rflag,
  output logic          we,
  output logic [AW-1:0] waddr,
  output logic [DW-1:0] wdata,
  output logic          busy,
  output logic          done,
  output logic          empty,
  output logic [AW:0]   fills,
  output logic [AW:0]   gaps
);
  typedef struct packed {
    logic [AW-1:0] first;   // next address to fill
    logic [AW-1:0] last;    // last address to fill
    logic [DW-1:0] v0;      // value left of the gap
    logic          neg;     // v1 < v0
    logic [DW-1:0] q;       // |v1-v0| div (a1-a0)
    logic [AW-1:0] r;       // |v1-v0| mod (a1-a0)
    logic [AW-1:0] da;      // a1-a0
  } gap_t;

  // ---------------- scanner ----------------
  logic          scanning, scan_done;
  logic [AW:0]   ptr;
  logic          rd_v;
  logic [AW-1:0] rd_a;
  logic          have_prev;
  logic [AW-1:0] prev_a;
  logic [DW-1:0] prev_v;

  // FIFO of gap descriptors
  gap_t          fifo [FIFO_DEPTH];
  logic [FW-1:0] wp, rp;
  logic [FW:0]   count;
  logic          push, pop;
  gap_t          push_d;

  logic issue;
  assign issue = scanning && (ptr < (AW+1)'(DEPTH)) && (count <= (FW+1)'(FIFO_DEPTH - 2));
  assign raddr = ptr[AW-1:0];

  // gap found by the word arriving now
  logic          lead_gap, mid_gap, tail_gap;
  logic [DW-1:0] mag;
  logic [AW-1:0] da;
  always_comb begin
    lead_gap = scanning && rd_v && rflag && !have_prev && rd_a != '0;
    mid_gap  = scanning && rd_v && rflag && have_prev && rd_a != prev_a + 1'b1;
    tail_gap = scanning && !rd_v && ptr == (AW+1)'(DEPTH) && have_prev
               && prev_a != AW'(DEPTH - 1);
    mag      = (rdata < prev_v) ? prev_v - rdata : rdata - prev_v;
    da       = rd_a - prev_a;
    push     = lead_gap || mid_gap || tail_gap;
    push_d   = '0;
    if (lead_gap) begin
      push_d.first = '0;
      push_d.last  = rd_a - 1'b1;
      push_d.v0    = rdata;
      push_d.da    = AW'(1);
    end else if (mid_gap) begin
      push_d.first = prev_a + 1'b1;
      push_d.last  = rd_a - 1'b1;
      push_d.v0    = prev_v;
      push_d.neg   = rdata < prev_v;
      push_d.q     = DW'(MW'(mag) / MW'(da));
      push_d.r     = AW'(MW'(mag) % MW'(da));
      push_d.da    = da;
    end else begin
      push_d.first = prev_a + 1'b1;
      push_d.last  = AW'(DEPTH - 1);
      push_d.v0    = prev_v;
      push_d.da    = AW'(1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scanning  <= 1'b0;
      scan_done <= 1'b0;
      ptr       <= '0;
      rd_v      <= 1'b0;
      rd_a      <= '0;
      have_prev <= 1'b0;
      prev_a    <= '0;
      prev_v    <= '0;
      empty     <= 1'b0;
      gaps      <= '0;
    end else begin
      rd_v <= issue;
      rd_a <= ptr[AW-1:0];
      if (issue) ptr <= ptr + 1'b1;
      if (start) begin
        scanning  <= 1'b1;
        scan_done <= 1'b0;
        ptr       <= '0;
        rd_v      <= 1'b0;
        have_prev <= 1'b0;
        empty     <= 1'b0;
        gaps      <= '0;
      end else if (scanning) begin
        if (rd_v && rflag) begin
          have_prev <= 1'b1;
          prev_a    <= rd_a;
          prev_v    <= rdata;
        end
        if (push) gaps <= gaps + 1'b1;
        if (!rd_v && ptr == (AW+1)'(DEPTH)) begin
          scanning  <= 1'b0;
          scan_done <= 1'b1;
          empty     <= !have_prev;
        end
      end
    end
  end

  // ---------------- FIFO ----------------
  always_ff @(posedge clk) if (push) fifo[wp] <= push_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= (wp == FW'(FIFO_DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == FW'(FIFO_DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (FW+1)'(push) - (FW+1)'(pop);
    end
  end

  // ---------------- filler ----------------
  logic          filling;
  gap_t          g;
  logic [AW:0]   f_err;
  logic [DW-1:0] f_off;
  logic [AW:0]   err_sum;
  logic          carry;
  logic [DW-1:0] off_n;

  assign pop = !filling && count != '0;

  always_comb begin
    err_sum = f_err + (AW+1)'(g.r);
    carry   = err_sum >= (AW+1)'(g.da);
    off_n   = f_off + g.q + DW'(carry);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      filling <= 1'b0;
      g       <= '0;
      f_err   <= '0;
      f_off   <= '0;
      we      <= 1'b0;
      waddr   <= '0;
      wdata   <= '0;
      fills   <= '0;
      done    <= 1'b0;
    end else begin
      we   <= 1'b0;
      done <= 1'b0;
      if (start) fills <= '0;
      if (pop) begin
        filling <= 1'b1;
        g       <= fifo[rp];
        f_err   <= (AW+1)'(fifo[rp].da >> 1);
        f_off   <= '0;
      end else if (filling) begin
        f_err  <= carry ? err_sum - (AW+1)'(g.da) : err_sum;
        f_off  <= off_n;
        we     <= 1'b1;
        waddr  <= g.first;
        wdata  <= g.neg ? g.v0 - off_n : g.v0 + off_n;
        fills  <= fills + 1'b1;
        g.first <= g.first + 1'b1;
        if (g.first == g.last) filling <= 1'b0;
      end
      if (scan_done && !scanning && !filling && count == '0 && !start && busy && !done) done <= 1'b1;
    end
  end

  // busy from start until done
  logic busy_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     busy_q <= 1'b0;
    else if (start) busy_q <= 1'b1;
    else if (done)  busy_q <= 1'b0;
  assign busy = busy_q;

endmodule

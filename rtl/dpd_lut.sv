// dpd_lut: one 1D look-up table of the predistorter (DEPTH words of DW bits).
//
// The predistorter holds two of these, 4096 entries each as in the published
// design: the AM-AM table (mirrored curve, addressed by amplitude, holding the
// PA drive amplitude) and the AM-PM table (holding the PA phase shift). The
// same storage serves training (writes) and operation (reads); which address
// and data reach the ports is decided outside, in mirror_switch.
//
// One write port and one synchronous read port (simple dual-port RAM, a
// choice of this implementation). With HAS_FLAG = 1 a "written" flag per entry
// is kept in flip-flops: clear resets all flags in one clock, a write sets the
// entry's flag, and rflag returns it with the read data. The interpolator uses
// the flags to find the entries the training ramp did not hit.
// Timing: rdata/rflag are valid one clock after raddr. A read and a write of
// the same address in one clock return the old word. Write has priority over
// clear for the flag of the written entry.
module dpd_lut #(
  parameter int unsigned DEPTH    = 4096,
  parameter int unsigned DW       = 12,
  parameter bit          HAS_FLAG = 1'b1,
  localparam int unsigned AW      = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata,
  output logic          rflag
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

  if (HAS_FLAG) begin : g_flag
    logic [DEPTH-1:0] flags;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        flags <= '0;
        rflag <= 1'b0;
      end else begin
        rflag <= flags[raddr];
        if (clear) flags <= '0;
        if (we)    flags[waddr] <= 1'b1;
      end
    end
  end else begin : g_noflag
    assign rflag = 1'b1;
    logic unused;
    assign unused = clear ^ rst_n;
  end

endmodule

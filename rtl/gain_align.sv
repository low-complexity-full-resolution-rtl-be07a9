// gain_align: gain alignment of the looped-back amplitude.
//
// The received amplitude (from the CORDIC) is multiplied by an unsigned
// Q2.14 factor `gain` and saturated to AM_W bits, so that the PA output range
// maps onto the address range of the AM-AM table. The published design names
// a digital gain alignment in the loop-back path without giving its insides;
// the programmable factor (set by software from the known loop gain, e.g. so
// that the PA output at full drive lands on the top table entry) is this
// implementation's choice. The phase passes with the same one-clock delay.
// Timing: one register stage, one sample per clock.
module gain_align
  import dpd_pkg::*;
#(
  parameter int unsigned AM_W = AM_W_DEF,
  parameter int unsigned PH_W = PH_W_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [GAIN_W-1:0] gain,
  input  logic              in_valid,
  input  logic [AM_W-1:0]   in_mag,
  input  logic [PH_W-1:0]   in_phase,
  output logic              out_valid,
  output logic [AM_W-1:0]   out_mag,
  output logic [PH_W-1:0]   out_phase
);
  localparam int unsigned PW = AM_W + GAIN_W;
  logic [PW-1:0] prod, scaled;

  always_comb begin
    prod   = PW'(in_mag) * PW'(gain);
    scaled = (prod + (PW'(1) << (GAIN_FRAC - 1))) >> GAIN_FRAC;   // round to nearest
  end

  always_ff @(posedge clk) begin
    out_mag   <= (scaled > PW'(2**AM_W - 1)) ? '1 : scaled[AM_W-1:0];
    out_phase <= in_phase;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;

endmodule

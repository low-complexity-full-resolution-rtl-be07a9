// time_align: loop-delay measurement and alignment of the training data.
//
// The published design aligns the looped-back data in time using the
// amplitude only (the CORDIC output amplitude does not depend on the loop's
// phase rotation). This implementation detects the leading edge of the
// training ramp: the ramp starts at full amplitude after an idle (zero)
// period, so the first received amplitude at or above `thr` marks the echo of
// ramp sample 0. The number of clocks from the first ramp sample to that echo
// is the loop delay (PA, receiver, CORDIC and gain alignment together).
// From the echo on, each received sample is paired with the ramp amplitude
// that produced it, regenerated by a counter (ref_amp = 2**AM_W-1 - index),
// so no delay line is needed.
// Interface: arm (pulse, same clock as the ramp start) in; received polar
// samples in; aligned pairs (out_ref, out_mag, out_phase) out with out_valid;
// delay (valid once locked), done (pulse after LEN pairs), timeout (sticky,
// no edge within MAX_DELAY clocks).
// Timing: outputs one clock after the input sample.
module time_align
  import dpd_pkg::*;
#(
  parameter int unsigned AM_W      = AM_W_DEF,
  parameter int unsigned PH_W      = PH_W_DEF,
  parameter int unsigned LEN       = 2**AM_W,
  parameter int unsigned MAX_DELAY = 255,
  localparam int unsigned DW       = $clog2(MAX_DELAY + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            arm,
  input  logic [AM_W-1:0] thr,
  input  logic            in_valid,
  input  logic [AM_W-1:0] in_mag,
  input  logic [PH_W-1:0] in_phase,
  output logic            locked,
  output logic [DW-1:0]   delay,
  output logic            out_valid,
  output logic [AM_W-1:0] out_ref,
  output logic [AM_W-1:0] out_mag,
  output logic [PH_W-1:0] out_phase,
  output logic            done,
  output logic            timeout
);
  localparam int unsigned IW = $clog2(LEN + 1);

  logic          waiting;   // armed, edge not yet seen
  logic          pairing;   // edge seen, pairs being produced
  logic [DW-1:0] cnt;
  logic [IW-1:0] idx;
  logic          hit;

  assign hit = waiting && in_valid && (in_mag >= thr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      waiting   <= 1'b0;
      pairing   <= 1'b0;
      locked    <= 1'b0;
      cnt       <= '0;
      delay     <= '0;
      idx       <= '0;
      out_valid <= 1'b0;
      done      <= 1'b0;
      timeout   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      if (arm) begin
        waiting <= 1'b1;
        pairing <= 1'b0;
        locked  <= 1'b0;
        timeout <= 1'b0;
        cnt     <= '0;
        idx     <= '0;
      end else begin
        if (waiting && !hit) begin
          if (cnt == DW'(MAX_DELAY)) begin
            waiting <= 1'b0;
            timeout <= 1'b1;
          end
          cnt <= cnt + 1'b1;
        end
        if (hit) begin
          waiting <= 1'b0;
          pairing <= 1'b1;
          locked  <= 1'b1;
          delay   <= cnt;
        end
        if ((hit || pairing) && in_valid) begin
          out_valid <= 1'b1;
          idx       <= idx + 1'b1;
          if (idx == IW'(LEN - 1)) begin
            pairing <= 1'b0;
            done    <= 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    out_ref   <= AM_W'((2**AM_W - 1) - int'(idx));
    out_mag   <= in_mag;
    out_phase <= in_phase;
  end

endmodule

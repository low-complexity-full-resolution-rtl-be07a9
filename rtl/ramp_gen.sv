// ramp_gen: training signal source, a polar-form amplitude ramp.
//
// On start it emits LEN samples, one per clock, with amplitude descending
// from 2**AM_W-1 by one code per sample, and a constant phase (ramp_phase).
// Before and after the ramp the amplitude is 0. The published design applies
// "a preset ramp signal in polar form" to the PA; the descending direction is
// this implementation's choice: the jump from idle (0) to full amplitude at
// the first sample gives time alignment an unambiguous edge to detect.
// With LEN = 2**AM_W every amplitude code is applied exactly once. The phase
// output is the ramp_phase input unchanged (kept as a port so the ramp is a
// complete polar sample).
// stop (level) aborts a running ramp; start has priority over stop.
// Interface: start (pulse) and stop in; active, amp, phase, done (pulse on the
// clock after the last sample) out. Timing: first sample on the clock after
// start, LEN samples back to back.
module ramp_gen
  import dpd_pkg::*;
#(
  parameter int unsigned AM_W = AM_W_DEF,
  parameter int unsigned PH_W = PH_W_DEF,
  parameter int unsigned LEN  = 2**AM_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            stop,
  input  logic [PH_W-1:0] ramp_phase,
  output logic            active,
  output logic [AM_W-1:0] amp,
  output logic [PH_W-1:0] phase,
  output logic            done
);
  localparam int unsigned CW = $clog2(LEN + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      cnt    <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        active <= 1'b1;
        cnt    <= '0;
      end else if (stop) begin
        active <= 1'b0;
      end else if (active) begin
        if (cnt == CW'(LEN - 1)) begin
          active <= 1'b0;
          done   <= 1'b1;
        end
        cnt <= cnt + 1'b1;
      end
    end
  end

  // amplitude = full scale minus sample index
  assign amp   = active ? AM_W'((2**AM_W - 1) - int'(cnt)) : '0;
  assign phase = ramp_phase;

endmodule

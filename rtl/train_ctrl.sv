// train_ctrl: sequencer of the training phase.
//
// The published training has two steps after the loop delay: (1) write the
// received data into the LUTs while the ramp plays, (2) fill the missing
// points by interpolation, once per training; the CORDIC and the LUTs are then
// reused for operation. This FSM runs that sequence:
//   IDLE --start--> CLEAR: one clock, clears the AM table's written flags and
//                   starts the ramp and the time alignment;
//   WRITE:   LUT switch in MODE_TRAIN, CORDIC fed from the receiver, until the
//            time alignment has delivered all ramp pairs (ta_done) or found
//            no echo (ta_timeout -> FAIL);
//   INTERP:  interpolator started, LUT switch in MODE_INTERP, until ip_done
//            (ip_empty -> FAIL);
//   DONE:    trained = 1, MODE_OPERATE. FAIL: trained = 0, MODE_OPERATE.
// A new start is accepted in IDLE, DONE and FAIL.
// train_cycles counts the clocks from start to DONE (loop delay + ramp length
// + interpolation + a few clocks of sequencing).
module train_ctrl
  import dpd_pkg::*;
#(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             ta_done,
  input  logic             ta_timeout,
  input  logic             ip_done,
  input  logic             ip_empty,
  output train_state_e     state,
  output lut_mode_e        mode,
  output logic             lut_clear,
  output logic             ramp_start,
  output logic             ip_start,
  output logic             rx_sel,
  output logic             trained,
  output logic             failed,
  output logic [CNT_W-1:0] train_cycles
);
  logic counting;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= TS_IDLE;
      ip_start     <= 1'b0;
      train_cycles <= '0;
      counting     <= 1'b0;
    end else begin
      ip_start <= 1'b0;
      if (counting) train_cycles <= train_cycles + 1'b1;
      unique case (state)
        TS_IDLE, TS_DONE, TS_FAIL:
          if (start) begin
            state        <= TS_CLEAR;
            train_cycles <= '0;
            counting     <= 1'b1;
          end
        TS_CLEAR: state <= TS_WRITE;
        TS_WRITE:
          if (ta_timeout) begin
            state    <= TS_FAIL;
            counting <= 1'b0;
          end else if (ta_done) begin
            state    <= TS_INTERP;
            ip_start <= 1'b1;
          end
        TS_INTERP:
          if (ip_done) begin
            state    <= ip_empty ? TS_FAIL : TS_DONE;
            counting <= 1'b0;
          end
        default: state <= TS_IDLE;
      endcase
    end
  end

  always_comb begin
    lut_clear  = (state == TS_CLEAR);
    ramp_start = (state == TS_CLEAR);
    rx_sel     = (state == TS_WRITE);
    trained    = (state == TS_DONE);
    failed     = (state == TS_FAIL);
    unique case (state)
      TS_WRITE:  mode = MODE_TRAIN;
      TS_INTERP: mode = MODE_INTERP;
      default:   mode = MODE_OPERATE;
    endcase
  end

endmodule

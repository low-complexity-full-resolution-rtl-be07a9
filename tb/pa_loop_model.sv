// pa_loop_model: behavioural model of the polar PA and the receiver loop-back
// (not synthesizable; used by the testbenches only).
//
// PA: AM-AM and AM-PM curves from pa_model_pkg (Rapp amplitude curve,
//     quadratic phase shift).
// Receiver: the output vector, rotated by LOOP_ROT radians, is sampled as
// signed I/Q, delayed by DELAY clocks (DELAY >= 1).
module pa_loop_model
  import pa_model_pkg::*;
#(
  parameter int unsigned AM_W  = 12,
  parameter int unsigned PH_W  = 12,
  parameter int unsigned IQ_W  = 13,
  parameter int unsigned DELAY = 7,
  parameter real LOOP_ROT = 0.0
) (
  input  logic                   clk,
  input  logic                   in_valid,
  input  logic [AM_W-1:0]        in_amp,
  input  logic [PH_W-1:0]        in_phase,
  output logic                   rx_valid,
  output logic signed [IQ_W-1:0] rx_i,
  output logic signed [IQ_W-1:0] rx_q
);
  logic                   v_d [DELAY];
  logic signed [IQ_W-1:0] i_d [DELAY];
  logic signed [IQ_W-1:0] q_d [DELAY];

  always_ff @(posedge clk) begin
    real a, y, ph;
    a  = real'(in_amp);
    y  = pa_amp_f(a);
    ph = 2.0 * PI * real'(in_phase) / real'(2**PH_W) + pa_phase_f(a) + LOOP_ROT;
    v_d[0] <= in_valid;
    i_d[0] <= IQ_W'($rtoi($floor(y * $cos(ph) + 0.5)));
    q_d[0] <= IQ_W'($rtoi($floor(y * $sin(ph) + 0.5)));
    for (int k = 1; k < DELAY; k++) begin
      v_d[k] <= v_d[k-1];
      i_d[k] <= i_d[k-1];
      q_d[k] <= q_d[k-1];
    end
  end

  assign rx_valid = v_d[DELAY-1];
  assign rx_i     = i_d[DELAY-1];
  assign rx_q     = q_d[DELAY-1];

endmodule

// mirror_switch: the address/data switch of the two LUTs and the operation datapath.
//
// Central idea of the published scheme: the wanted AM-AM predistortion curve
// is the PA's AM-AM curve mirrored about the line y = x. So the AM-AM table is
// written with address = measured PA output amplitude and data = the ramp
// (PA input) amplitude, and read in operation with address = wanted output
// amplitude: swapping the table's address and data terminals between the two
// phases inverts the curve without any computation. The AM-PM table needs no
// inversion: it is written at address = ramp amplitude with the measured phase
// shift (received phase minus ramp phase), and in operation it is read at the
// predistorted amplitude that actually drives the PA; the value is subtracted
// from the signal phase.
//
// Modes (dpd_pkg::lut_mode_e):
//   MODE_TRAIN   AM[tw_mag] <= tw_ref, PM[tw_ref] <= tw_phase - ramp_phase
//   MODE_INTERP  AM ports belong to the interpolator (ip_*)
//   MODE_OPERATE read path below; no writes
// Operation path: clock 0 AM read at op_mag; clock 1 PM read at the AM data;
// clock 2 output register: out_amp = AM[op_mag],
// out_phase = op_phase - PM[AM[op_mag]]. With dpd_en = 0 (bypass) the
// samples pass unchanged with the same latency. Latency 3 clocks, one sample
// per clock. Reading the tables in series (PM addressed by the AM output) is
// this implementation's reading of the block diagram. The PM write address is
// always the ramp amplitude (tw_ref); only its write enable is switched.
module mirror_switch
  import dpd_pkg::*;
#(
  parameter int unsigned AM_W = AM_W_DEF,
  parameter int unsigned PH_W = PH_W_DEF
) (
  input  logic            clk,
  input  logic            rst_n,
  input  lut_mode_e       mode,
  input  logic            dpd_en,
  // training write (aligned pairs)
  input  logic            tw_valid,
  input  logic [AM_W-1:0] tw_ref,
  input  logic [AM_W-1:0] tw_mag,
  input  logic [PH_W-1:0] tw_phase,
  input  logic [PH_W-1:0] ramp_phase,
  // interpolator access to the AM table
  input  logic [AM_W-1:0] ip_raddr,
  input  logic            ip_we,
  input  logic [AM_W-1:0] ip_waddr,
  input  logic [AM_W-1:0] ip_wdata,
  // operation input (polar, from the CORDIC)
  input  logic            op_valid,
  input  logic [AM_W-1:0] op_mag,
  input  logic [PH_W-1:0] op_phase,
  // AM-AM table ports
  output logic            am_we,
  output logic [AM_W-1:0] am_waddr,
  output logic [AM_W-1:0] am_wdata,
  output logic [AM_W-1:0] am_raddr,
  input  logic [AM_W-1:0] am_rdata,
  // AM-PM table ports
  output logic            pm_we,
  output logic [AM_W-1:0] pm_waddr,
  output logic [PH_W-1:0] pm_wdata,
  output logic [AM_W-1:0] pm_raddr,
  input  logic [PH_W-1:0] pm_rdata,
  // predistorted polar output
  output logic            out_valid,
  output logic [AM_W-1:0] out_amp,
  output logic [PH_W-1:0] out_phase
);
  // ---- port switch ----
  always_comb begin
    am_we    = 1'b0;
    am_waddr = tw_mag;
    am_wdata = tw_ref;
    am_raddr = op_mag;
    pm_we    = 1'b0;
    pm_waddr = tw_ref;
    pm_wdata = tw_phase - ramp_phase;
    unique case (mode)
      MODE_TRAIN: begin
        am_we = tw_valid;
        pm_we = tw_valid;
      end
      MODE_INTERP: begin
        am_raddr = ip_raddr;
        am_we    = ip_we;
        am_waddr = ip_waddr;
        am_wdata = ip_wdata;
      end
      default: ;
    endcase
  end

  // ---- operation pipeline ----
  logic            v1, v2, en1, en2;
  logic [AM_W-1:0] mag1, amp2;
  logic [PH_W-1:0] ph1, ph2;
  logic [AM_W-1:0] amp1;

  assign amp1     = en1 ? am_rdata : mag1;
  assign pm_raddr = amp1;

  always_ff @(posedge clk) begin
    mag1 <= op_mag;
    ph1  <= op_phase;
    en1  <= dpd_en && (mode == MODE_OPERATE);
    amp2 <= amp1;
    ph2  <= ph1;
    en2  <= en1;
    out_amp   <= amp2;
    out_phase <= en2 ? ph2 - pm_rdata : ph2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      v2        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= op_valid && (mode == MODE_OPERATE);
      v2        <= v1;
      out_valid <= v2;
    end
  end

endmodule

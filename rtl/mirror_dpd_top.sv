// mirror_dpd_top: mirror-switching digital predistorter for a polar-modulated PA.
//
// A nonlinear polar PA bends both the amplitude (AM-AM) and the phase (AM-PM)
// of its output as a function of its drive amplitude. This predistorter
// learns both curves once, from a ramp, and corrects them with two 1D tables:
// because the required AM-AM predistortion curve is the PA curve mirrored
// about y = x, the AM-AM table is simply written with address and data
// swapped (address = measured output amplitude, data = drive amplitude) and
// then read normally; the AM-PM table stores the measured phase shift per
// drive amplitude and is subtracted. Nothing is computed per sample in
// operation except one CORDIC conversion and two table reads.
//
// Blocks: cordic_vec (shared, I/Q -> polar), gain_align and time_align
// (conditioning of the looped-back data), ramp_gen (training signal),
// lut_interp (fills table gaps once per training), train_ctrl (sequencer),
// mirror_switch (LUT port switch and operation path), two dpd_lut tables.
//
// Training (train_start): the ramp drives pa_amp/pa_phase; the PA output comes
// back through the receiver as rx_i/rx_q, is converted by the CORDIC, scaled
// by `gain`, aligned in time by detecting the ramp's leading edge
// (rx amplitude >= det_thr) and written to the tables; then the AM-AM gaps are
// interpolated. Training time: loop delay + N_ENTRIES (write) + N_ENTRIES + 3
// (interpolation, while at most about every second entry is missing) + about
// 6 clocks of sequencing, which is the published "loop delay plus twice the
// training signal length". The loop must be idle for one loop delay before
// train_start, so that no echo of an earlier ramp is taken for the new one.
// Operation: tx_i/tx_q -> CORDIC -> AM table -> AM-PM table -> pa_amp/pa_phase,
// latency cordic_latency(CORDIC_STAGES) + 3 clocks. dpd_en = 0, or no
// successful training, bypasses the tables (pure I/Q to polar conversion).
// The transmit samples must satisfy |tx| <= 2**AM_W - 1 (larger magnitudes
// are clipped by the CORDIC).
module mirror_dpd_top
  import dpd_pkg::*;
#(
  parameter int unsigned N_ENTRIES     = N_ENTRIES_DEF,
  parameter int unsigned PH_W          = PH_W_DEF,
  parameter int unsigned IQ_W          = IQ_W_DEF,
  parameter int unsigned CORDIC_STAGES = STAGES_DEF,
  parameter int unsigned CORDIC_EXT    = EXT_DEF,
  parameter int unsigned MAX_DELAY     = 255,
  localparam int unsigned AM_W         = $clog2(N_ENTRIES),
  localparam int unsigned DLY_W        = $clog2(MAX_DELAY + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // control
  input  logic                   train_start,
  input  logic                   dpd_en,
  input  logic [GAIN_W-1:0]      gain,        // Q2.14 loop-back gain correction
  input  logic [AM_W-1:0]        det_thr,     // ramp edge detection threshold
  input  logic [PH_W-1:0]        ramp_phase,  // phase of the training ramp
  // transmit baseband
  input  logic                   tx_valid,
  input  logic signed [IQ_W-1:0] tx_i,
  input  logic signed [IQ_W-1:0] tx_q,
  // receiver loop-back (training)
  input  logic                   rx_valid,
  input  logic signed [IQ_W-1:0] rx_i,
  input  logic signed [IQ_W-1:0] rx_q,
  // polar PA drive
  output logic                   pa_valid,
  output logic [AM_W-1:0]        pa_amp,
  output logic [PH_W-1:0]        pa_phase,
  // status
  output train_state_e           train_state,
  output logic                   trained,
  output logic                   train_failed,
  output logic                   delay_locked,
  output logic [DLY_W-1:0]       loop_delay,
  output logic [15:0]            train_cycles,
  output logic [AM_W:0]          interp_gaps,
  output logic [AM_W:0]          interp_fills
);
  localparam int unsigned CLAT = cordic_latency(CORDIC_STAGES);

  // ---------------- sequencer ----------------
  lut_mode_e mode;
  logic lut_clear, ramp_start, ip_start, rx_sel;
  logic ta_done, ta_timeout, ip_done, ip_empty, ip_busy;

  train_ctrl u_ctrl (
    .clk, .rst_n, .start(train_start),
    .ta_done, .ta_timeout, .ip_done, .ip_empty,
    .state(train_state), .mode, .lut_clear, .ramp_start, .ip_start, .rx_sel,
    .trained, .failed(train_failed), .train_cycles
  );

  // ---------------- shared CORDIC ----------------
  logic                   c_in_valid;
  logic signed [IQ_W-1:0] c_in_i, c_in_q;
  logic                   c_valid;
  logic [AM_W-1:0]        c_mag;
  logic [PH_W-1:0]        c_phase;
  logic [CLAT-1:0]        rx_tag;   // marks receiver samples in the CORDIC pipeline

  always_comb begin
    c_in_valid = rx_sel ? rx_valid : tx_valid;
    c_in_i     = rx_sel ? rx_i : tx_i;
    c_in_q     = rx_sel ? rx_q : tx_q;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rx_tag <= '0;
    else        rx_tag <= {rx_tag[CLAT-2:0], rx_sel};

  cordic_vec #(
    .IQ_W(IQ_W), .STAGES(CORDIC_STAGES), .EXT(CORDIC_EXT), .AM_W(AM_W), .PH_W(PH_W)
  ) u_cordic (
    .clk, .rst_n, .in_valid(c_in_valid), .in_i(c_in_i), .in_q(c_in_q),
    .out_valid(c_valid), .out_mag(c_mag), .out_phase(c_phase)
  );

  // ---------------- loop-back conditioning ----------------
  logic            g_valid;
  logic [AM_W-1:0] g_mag;
  logic [PH_W-1:0] g_phase;

  gain_align #(.AM_W(AM_W), .PH_W(PH_W)) u_gain (
    .clk, .rst_n, .gain,
    .in_valid(c_valid && rx_tag[CLAT-1]), .in_mag(c_mag), .in_phase(c_phase),
    .out_valid(g_valid), .out_mag(g_mag), .out_phase(g_phase)
  );

  logic            ta_valid;
  logic [AM_W-1:0] ta_ref, ta_mag;
  logic [PH_W-1:0] ta_phase;

  time_align #(.AM_W(AM_W), .PH_W(PH_W), .LEN(N_ENTRIES), .MAX_DELAY(MAX_DELAY)) u_talign (
    .clk, .rst_n, .arm(ramp_start), .thr(det_thr),
    .in_valid(g_valid), .in_mag(g_mag), .in_phase(g_phase),
    .locked(delay_locked), .delay(loop_delay),
    .out_valid(ta_valid), .out_ref(ta_ref), .out_mag(ta_mag), .out_phase(ta_phase),
    .done(ta_done), .timeout(ta_timeout)
  );

  // ---------------- training ramp ----------------
  logic            r_active, r_done;
  logic [AM_W-1:0] r_amp;
  logic [PH_W-1:0] r_phase;

  ramp_gen #(.AM_W(AM_W), .PH_W(PH_W), .LEN(N_ENTRIES)) u_ramp (
    .clk, .rst_n, .start(ramp_start), .stop(ta_timeout), .ramp_phase,
    .active(r_active), .amp(r_amp), .phase(r_phase), .done(r_done)
  );

  // ---------------- tables, switch, interpolator ----------------
  logic            am_we, pm_we, am_rflag, pm_rflag;
  logic [AM_W-1:0] am_waddr, am_wdata, am_raddr, am_rdata, pm_waddr, pm_raddr;
  logic [PH_W-1:0] pm_wdata, pm_rdata;
  logic            ip_we;
  logic [AM_W-1:0] ip_raddr, ip_waddr, ip_wdata;
  logic            op_valid;
  logic [AM_W-1:0] op_amp;
  logic [PH_W-1:0] op_phase;

  dpd_lut #(.DEPTH(N_ENTRIES), .DW(AM_W), .HAS_FLAG(1'b1)) u_am_lut (
    .clk, .rst_n, .clear(lut_clear),
    .we(am_we), .waddr(am_waddr), .wdata(am_wdata),
    .raddr(am_raddr), .rdata(am_rdata), .rflag(am_rflag)
  );

  dpd_lut #(.DEPTH(N_ENTRIES), .DW(PH_W), .HAS_FLAG(1'b0)) u_pm_lut (
    .clk, .rst_n, .clear(1'b0),
    .we(pm_we), .waddr(pm_waddr), .wdata(pm_wdata),
    .raddr(pm_raddr), .rdata(pm_rdata), .rflag(pm_rflag)
  );

  lut_interp #(.DEPTH(N_ENTRIES), .DW(AM_W)) u_interp (
    .clk, .rst_n, .start(ip_start),
    .raddr(ip_raddr), .rdata(am_rdata), .rflag(am_rflag),
    .we(ip_we), .waddr(ip_waddr), .wdata(ip_wdata),
    .busy(ip_busy), .done(ip_done), .empty(ip_empty),
    .fills(interp_fills), .gaps(interp_gaps)
  );

  mirror_switch #(.AM_W(AM_W), .PH_W(PH_W)) u_switch (
    .clk, .rst_n, .mode, .dpd_en(dpd_en && trained),
    .tw_valid(ta_valid), .tw_ref(ta_ref), .tw_mag(ta_mag), .tw_phase(ta_phase),
    .ramp_phase,
    .ip_raddr, .ip_we, .ip_waddr, .ip_wdata,
    .op_valid(c_valid && !rx_tag[CLAT-1]), .op_mag(c_mag), .op_phase(c_phase),
    .am_we, .am_waddr, .am_wdata, .am_raddr, .am_rdata,
    .pm_we, .pm_waddr, .pm_wdata, .pm_raddr, .pm_rdata,
    .out_valid(op_valid), .out_amp(op_amp), .out_phase(op_phase)
  );

  // ---------------- PA drive ----------------
  always_comb begin
    if (rx_sel || r_active) begin
      pa_valid = 1'b1;
      pa_amp   = r_amp;
      pa_phase = r_phase;
    end else begin
      pa_valid = op_valid;
      pa_amp   = op_amp;
      pa_phase = op_phase;
    end
  end

  // status bits not needed at the top level
  logic unused;
  assign unused = r_done ^ ip_busy ^ pm_rflag;

endmodule

// cordic_vec: pipelined vectoring CORDIC, Cartesian [I,Q] -> polar [M,Phi].
//
// The predistorter has a single CORDIC. During training it converts the
// looped-back receiver samples to polar form; during operation it converts the
// transmit baseband samples. Following the published design it is an
// 18-stage pipelined vectoring CORDIC whose inputs are extended with tail
// zeros (EXT extra fraction bits) so that the number of useful iterations is
// not limited by the input word length.
//
// Structure (this implementation's choices where the published design is silent):
//   * stage "pre": inputs with I < 0 are rotated by 180 degrees (x,y negated,
//     angle starts at half a turn), bringing the vector into the right half plane;
//   * STAGES micro-rotations, stage i rotates by +/-atan(2^-i) towards y = 0;
//   * output register: magnitude multiplied by 1/K (CORDIC gain, 18-bit
//     constant) and rounded to AM_W bits with saturation at 2**AM_W-1; angle
//     rounded from ZW internal bits to PH_W bits (full circle = 2**PH_W codes,
//     two's-complement wrap).
// Interface: in_valid/in_i/in_q in, out_valid/out_mag/out_phase out.
// Timing: fully pipelined, one sample per clock, latency STAGES+2 clocks
// (dpd_pkg::cordic_latency). Reset clears only the valid pipeline.
module cordic_vec
  import dpd_pkg::*;
#(
  parameter int unsigned IQ_W   = IQ_W_DEF,
  parameter int unsigned STAGES = STAGES_DEF,
  parameter int unsigned EXT    = EXT_DEF,
  parameter int unsigned AM_W   = AM_W_DEF,
  parameter int unsigned PH_W   = PH_W_DEF
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IQ_W-1:0] in_i,
  input  logic signed [IQ_W-1:0] in_q,
  output logic                   out_valid,
  output logic [AM_W-1:0]        out_mag,
  output logic [PH_W-1:0]        out_phase
);
  localparam int unsigned W  = IQ_W + EXT + 2;  // two guard bits: CORDIC gain and negation
  localparam int unsigned ZW = PH_W + 8;        // internal angle width
  localparam int unsigned KF = 18;              // fraction bits of 1/K
  localparam logic [KF-1:0] KINV = 18'd159188;  // round(2^18 / 1.6467602581)

  // atan(2^-i) as a fraction of a full turn, scaled by 2^32
  localparam logic [31:0] ATAN32 [24] = '{
    32'd536870912, 32'd316933406, 32'd167458907, 32'd85004756, 32'd42667331,
    32'd21354465,  32'd10679838,  32'd5340245,   32'd2670163,  32'd1335087,
    32'd667544,    32'd333772,    32'd166886,    32'd83443,    32'd41722,
    32'd20861,     32'd10430,     32'd5215,      32'd2608,     32'd1304,
    32'd652,       32'd326,       32'd163,       32'd81 };

  // atan(2^-i) rounded to ZW bits per turn
  function automatic logic [ZW-1:0] atan_z(int unsigned i);
    if (i >= 24) return '0;
    return ZW'((64'(ATAN32[i]) + (64'(1) << (31 - ZW))) >> (32 - ZW));
  endfunction

  logic signed [W-1:0]  xs [STAGES+1];
  logic signed [W-1:0]  ys [STAGES+1];
  logic        [ZW-1:0] zs [STAGES+1];
  logic                 vs [STAGES+1];

  // Pre-rotation into the right half plane, with tail-zero extension
  always_ff @(posedge clk) begin
    logic signed [W-1:0] xi, yi;
    xi = W'(in_i) <<< EXT;
    yi = W'(in_q) <<< EXT;
    if (in_i < 0) begin
      xs[0] <= -xi;
      ys[0] <= -yi;
      zs[0] <= ZW'(1) << (ZW - 1);   // half a turn
    end else begin
      xs[0] <= xi;
      ys[0] <= yi;
      zs[0] <= '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vs[0] <= 1'b0;
    else        vs[0] <= in_valid;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam logic [ZW-1:0] A = atan_z(s);
    always_ff @(posedge clk) begin
      if (ys[s] >= 0) begin
        xs[s+1] <= xs[s] + (ys[s] >>> s);
        ys[s+1] <= ys[s] - (xs[s] >>> s);
        zs[s+1] <= zs[s] + A;
      end else begin
        xs[s+1] <= xs[s] - (ys[s] >>> s);
        ys[s+1] <= ys[s] + (xs[s] >>> s);
        zs[s+1] <= zs[s] - A;
      end
    end
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) vs[s+1] <= 1'b0;
      else        vs[s+1] <= vs[s];
  end

  // Gain compensation, rounding and saturation
  logic [W+KF-1:0] prod;
  logic [W+KF-1:0] mag_full;
  always_comb begin
    prod     = (W+KF)'($unsigned(xs[STAGES])) * (W+KF)'(KINV);
    mag_full = (prod + ((W+KF)'(1) << (EXT + KF - 1))) >> (EXT + KF);
  end

  always_ff @(posedge clk) begin
    if (mag_full > (W+KF)'((1 << AM_W) - 1)) out_mag <= '1;
    else                                     out_mag <= mag_full[AM_W-1:0];
    out_phase <= PH_W'((zs[STAGES] + (ZW'(1) << (ZW - PH_W - 1))) >> (ZW - PH_W));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= vs[STAGES];

endmodule

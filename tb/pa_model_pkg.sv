// pa_model_pkg: curves of the behavioural PA used by the testbenches.
//
// AM-AM: Rapp curve y = G0*a / (1 + (G0*a/ASAT)^(2P))^(1/(2P)), with a the
// drive amplitude code and y the output amplitude in receiver I/Q codes.
// AM-PM: phase shift PHI_MAX*(y/ASAT)^2 radians.
// G0 > 1 makes the curve steeper than one code per code at low drive, so the
// training ramp skips table addresses there and interpolation has work to do.
package pa_model_pkg;
  localparam real PI      = 3.14159265358979;
  localparam real G0      = 1.6;
  localparam real ASAT    = 3600.0;
  localparam real P       = 1.5;
  localparam real PHI_MAX = 0.35;

  function automatic real pa_amp_f(real a);
    real g;
    g = G0 * a;
    return g / $pow(1.0 + $pow(g / ASAT, 2.0 * P), 1.0 / (2.0 * P));
  endfunction

  function automatic real pa_phase_f(real a);
    real y;
    y = pa_amp_f(a) / ASAT;
    return PHI_MAX * y * y;
  endfunction
endpackage

// pmsm_pkg: types, constants and the Hall-sector tables shared by the PMSM
// control FPGA design.
//
// The speed observer holds sine and cosine as signed fixed point with
// ANG_FRAC = 24 fraction bits (the precision of the original angle
// variables) and two integer bits, so that +1.0 itself can be held.  The three Hall-sensor tables
// of the hybrid observer live here as functions of the registered Hall state
// {ha, hb, hc}:
//   * hall_initial     - sector-centre angle used as the start-up estimate
//   * hall_bounds      - the sector's limits on sin and cos (the estimate is
//                        clamped to them between transitions)
//   * hall_transition  - exact sin/cos at the edge just crossed
// Sector centres are 0 for 100, pi/3 for 110, 2pi/3 for 010, pi for 011,
// 4pi/3 for 001 and 5pi/3 for 101; edges sit half-way, at pi/6 + k*pi/3.
// States 000 and 111 cannot occur with healthy sensors; they are reported
// through the `valid` flag and treated as "no information" by the observer
// (a choice of this design).
package pmsm_pkg;

  // ---------------------------------------------------------------- angles
  localparam int ANG_FRAC = 24;
  // Two integer bits (sign + one) so that exactly +1.0 is representable.
  typedef logic signed [ANG_FRAC+1:0] angle_t;        // Q2.ANG_FRAC

  localparam angle_t ANG_ONE   = angle_t'(1 <<< ANG_FRAC);   //  1.0
  localparam angle_t ANG_HALF  = angle_t'(1 <<< (ANG_FRAC-1)); // 0.5
  localparam angle_t ANG_SQ3_2 = angle_t'(14529495);           // sqrt(3)/2 * 2^24
  localparam angle_t ANG_ZERO  = '0;

  typedef struct packed {
    angle_t s;   // sine
    angle_t c;   // cosine
  } sincos_t;

  typedef struct packed {
    angle_t max_s;
    angle_t min_s;
    angle_t max_c;
    angle_t min_c;
  } bounds_t;

  // Hall state {ha, hb, hc}
  typedef logic [2:0] hall_t;

  function automatic logic hall_valid(hall_t h);
    return (h != 3'b000) && (h != 3'b111);
  endfunction

  // Start-up estimate: centre of the sector the rotor is known to be in.
  function automatic sincos_t hall_initial(hall_t h);
    sincos_t r;
    unique case (h)
      3'b001:  r = '{s: -ANG_SQ3_2, c: -ANG_HALF};   // 4pi/3
      3'b010:  r = '{s:  ANG_SQ3_2, c: -ANG_HALF};   // 2pi/3
      3'b011:  r = '{s:  ANG_ZERO,  c: -ANG_ONE};    // pi
      3'b100:  r = '{s:  ANG_ZERO,  c:  ANG_ONE};    // 0
      3'b101:  r = '{s: -ANG_SQ3_2, c:  ANG_HALF};   // 5pi/3
      3'b110:  r = '{s:  ANG_SQ3_2, c:  ANG_HALF};   // pi/3
      default: r = '{s:  ANG_ZERO,  c:  ANG_ONE};
    endcase
    return r;
  endfunction

  // Limits of sin/cos inside the current sector.
  function automatic bounds_t hall_bounds(hall_t h);
    bounds_t b;
    unique case (h)
      3'b001:  b = '{max_s: -ANG_HALF,  min_s: -ANG_ONE,  max_c:  ANG_ZERO,   min_c: -ANG_SQ3_2};
      3'b010:  b = '{max_s:  ANG_ONE,   min_s:  ANG_HALF, max_c:  ANG_ZERO,   min_c: -ANG_SQ3_2};
      3'b011:  b = '{max_s:  ANG_HALF,  min_s: -ANG_HALF, max_c: -ANG_SQ3_2,  min_c: -ANG_ONE};
      3'b100:  b = '{max_s:  ANG_HALF,  min_s: -ANG_HALF, max_c:  ANG_ONE,    min_c:  ANG_SQ3_2};
      3'b101:  b = '{max_s: -ANG_HALF,  min_s: -ANG_ONE,  max_c:  ANG_SQ3_2,  min_c:  ANG_ZERO};
      3'b110:  b = '{max_s:  ANG_ONE,   min_s:  ANG_HALF, max_c:  ANG_SQ3_2,  min_c:  ANG_ZERO};
      default: b = '{max_s:  ANG_ONE,   min_s: -ANG_ONE,  max_c:  ANG_ONE,    min_c: -ANG_ONE};
    endcase
    return b;
  endfunction

  // Exact position at a sensor edge.  `t` = {Ta, Tb, Tc} marks which sensor
  // just changed, `h` is the new Hall state.  Returns found=0 when no
  // transition is recognised.
  function automatic sincos_t hall_transition(logic [2:0] t, hall_t h, output logic found);
    sincos_t r = '{s: ANG_ZERO, c: ANG_ONE};
    found = 1'b1;
    if      (t[2] && h[1]) r = '{s:  ANG_ONE,  c:  ANG_ZERO};     // pi/2
    else if (t[2] && h[0]) r = '{s: -ANG_ONE,  c:  ANG_ZERO};     // 3pi/2
    else if (t[1] && h[2]) r = '{s:  ANG_HALF, c:  ANG_SQ3_2};    // pi/6
    else if (t[1] && h[0]) r = '{s: -ANG_HALF, c: -ANG_SQ3_2};    // 7pi/6
    else if (t[0] && h[2]) r = '{s: -ANG_HALF, c:  ANG_SQ3_2};    // 11pi/6
    else if (t[0] && h[1]) r = '{s:  ANG_HALF, c: -ANG_SQ3_2};    // 5pi/6
    else found = 1'b0;
    return r;
  endfunction

endpackage

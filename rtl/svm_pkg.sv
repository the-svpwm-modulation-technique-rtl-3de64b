// svm_pkg: types, formats and helper functions shared by the SVPWM modulator
// of the three-level ANPC inverter.
//
// Number formats (this design's choices; the source design gives only the 16-bit width
// of U_x and U_y):
//   * U_x, U_y      : signed 16 bit, 14 fraction bits, 1.0 = one level step U_d/2
//                     of a phase leg, so the outer hexagon corner (1,-1,-1) lies at
//                     U_x = 4/3.
//   * V_a, V_b, V_c : signed 18 bit, 14 fraction bits, line-to-line modulation
//                     signals V_ab, V_bc, V_ca in units of U_d/2, so the
//                     space-vector lattice points are the integer triples with
//                     zero sum.
//   * duty cycles   : unsigned 16 bit, 15 fraction bits, 1.0 = 32768.
//   * phase levels  : -1, 0, +1 (leg connected to N, the mid-point 0, or P).
//
// The switching index of a vector is its row in the source design's table of real
// switching combinations (row 0 = the zero vector, rows 1-6 the small vectors,
// rows 7-18 the outer ring); SVEC_ROW holds the lattice coordinates of each row.
package svm_pkg;

  localparam int unsigned U_W      = 16;  // width of U_x, U_y
  localparam int unsigned V_FRAC   = 14;  // fraction bits of U and V
  localparam int unsigned V_W      = 18;  // width of V_a, V_b, V_c
  localparam int unsigned D_W      = 16;  // width of a duty cycle
  localparam int unsigned D_FRAC   = 15;  // fraction bits of a duty cycle
  localparam int unsigned D_ONE    = 1 << D_FRAC;
  localparam int unsigned N_SLOTS  = 14;  // time01..time14
  localparam int unsigned N_VEC    = 19;  // rows of the switching-combination table
  localparam int unsigned IDX_W    = 5;
  localparam logic [IDX_W-1:0] IDX_INVALID = 5'd31;

  // One coordinate of a lattice vector (-2..2) or one phase level (-1..1).
  typedef logic signed [2:0] coord_t;
  typedef logic signed [1:0] level_t;

  // A space-vector-diagram vector: (ab, bc, ca) line-to-line levels.
  typedef struct packed {
    coord_t ab;
    coord_t bc;
    coord_t ca;
  } svec_t;

  // A real switching combination: the level of each phase leg.
  typedef struct packed {
    level_t u;
    level_t v;
    level_t w;
  } sw_state_t;

  // State of one phase leg as the gate unit sees it:
  //   PH_P  : S1, S2 on          PH_OU : S2, S5 on (upper clamping path)
  //   PH_OL : S3, S6 on (lower)  PH_N  : S3, S4 on
  typedef enum logic [1:0] {
    PH_N  = 2'd0,
    PH_OL = 2'd1,
    PH_OU = 2'd2,
    PH_P  = 2'd3
  } phase_t;

  // Lattice coordinates of the table rows, in the table's order.
  localparam svec_t SVEC_ROW [N_VEC] = '{
    '{ 3'sd0,  3'sd0,  3'sd0},
    '{ 3'sd1,  3'sd0, -3'sd1},
    '{ 3'sd0,  3'sd1, -3'sd1},
    '{-3'sd1,  3'sd1,  3'sd0},
    '{-3'sd1,  3'sd0,  3'sd1},
    '{ 3'sd0, -3'sd1,  3'sd1},
    '{ 3'sd1, -3'sd1,  3'sd0},
    '{ 3'sd2,  3'sd0, -3'sd2},
    '{ 3'sd1,  3'sd1, -3'sd2},
    '{ 3'sd0,  3'sd2, -3'sd2},
    '{-3'sd1,  3'sd2, -3'sd1},
    '{-3'sd2,  3'sd2,  3'sd0},
    '{-3'sd2,  3'sd1,  3'sd1},
    '{-3'sd2,  3'sd0,  3'sd2},
    '{-3'sd1, -3'sd1,  3'sd2},
    '{ 3'sd0, -3'sd2,  3'sd2},
    '{ 3'sd1, -3'sd2,  3'sd1},
    '{ 3'sd2, -3'sd2,  3'sd0},
    '{ 3'sd2, -3'sd1, -3'sd1}
  };

  function automatic int max3(input int a, input int b, input int c);
    int m;
    m = (a > b) ? a : b;
    return (m > c) ? m : c;
  endfunction

  function automatic int min3(input int a, input int b, input int c);
    int m;
    m = (a < b) ? a : b;
    return (m < c) ? m : c;
  endfunction

  // Range of the w-phase level over the real combinations of a vector:
  // u - v = ab and v - w = bc, with every level in -1..1.
  function automatic int w_min(input svec_t s);
    return max3(-1, -1 - int'(s.bc), -1 - int'(s.bc) - int'(s.ab));
  endfunction

  function automatic int w_max(input svec_t s);
    return min3(1, 1 - int'(s.bc), 1 - int'(s.bc) - int'(s.ab));
  endfunction

  // Real combination of vector s whose w-phase level is w.
  function automatic sw_state_t make_state(input svec_t s, input int w);
    sw_state_t r;
    r.w = level_t'(w);
    r.v = level_t'(w + int'(s.bc));
    r.u = level_t'(w + int'(s.bc) + int'(s.ab));
    return r;
  endfunction

  function automatic phase_t level_to_phase(input level_t l, input logic upper_clamp);
    if (l > 0)       return PH_P;
    else if (l < 0)  return PH_N;
    else             return upper_clamp ? PH_OU : PH_OL;
  endfunction

endpackage

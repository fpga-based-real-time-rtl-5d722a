// milling_pkg: types, constants and fixed-point helpers shared by the
// face-milling real-time simulator.
//
// All simulation arithmetic is signed fixed point, Q(FX_W-FX_FRAC).FX_FRAC.
// Q24.24 in 48 bits keeps about 7 significant digits over the range of an
// implicit integrator's effective stiffness and displacements.
// The physical model is run in scaled (non-dimensional) units chosen by the
// host when it pre-computes the tables; the hardware only sees numbers.
// The clock rate (100 MHz) and time step (42 us = 4200 cycles), the 5 modal
// coordinates and the 6 cutting edges are the reference set-up's numbers;
// the word format is this design's own choice.
package milling_pkg;

  localparam int unsigned FX_W    = 48;
  localparam int unsigned FX_FRAC = 24;
  typedef logic signed [FX_W-1:0] fix_t;

  localparam fix_t FX_ONE = fix_t'(1) <<< FX_FRAC;
  localparam fix_t FX_MAX = {1'b0, {(FX_W-1){1'b1}}};
  localparam fix_t FX_MIN = {1'b1, {(FX_W-1){1'b0}}};

  localparam int unsigned CLK_HZ        = 100_000_000; // fabric clock
  localparam int unsigned DT_CYCLES_DEF = 4200;        // 42 us at 100 MHz
  localparam int unsigned N_MODES_DEF   = 5;           // modal coordinates
  localparam int unsigned N_EDGES_DEF   = 6;           // cutter edges
  localparam int unsigned DAC_BITS      = 16;          // AD5541A

  // Deflection vector of one coupling element (cutting edge): displacement
  // q_z along y1, change of cut thickness dh and change of cut width db.
  typedef struct packed {
    fix_t qz;
    fix_t dh;
    fix_t db;
  } defl_t;

  // Cutting force of one coupling element along its axes y1, y2, y3.
  typedef struct packed {
    fix_t y1;
    fix_t y2;
    fix_t y3;
  } force_t;

  // Saturating conversion of a wide value to fix_t.
  function automatic fix_t fx_sat(input logic signed [2*FX_W-1:0] v);
    if (v > (2*FX_W)'(FX_MAX)) return FX_MAX;
    if (v < (2*FX_W)'(FX_MIN)) return FX_MIN;
    return fix_t'(v);
  endfunction

  // Fixed-point product, truncated towards minus infinity, saturated.
  function automatic fix_t fx_mul(input fix_t a, input fix_t b);
    logic signed [2*FX_W-1:0] p;
    p = (2*FX_W)'(a) * (2*FX_W)'(b);
    return fx_sat(p >>> FX_FRAC);
  endfunction

  // Saturating sum.
  function automatic fix_t fx_add(input fix_t a, input fix_t b);
    return fx_sat((2*FX_W)'(a) + (2*FX_W)'(b));
  endfunction

  function automatic fix_t fx_sub(input fix_t a, input fix_t b);
    return fx_sat((2*FX_W)'(a) - (2*FX_W)'(b));
  endfunction

endpackage

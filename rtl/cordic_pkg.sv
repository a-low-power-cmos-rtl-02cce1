// cordic_pkg: types and constants shared by the CORDIC processor blocks.
//
// The CORDIC core works on 10-bit data. Inside the CORDIC elements the
// word carries two extra fraction bits (to cut truncation error in the
// shifted terms) and two extra integer bits (sign, plus room for the
// CORDIC gain of about 1.65), giving CE_W = 14 bits. Angles are binary
// angles: ANG_W = 10 bits, 1024 units = 360 degrees.
//
// The arctan constants are the eight 10-bit values of the arctan(2^-i)
// table (45 deg = 7F, 26.57 deg = 4B, ... 0.45 deg = 1). They are
// returned by a constant function so each CORDIC element gets its own
// hard-wired constant rather than reading a lookup table.
package cordic_pkg;

  localparam int unsigned DATA_W   = 10;           // I/Q, magnitude, angle width
  localparam int unsigned ANG_W    = 10;           // 1024 units per turn
  localparam int unsigned FRAC_EXT = 2;            // fraction bits added in the CE datapath
  localparam int unsigned INT_EXT  = 2;            // sign + CORDIC growth
  localparam int unsigned CE_W     = DATA_W + INT_EXT + FRAC_EXT;
  localparam int unsigned N_STAGES = 8;            // CE 1 .. CE 8
  localparam int unsigned ORIGIN   = 1 << (DATA_W - 1);  // 512: centre of unsigned I/Q

  // Quadrant of the original (origin-moved) vector.
  typedef enum logic [1:0] {
    QUAD1 = 2'd0,   // X' >= 0, Y' >= 0
    QUAD2 = 2'd1,   // X' <  0, Y' >= 0
    QUAD3 = 2'd2,   // X' <  0, Y' <  0
    QUAD4 = 2'd3    // X' >= 0, Y' <  0
  } quad_e;

  // One word travelling down the CE pipeline.
  typedef struct packed {
    logic                    valid;
    quad_e                   quad;
    logic signed [CE_W-1:0]  x;
    logic signed [CE_W-1:0]  y;
    logic        [ANG_W-1:0] z;
  } ce_t;

  // arctan(2^-i) in units of 360/1024 degree, as tabulated for steps 1..8.
  function automatic logic [ANG_W-1:0] atan_const(input int unsigned i);
    case (i)
      0:       return 10'h07F;   // 45.0000 deg
      1:       return 10'h04B;   // 26.5651 deg
      2:       return 10'h027;   // 14.0362 deg
      3:       return 10'h014;   //  7.1250 deg
      4:       return 10'h00A;   //  3.5763 deg
      5:       return 10'h005;   //  1.7899 deg
      6:       return 10'h002;   //  0.8952 deg
      7:       return 10'h001;   //  0.4476 deg
      default: return 10'h000;
    endcase
  endfunction

endpackage

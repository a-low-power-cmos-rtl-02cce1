// cordic_preproc: origin move and quadrant-1 move ahead of the CE pipeline.
//
// The baseband I/Q samples are unsigned 10-bit numbers centred on 512. The
// origin move subtracts 512 to get signed X', Y'. The quadrant-1 move takes
// |X'| and |Y'|, so every vector lands in the first quadrant where the
// vectoring CORDIC converges, and records the original quadrant for the
// post-processing. Points on an axis are counted with the non-negative
// side (X' >= 0 and Y' >= 0 is quadrant 1) - this tie rule is this
// design's choice. The magnitudes get FRAC_EXT zero fraction bits appended.
//
// z starts from the third input zi, an angle offset that ends up added to
// the result (A = zi + atan2(Y', X')). Because the post-processing negates
// the accumulated angle for quadrants 2 and 4, z starts at -zi there and at
// +zi in quadrants 1 and 3, so no extra pipeline register is needed. This
// placement of zi is this design's.
//
// The appended fraction bits and the top bit of x and y (|X'| <= 512 needs
// 11 of the 12 integer bits) are constant zero by construction.
//
// Purely combinational (zero latency).
module cordic_preproc
  import cordic_pkg::*;
(
  input  logic [DATA_W-1:0] xi,
  input  logic [DATA_W-1:0] yi,
  input  logic [ANG_W-1:0]  zi,
  input  logic              in_valid,
  output ce_t               ce_out
);

  logic signed [DATA_W:0] xs, ys;     // one bit wider: -512 .. +511
  logic        [DATA_W:0] ax, ay;     // 0 .. 512

  always_comb begin
    xs = $signed({1'b0, xi}) - $signed((DATA_W+1)'(ORIGIN));
    ys = $signed({1'b0, yi}) - $signed((DATA_W+1)'(ORIGIN));
    ax = xs[DATA_W] ? (DATA_W+1)'(-xs) : (DATA_W+1)'(xs);
    ay = ys[DATA_W] ? (DATA_W+1)'(-ys) : (DATA_W+1)'(ys);

    ce_out.valid = in_valid;
    case ({xs[DATA_W], ys[DATA_W]})
      2'b00:   ce_out.quad = QUAD1;
      2'b10:   ce_out.quad = QUAD2;
      2'b11:   ce_out.quad = QUAD3;
      default: ce_out.quad = QUAD4;
    endcase
    ce_out.x = CE_W'({ax, FRAC_EXT'(0)});
    ce_out.y = CE_W'({ay, FRAC_EXT'(0)});
    // quadrants 2 and 4: exactly one of X', Y' negative
    ce_out.z = (xs[DATA_W] ^ ys[DATA_W]) ? ANG_W'(0) - zi : zi;
  end

endmodule

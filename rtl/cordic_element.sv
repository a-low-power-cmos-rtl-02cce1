// cordic_element: one CORDIC element (CE) of the vectoring-mode pipeline.
//
// Stage STAGE performs one micro-rotation by +/- arctan(2^-STAGE):
//   s = +1 if y >= 0, else -1
//   x' = x + s * (y >>> STAGE)
//   y' = y - s * (x >>> STAGE)
//   z' = z + s * atan_const(STAGE)
// so y is driven towards zero while z accumulates the angle. The shift is
// fixed per stage and is pure wiring, and the arctan constant is hard-wired
// per stage, so a CE is three add/subtract units and a register. This is
// the structure of the reference CE; the sign convention follows its block
// diagram. The arithmetic right shift truncates (floors) the dropped bits.
//
// The quadrant code and the valid bit ride along unchanged.
//
// Interface: ce_in -> ce_out, registered on clk when en is high (en is the
// slow-rate clock enable). Latency one enabled cycle. Asynchronous
// active-low reset clears the register.
module cordic_element
  import cordic_pkg::*;
#(
  parameter int unsigned STAGE = 0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  ce_t  ce_in,
  output ce_t  ce_out
);

  localparam logic [ANG_W-1:0] ATAN = atan_const(STAGE);

  logic signed [CE_W-1:0] x_sh, y_sh;
  ce_t nxt;

  assign x_sh = ce_in.x >>> STAGE;   // wired shift
  assign y_sh = ce_in.y >>> STAGE;

  always_comb begin
    nxt = ce_in;
    if (!ce_in.y[CE_W-1]) begin      // s = +1
      nxt.x = ce_in.x + y_sh;
      nxt.y = ce_in.y - x_sh;
      nxt.z = ce_in.z + ATAN;
    end else begin                   // s = -1
      nxt.x = ce_in.x - y_sh;
      nxt.y = ce_in.y + x_sh;
      nxt.z = ce_in.z - ATAN;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  ce_out <= '0;
    else if (en) ce_out <= nxt;
  end

endmodule

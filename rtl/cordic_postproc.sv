// cordic_postproc: magnitude scaling and quadrant recovery after the CEs.
//
// The CE pipeline leaves x = |v| / K with K ~ 0.607259, and z = the
// first-quadrant angle. This block multiplies x by K using wired shifts and
// adders only,
//   K ~ 2^-1 + 2^-3 - 2^-6 - 2^-9 = 0.60742
// (this shift-add split is this design's), rounds away the FRAC_EXT
// fraction bits, and maps the angle back to the original quadrant:
//   Q1: A    Q2: 512 - A    Q3: 512 + A    Q4: 1024 - A   (mod 1024)
//
// Timing: two register stages, both advancing when en is high.
//   stage 1: partial sums (x>>1)+(x>>3) and (x>>6)+(x>>9); angle recovery
//   stage 2: difference, rounding, clip to 10 bits
// Interface: ce_in from the last CE; r (magnitude), a (angle), y_res
// (residual y, ideally ~0) and out_valid. Asynchronous active-low reset.
module cordic_postproc
  import cordic_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  ce_t                     ce_in,
  output logic                    out_valid,
  output logic       [DATA_W-1:0] r,
  output logic signed [CE_W-1:0]  y_res,
  output logic       [ANG_W-1:0]  a
);

  // x is non-negative after convergence from the first quadrant.
  logic signed [CE_W:0]   x;
  logic signed [CE_W:0]   p_hi, p_lo, p_hi_q, p_lo_q;
  logic        [ANG_W-1:0] a_rec, a_q;
  logic signed [CE_W-1:0]  y_q;
  logic                    v_q;
  logic signed [CE_W:0]    m;
  logic        [CE_W:0]    m_rnd;

  assign x    = {ce_in.x[CE_W-1], ce_in.x};
  assign p_hi = (x >>> 1) + (x >>> 3);
  assign p_lo = (x >>> 6) + (x >>> 9);

  always_comb begin
    unique case (ce_in.quad)
      QUAD1: a_rec = ce_in.z;
      QUAD2: a_rec = ANG_W'(ORIGIN) - ce_in.z;
      QUAD3: a_rec = ANG_W'(ORIGIN) + ce_in.z;
      QUAD4: a_rec = ANG_W'(0) - ce_in.z;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_hi_q <= '0; p_lo_q <= '0; a_q <= '0; y_q <= '0; v_q <= 1'b0;
    end else if (en) begin
      p_hi_q <= p_hi;
      p_lo_q <= p_lo;
      a_q    <= a_rec;
      y_q    <= ce_in.y;
      v_q    <= ce_in.valid;
    end
  end

  always_comb begin
    m     = p_hi_q - p_lo_q;
    m_rnd = (m[CE_W] ? '0 : m) + (CE_W+1)'(1 << (FRAC_EXT - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0; a <= '0; y_res <= '0; out_valid <= 1'b0;
    end else if (en) begin
      // m_rnd >> FRAC_EXT fits in DATA_W bits for any 10-bit input (max ~724);
      // clip anyway so an out-of-range word cannot wrap.
      if ((m_rnd >> FRAC_EXT) > (CE_W+1)'({DATA_W{1'b1}})) r <= '1;
      else                                                 r <= DATA_W'(m_rnd >> FRAC_EXT);
      a         <= a_q;
      y_res     <= y_q;
      out_valid <= v_q;
    end
  end

endmodule

// cordic_processor: pipelined rectangular-to-polar CORDIC.
//
// Converts an unsigned 10-bit I/Q pair (origin at 512,512) to magnitude R
// and angle A (1024 = 360 degrees). It is the chain
//   cordic_preproc  (origin move, quadrant-1 move)   0 cycles
//   N_STAGES x cordic_element (vectoring mode)       8 cycles
//   cordic_postproc (scale by K, quadrant recovery)  2 cycles
// for a total latency of N_STAGES + 2 = 10 enabled cycles and a throughput
// of one sample per enabled cycle. The stage count, the latencies and the
// arctan constants are those of the reference design; the internal word
// width (14 bits) is this design's choice.
//
// zi is the third CORDIC input: an angle offset, added to the result
// (zj = zi + atan2(Y', X') mod 1024). The modulator ties it to 0.
//
// en is a clock enable; the whole pipeline, including valid, stalls when
// it is low. yj is the residual y of the last CE, close to zero.
module cordic_processor
  import cordic_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    in_valid,
  input  logic       [DATA_W-1:0] xi,
  input  logic       [DATA_W-1:0] yi,
  input  logic       [ANG_W-1:0]  zi,
  output logic                    out_valid,
  output logic       [DATA_W-1:0] xj,
  output logic signed [CE_W-1:0]  yj,
  output logic       [ANG_W-1:0]  zj
);

  ce_t stage [N_STAGES+1];

  cordic_preproc u_pre (
    .xi, .yi, .zi, .in_valid, .ce_out(stage[0])
  );

  for (genvar i = 0; i < N_STAGES; i++) begin : g_ce
    cordic_element #(.STAGE(i)) u_ce (
      .clk, .rst_n, .en, .ce_in(stage[i]), .ce_out(stage[i+1])
    );
  end

  // Folded into the first quadrant, the vector stays in the right half
  // plane: x never turns negative on its way through the CEs.
  a_x_positive: assert property (@(posedge clk) disable iff (!rst_n)
    stage[N_STAGES].valid |-> !stage[N_STAGES].x[CE_W-1]);

  cordic_postproc u_post (
    .clk, .rst_n, .en, .ce_in(stage[N_STAGES]),
    .out_valid, .r(xj), .y_res(yj), .a(zj)
  );

endmodule

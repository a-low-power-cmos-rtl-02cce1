// barrel_shifter: external power-of-two gain on the amplitude.
//
// dout = din << shamt, with the output wide enough (IN_W + 2^SH_W - 1
// bits) that nothing is lost; range limiting is left to dac_pwm, which
// flags and clips values beyond the PWM range. The shift is built as
// log2 stages of fixed shifts (a logarithmic barrel shifter). That the
// block applies a gain from external inputs is the reference design's;
// the left direction, the 3-bit range and the output register are this
// design's.
//
// Timing: one register stage (dout follows din/shamt by one clock).
// Async active-low reset.
module barrel_shifter #(
  parameter int unsigned IN_W  = 10,
  parameter int unsigned SH_W  = 3,
  localparam int unsigned OUT_W = IN_W + (1 << SH_W) - 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [IN_W-1:0]  din,
  input  logic [SH_W-1:0]  shamt,
  output logic [OUT_W-1:0] dout
);

  logic [OUT_W-1:0] lvl [SH_W+1];

  assign lvl[0] = OUT_W'(din);
  for (genvar b = 0; b < SH_W; b++) begin : g_lvl
    assign lvl[b+1] = shamt[b] ? (lvl[b] << (1 << b)) : lvl[b];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout <= '0;
    else        dout <= lvl[SH_W];
  end

endmodule

// interpolator: linear interpolator raising the sample rate by UP.
//
// On each load (one fast cycle in UP, from interp_counter) the block takes
// a new slow-rate sample: s0 <= s1, s1 <= din and d <= din - s1. In every
// fast cycle it then outputs
//   dout = s0 + floor(d * k / UP),   k = phase = 0 .. UP-1
// i.e. UP points evenly spaced on the line from the previous to the
// current sample. UP must be a power of two so the division is a wired
// shift. Evenly spaced linear interpolation is the reference design's
// method; the arithmetic is this design's.
//
// MODULAR = 0: d is the signed (W+1)-bit difference of unsigned samples
// (used for the magnitude). MODULAR = 1: d is the W-bit difference taken
// modulo 2^W and read as signed, and the sum wraps modulo 2^W, so an angle
// (2^W = one turn) is interpolated along the short way across 0.
//
// Timing: dout is registered. A sample loaded at clock edge t appears as
// the end point of the segment output over the next UP cycles, starting
// at edge t+1 (k = 0 gives the previous sample s0). Async active-low reset.
module interpolator #(
  parameter int unsigned W       = 10,
  parameter int unsigned UP      = 4,
  parameter bit          MODULAR = 1'b0,
  localparam int unsigned PH_W   = (UP > 1) ? $clog2(UP) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic [PH_W-1:0] phase,
  input  logic [W-1:0]    din,
  output logic [W-1:0]    dout
);

  localparam int unsigned SH = $clog2(UP);

  if (UP < 2 || (1 << SH) != UP) begin : g_bad_up
    $error("interpolator: UP (%0d) must be a power of two >= 2", UP);
  end
  localparam int unsigned DW = W + 1;            // difference width
  localparam int unsigned PW = DW + PH_W + 1;    // product width

  logic [W-1:0]          s0, s1;
  logic signed [DW-1:0]  d, d_new;
  logic signed [PW-1:0]  prod, step;
  logic        [W-1:0]   sum;

  always_comb begin
    if (MODULAR) d_new = DW'($signed(W'(din - s1)));   // sign-extend the wrapped W-bit diff
    else         d_new = $signed({1'b0, din}) - $signed({1'b0, s1});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0 <= '0; s1 <= '0; d <= '0;
    end else if (load) begin
      s0 <= s1;
      s1 <= din;
      d  <= d_new;
    end
  end

  always_comb begin
    prod = PW'(d) * $signed({1'b0, phase});
    step = prod >>> SH;
    sum  = W'($signed(PW'({1'b0, s0})) + step);   // exact for MODULAR=0, wraps mod 2^W for MODULAR=1
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout <= '0;
    else        dout <= sum;
  end

endmodule

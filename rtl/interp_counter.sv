// interp_counter: full-rate phase counter of the interpolators.
//
// The CORDIC processor and the sample registers of the interpolators run
// at 1/UP of the output rate; only this counter runs at the full rate. It
// counts 0 .. UP-1 and raises sample_en during the last phase, so that the
// slow-rate logic is clocked once every UP fast cycles through a clock
// enable. Using a clock enable instead of a divided clock is this design's
// choice; the factor UP = 4 is the reference design's.
//
// phase is the interpolation index k used by the interpolators in the
// cycle after a sample was loaded (k = 0 right after the load).
// Asynchronous active-low reset sets phase to 0.
module interp_counter #(
  parameter int unsigned UP    = 4,
  localparam int unsigned PH_W = (UP > 1) ? $clog2(UP) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic [PH_W-1:0] phase,
  output logic            sample_en
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      phase <= '0;
    else if (phase == PH_W'(UP - 1)) phase <= '0;
    else                             phase <= phase + 1'b1;
  end

  assign sample_en = (phase == PH_W'(UP - 1));

endmodule

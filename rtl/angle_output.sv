// angle_output: delay matching and serial/parallel multiplexing of the angle.
//
// The amplitude passes through the barrel shifter and the dac_pwm clip
// register after its interpolator; DELAY registers here give the angle the
// same delay so amplitude and phase reach the power amplifier together.
// The angle port then carries either
//   ser_mode = 0: the delayed W-bit angle word (parallel output), or
//   ser_mode = 1: bit 0 = serial data, bit 1 = word sync, other bits 0.
// In serial mode a W-bit shift register is loaded with the delayed angle
// every W clocks and shifted out MSB first; sync is high while the MSB is
// on the line. Delay-matching registers and a serial/parallel port mux are
// the reference design's; the serial format is this design's.
//
// Timing: parallel output lags din by DELAY clocks. Serial word n is the
// delayed angle at the load clock. Async active-low reset.
module angle_output #(
  parameter int unsigned W     = 10,
  parameter int unsigned DELAY = 2,
  localparam int unsigned BC_W = $clog2(W)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ser_mode,
  input  logic [W-1:0]  din,
  output logic [W-1:0]  angle_out
);

  logic [W-1:0]    dly [DELAY+1];
  logic [W-1:0]    sreg;
  logic [BC_W-1:0] bitcnt;

  assign dly[0] = din;
  for (genvar i = 0; i < DELAY; i++) begin : g_dly
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) dly[i+1] <= '0;
      else        dly[i+1] <= dly[i];
    end
  end

  // Serial converter: load at bitcnt == 0, shift on the other W-1 clocks.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bitcnt <= '0;
      sreg   <= '0;
    end else begin
      if (bitcnt == BC_W'(W - 1)) bitcnt <= '0;
      else                        bitcnt <= bitcnt + 1'b1;
      if (bitcnt == '0) sreg <= dly[DELAY];
      else              sreg <= {sreg[W-2:0], 1'b0};
    end
  end

  // sync marks the MSB, which sits on the line in the clock after the load.
  logic sync;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= 1'b0;
    else        sync <= (bitcnt == '0);
  end

  always_comb begin
    if (ser_mode) angle_out = W'({sync, sreg[W-1]});
    else          angle_out = dly[DELAY];
  end

endmodule

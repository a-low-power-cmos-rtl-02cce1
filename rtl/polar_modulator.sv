// polar_modulator: digital polar modulator for a WCDMA polar transmitter.
//
// Unsigned 10-bit I/Q samples are converted to polar form (magnitude R,
// angle A) by the pipelined CORDIC processor. Both streams are then raised
// to UP times the sample rate by linear interpolators. The amplitude goes
// through the barrel shifter (external gain) into the DAC-PWM block, which
// clips it with an overflow flag and turns it into a PWM stream for the
// switch-mode supply of the power amplifier. The angle goes through
// delay-matching registers to a port that is either parallel or serial,
// towards the phase DAC and VCO. The chain and the factor of 4 follow the
// reference architecture; clocking the slow part through a clock enable
// is this design's choice.
//
//   i_in,q_in -> cordic_processor -+-> interpolator(R) -> barrel_shifter -> dac_pwm -> pwm_out, amp_par, overflow
//   (slow rate, en = sample_req)   +-> interpolator(A, modulo) -> angle_output       -> angle_out
//
// Timing: one fast clock. interp_counter raises sample_req one cycle in UP;
// the I/Q pair present in that cycle is taken. The CORDIC takes 10 slow
// cycles; the interpolators add one slow sample and one fast cycle; the
// amplitude path then has 2 more register stages (barrel shifter, clip),
// matched by the 2 delay registers of angle_output, so amp_par and a
// parallel angle_out belong to the same point in time.
// The CORDIC's residual y (ideally zero) is not needed downstream and is
// left unconnected here. Async active-low reset.
module polar_modulator
  import cordic_pkg::*;
#(
  parameter int unsigned UP     = 4,
  parameter int unsigned GAIN_W = 3,
  parameter int unsigned PWM_W  = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] i_in,
  input  logic [DATA_W-1:0] q_in,
  input  logic [GAIN_W-1:0] gain,
  input  logic              ser_mode,
  output logic              sample_req,
  output logic              pwm_out,
  output logic [PWM_W-1:0]  amp_par,
  output logic              overflow,
  output logic [ANG_W-1:0]  angle_out
);

  localparam int unsigned PH_W  = (UP > 1) ? $clog2(UP) : 1;
  localparam int unsigned BS_W  = DATA_W + (1 << GAIN_W) - 1;

  logic [PH_W-1:0]        phase;
  logic                   c_valid;
  logic [DATA_W-1:0]      c_r;
  logic [ANG_W-1:0]       c_a;
  logic                   i_load;
  logic [DATA_W-1:0]      r_fast;
  logic [ANG_W-1:0]       a_fast;
  logic [BS_W-1:0]        r_gain;

  interp_counter #(.UP(UP)) u_cnt (
    .clk, .rst_n, .phase, .sample_en(sample_req)
  );

  cordic_processor u_cordic (
    .clk, .rst_n, .en(sample_req), .in_valid(1'b1),
    .xi(i_in), .yi(q_in), .zi('0),
    .out_valid(c_valid), .xj(c_r), .yj(), .zj(c_a)
  );

  assign i_load = sample_req & c_valid;

  interpolator #(.W(DATA_W), .UP(UP), .MODULAR(1'b0)) u_interp_r (
    .clk, .rst_n, .load(i_load), .phase, .din(c_r), .dout(r_fast)
  );

  interpolator #(.W(ANG_W), .UP(UP), .MODULAR(1'b1)) u_interp_a (
    .clk, .rst_n, .load(i_load), .phase, .din(c_a), .dout(a_fast)
  );

  barrel_shifter #(.IN_W(DATA_W), .SH_W(GAIN_W)) u_bshift (
    .clk, .rst_n, .din(r_fast), .shamt(gain), .dout(r_gain)
  );

  dac_pwm #(.IN_W(BS_W), .PWM_W(PWM_W)) u_pwm (
    .clk, .rst_n, .din(r_gain), .par_out(amp_par), .overflow, .pwm_out
  );

  angle_output #(.W(ANG_W), .DELAY(2)) u_aout (
    .clk, .rst_n, .ser_mode, .din(a_fast), .angle_out
  );

endmodule

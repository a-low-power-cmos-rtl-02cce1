// dac_pwm: range clip with overflow flag, then parallel-to-PWM conversion.
//
// Stage 1 (one register): if din exceeds 2^PWM_W - 1 the word is out of
// range, overflow is raised and par_out is held at the maximum value;
// otherwise par_out = din. This clip-and-flag behaviour is the reference
// design's.
//
// Stage 2: a free-running PWM_W-bit counter. When it wraps to 0 the duty
// register takes par_out; pwm_out is high while counter < duty, so each
// period of 2^PWM_W clocks carries one amplitude word as a pulse width.
// The counter-compare PWM scheme is this design's reading of "converts
// parallel data to serial data" for the switch-mode supply.
//
// Async active-low reset clears everything (pwm_out low).
module dac_pwm #(
  parameter int unsigned IN_W  = 17,
  parameter int unsigned PWM_W = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [IN_W-1:0]  din,
  output logic [PWM_W-1:0] par_out,
  output logic             overflow,
  output logic             pwm_out
);

  logic             ovf;
  logic [PWM_W-1:0] cnt, duty;

  if (IN_W > PWM_W) begin : g_ovf
    assign ovf = |din[IN_W-1:PWM_W];
  end else begin : g_noovf
    assign ovf = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      par_out  <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= ovf;
      par_out  <= ovf ? '1 : PWM_W'(din);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      duty <= '0;
    end else begin
      cnt <= cnt + 1'b1;
      if (cnt == '1) duty <= par_out;
    end
  end

  assign pwm_out = (cnt < duty);

endmodule

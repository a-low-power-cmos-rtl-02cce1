// tb_dac_pwm: clipping, overflow flag and PWM duty.
//
// Uses PWM_W = 6 (64-clock period) to keep the run short, and the default
// 17-bit input. Checks: par_out/overflow one clock after din, clipped to
// 63 with overflow set above range; and that in every PWM period the
// number of high clocks equals the duty latched at the period start.
module tb_dac_pwm;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [16:0] din = '0;
  logic [5:0]  par_out;
  logic        overflow, pwm_out;
  int checks = 0, failures = 0;
  int n_ovf = 0;
  int tcnt = 0;   // mirror of the free-running PWM counter

  always @(posedge clk) if (rst_n) tcnt <= (tcnt + 1) % 64;

  always #5 clk = ~clk;

  dac_pwm #(.IN_W(17), .PWM_W(6)) u_dut (.clk, .rst_n, .din, .par_out, .overflow, .pwm_out);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Clip check on every clock
  initial begin
    @(posedge rst_n);
    forever begin
      automatic int v;
      @(negedge clk);
      v = int'(din);
      @(posedge clk); #1;
      checks++;
      if (overflow != (v > 63) || int'(par_out) != ((v > 63) ? 63 : v)) begin
        failures++;
        $display("FAIL din=%0d par=%0d ovf=%b", v, par_out, overflow);
      end
      if (overflow) n_ovf++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    // PWM periods: hold a value for a whole period, count high clocks in the next
    for (int p = 0; p < 300; p++) begin
      automatic int v = (p % 5 == 4) ? int'($urandom_range(64, 131071)) : int'($urandom_range(0, 63));
      automatic int want = (v > 63) ? 63 : v;
      automatic int high = 0;
      // align to counter wrap: cnt == 63 at the start of the period
      while (tcnt != 62) @(negedge clk);
      din = 17'(v);
      @(negedge clk);   // cnt == 63: duty latched at the following edge from par_out
      @(negedge clk);   // cnt == 0
      for (int c = 0; c < 64; c++) begin
        high += int'(pwm_out);
        if (c != 63) @(negedge clk);
      end
      checks++;
      if (p > 0 && high != want) begin
        failures++;
        $display("FAIL period %0d: %0d high clocks, want %0d", p, high, want);
      end
    end
    checks++;
    if (n_ovf == 0) begin failures++; $display("FAIL no overflow seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

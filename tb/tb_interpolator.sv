// tb_interpolator: linear interpolation by 4 of unsigned and modular data.
//
// An interp_counter drives two interpolators (magnitude style and modulo
// 1024 angle style) with a new random sample on every strobe. For each fast
// cycle the expected output is computed here as a real-valued point on the
// line between the previous two samples, floor(s0 + (s1 - s0) * k / 4),
// with the angle difference taken along the short way round. Also checks
// the rate: exactly 4 output points per input sample, and that the
// segment starts at the previous sample and reaches the new one.
module tb_interpolator;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] phase;
  logic load;
  logic [9:0] din_r = '0, din_a = '0, out_r, out_a;
  int checks = 0, failures = 0;
  int n_wrap = 0;

  always #5 clk = ~clk;

  interp_counter u_cnt (.clk, .rst_n, .phase, .sample_en(load));
  interpolator #(.W(10), .UP(4), .MODULAR(1'b0)) u_r (.clk, .rst_n, .load, .phase, .din(din_r), .dout(out_r));
  interpolator #(.W(10), .UP(4), .MODULAR(1'b1)) u_a (.clk, .rst_n, .load, .phase, .din(din_a), .dout(out_a));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int pr0 = 0, pr1 = 0, pa0 = 0, pa1 = 0;   // previous and current samples
    int k;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    for (int s = 0; s < 1000; s++) begin
      // wait for the strobe, present a new sample for it
      while (!load) @(negedge clk);
      din_r = 10'($urandom_range(0, 1023));
      din_a = (s % 3 == 0) ? 10'($urandom_range(1000, 1023) + $urandom_range(0, 40))  // near the wrap
                           : 10'($urandom_range(0, 1023));
      @(posedge clk);
      pr0 = pr1; pr1 = int'(din_r);
      pa0 = pa1; pa1 = int'(din_a);
      for (k = 0; k < 4; k++) begin
        automatic int dr = pr1 - pr0;
        automatic int da = ((pa1 - pa0 + 512) & 1023) - 512;
        automatic int er = int'($floor(real'(pr0) + real'(dr) * real'(k) / 4.0));
        automatic int ea = int'($floor(real'(pa0) + real'(da) * real'(k) / 4.0)) & 1023;
        if (pa0 + da > 1023 || pa0 + da < 0) n_wrap++;
        @(posedge clk); #1;
        if (s > 0) begin
          checks++;
          if (int'(out_r) != er || int'(out_a) != ea) begin
            failures++;
            $display("FAIL s=%0d k=%0d: r=%0d want %0d, a=%0d want %0d", s, k, out_r, er, out_a, ea);
          end
        end
      end
      @(negedge clk);
    end
    checks++;
    if (n_wrap == 0) begin failures++; $display("FAIL angle never wrapped"); end
    $display("angle segments across 0: %0d", n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

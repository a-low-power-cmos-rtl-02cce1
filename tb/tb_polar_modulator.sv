// tb_polar_modulator: end-to-end test of the polar modulator at its
// default parameters (UP = 4, 3-bit gain, 10-bit PWM).
//
// The I/Q input, gain and port mode are changed in steps, each held for a
// number of sample strobes. For each step the expected magnitude R and
// angle A come from an integer model of the CORDIC written here. Checks:
//  * transition: amp_par and the parallel angle_out walk from the old to
//    the new value in UP evenly spaced points, on the same clocks (delay
//    matching), at a fixed latency of 43..46 clocks after the strobe that
//    took the sample (10 CORDIC samples, one interpolator sample, the
//    barrel shifter and the clip register);
//  * steady state: amp_par = min(R << gain, 1023), overflow set exactly when
//    the shifted value is out of range, angle_out = A in parallel mode and,
//    in serial mode, a word rebuilt from the serial bit equal to A;
//  * PWM: over one full 1024-clock period the number of high clocks equals
//    amp_par;
//  * the published reference points are among the steps.
// Each mechanism (four quadrants, interpolation, angle wrap across 0,
// overflow, non-zero gain, serial mode, parallel mode, PWM period) is
// counted and must occur at least once.
module tb_polar_modulator;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic [9:0] i_in = 10'd512, q_in = 10'd512;
  logic [2:0] gain = '0;
  logic       ser_mode = 1'b0;
  logic       sample_req, pwm_out, overflow;
  logic [9:0] amp_par, angle_out;

  int checks = 0, failures = 0;
  int cyc = 0;              // posedges since reset release
  int n_quad [4] = '{0, 0, 0, 0};
  int n_interp = 0, n_wrap = 0, n_ovf = 0, n_gain = 0, n_ser = 0, n_par = 0, n_pwm = 0;

  always #5 clk = ~clk;

  polar_modulator u_dut (
    .clk, .rst_n, .i_in, .q_in, .gain, .ser_mode,
    .sample_req, .pwm_out, .amp_par, .overflow, .angle_out
  );

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  localparam int ATAN_DEC [8] = '{127, 75, 39, 20, 10, 5, 2, 1};

  function automatic int fdiv(int v, int d);
    return (v >= 0) ? v / d : -((-v + d - 1) / d);
  endfunction

  function automatic void model(int X, int Y, output int r, output int a);
    int xs = X - 512, ys = Y - 512;
    int x = ((xs < 0) ? -xs : xs) * 4;
    int y = ((ys < 0) ? -ys : ys) * 4;
    int z = 0, m, xn, yn;
    for (int i = 0; i < 8; i++) begin
      if (y >= 0) begin xn = x + fdiv(y, 1 << i); yn = y - fdiv(x, 1 << i); z += ATAN_DEC[i]; end
      else        begin xn = x - fdiv(y, 1 << i); yn = y + fdiv(x, 1 << i); z -= ATAN_DEC[i]; end
      x = xn; y = yn;
    end
    m = fdiv(x, 2) + fdiv(x, 8) - fdiv(x, 64) - fdiv(x, 512);
    r = (m + 2) / 4;
    if (xs >= 0 && ys >= 0)     a = z;
    else if (xs < 0 && ys >= 0) a = 512 - z;
    else if (xs < 0)            a = 512 + z;
    else                        a = 1024 - z;
    a = a & 1023;
  endfunction

  function automatic int sat(int v, int g);
    int s = v << g;
    return (s > 1023) ? 1023 : s;
  endfunction

  task automatic fail(string msg);
    failures++;
    $display("FAIL t=%0d %s", cyc, msg);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N_REF = 7;
  localparam int REF [N_REF][2] = '{'{612, 562}, '{612, 612}, '{612, 712}, '{512, 712},
                                    '{412, 712}, '{412, 612}, '{412, 562}};
  localparam int N_STEPS = 60;
  localparam int HOLD    = 16;     // sample strobes per step
  localparam int LONG    = 600;    // strobes of the step that checks the PWM
  localparam int LAT     = 42;     // k = 0 (old value) shows LAT+1 clocks after the sampling edge

  initial begin
    automatic int r_old = 0, a_old = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    for (int s = 0; s < N_STEPS; s++) begin
      automatic int X, Y, r_new, a_new, e0, hold, dr, da, xs, ys;
      automatic int g;
      automatic bit ser;
      // choose the step's input
      if (s < N_REF)        begin X = REF[s][0]; Y = REF[s][1]; end
      else if (s % 6 == 0)  begin X = 700; Y = 500 - (s % 4); end          // just below 0 deg
      else if (s % 6 == 1)  begin X = 700; Y = 530 + (s % 4); end          // just above 0 deg
      else                  begin X = int'($urandom_range(0, 1023)); Y = int'($urandom_range(0, 1023)); end
      g   = (s < N_REF + 2) ? 0 : int'($urandom_range(0, 7));
      ser = (s >= N_REF + 2 && s % 3 == 2);
      model(X, Y, r_new, a_new);
      xs = X - 512; ys = Y - 512;
      n_quad[(xs >= 0) ? ((ys >= 0) ? 0 : 3) : ((ys >= 0) ? 1 : 2)]++;
      if (g != 0) n_gain++;
      hold = (s == N_REF + 3) ? LONG : HOLD;
      // apply on the strobe
      while (!sample_req) @(negedge clk);
      i_in = 10'(X); q_in = 10'(Y); gain = 3'(g); ser_mode = ser;
      e0 = cyc + 1;
      dr = r_new - r_old;
      da = ((a_new - a_old + 512) & 1023) - 512;
      if (a_old + da > 1023 || a_old + da < 0) n_wrap++;
      // transition window
      for (int k = 0; k <= 4; k++) begin
        automatic int vr = (k < 4) ? r_old + fdiv(dr * k, 4) : r_new;
        automatic int va = (k < 4) ? ((a_old + fdiv(da * k, 4)) & 1023) : a_new;
        while (cyc != e0 + LAT + k + 1) @(negedge clk);
        checks++;
        if (int'(amp_par) != sat(vr, g))
          fail($sformatf("step %0d k=%0d amp %0d want %0d", s, k, amp_par, sat(vr, g)));
        if (!ser) begin
          checks++;
          if (int'(angle_out) != va)
            fail($sformatf("step %0d k=%0d angle %0d want %0d", s, k, angle_out, va));
        end
        if (k > 0 && k < 4 && dr != 0 && vr != r_old && vr != r_new) n_interp++;
      end
      // steady state near the end of the step
      while (cyc < e0 + 4 * hold - 12) @(negedge clk);
      checks++;
      if (int'(amp_par) != sat(r_new, g) || overflow != ((r_new << g) > 1023))
        fail($sformatf("step %0d steady amp %0d ovf %b, want %0d", s, amp_par, overflow, sat(r_new, g)));
      if (overflow) n_ovf++;
      if (!ser) begin
        checks++; n_par++;
        if (int'(angle_out) != a_new) fail($sformatf("step %0d steady angle %0d want %0d", s, angle_out, a_new));
      end else begin
        automatic int word = 0;
        while (!angle_out[1]) @(negedge clk);
        for (int b = 0; b < 10; b++) begin
          word = (word << 1) | int'(angle_out[0]);
          @(negedge clk);
        end
        checks++; n_ser++;
        if (word != a_new) fail($sformatf("step %0d serial angle %0d want %0d", s, word, a_new));
      end
      if (hold == LONG) begin
        // one whole PWM period: counter mirrors cyc mod 1024
        automatic int high = 0;
        while ((cyc % 1024) != 0) @(negedge clk);
        for (int c = 0; c < 1024; c++) begin high += int'(pwm_out); @(negedge clk); end
        checks++; n_pwm++;
        if (high != int'(amp_par)) fail($sformatf("PWM %0d high clocks, amp %0d", high, amp_par));
      end
      if (s < N_REF) $display("reference point %0d: I=%0d Q=%0d -> R=%0d A=%0d", s, X, Y, r_new, a_new);
      r_old = r_new; a_old = a_new;
    end
    // mechanisms
    foreach (n_quad[q]) begin
      checks++;
      if (n_quad[q] == 0) fail($sformatf("quadrant %0d never used", q + 1));
    end
    checks += 7;
    if (n_interp == 0) fail("no interpolated point");
    if (n_wrap   == 0) fail("angle never interpolated across 0");
    if (n_ovf    == 0) fail("no overflow");
    if (n_gain   == 0) fail("gain never non-zero");
    if (n_ser    == 0) fail("serial mode never used");
    if (n_par    == 0) fail("parallel mode never used");
    if (n_pwm    == 0) fail("PWM never checked");
    $display("quadrants %0d %0d %0d %0d, interpolated points %0d, wraps %0d, overflows %0d, gain steps %0d, serial %0d, parallel %0d, pwm %0d",
             n_quad[0], n_quad[1], n_quad[2], n_quad[3], n_interp, n_wrap, n_ovf, n_gain, n_ser, n_par, n_pwm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

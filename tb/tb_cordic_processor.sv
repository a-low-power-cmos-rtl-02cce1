// tb_cordic_processor: end-to-end test of the pipelined CORDIC.
//
// Three kinds of checks:
//  * bit-exact: random I/Q streams are compared with an integer model of
//    the algorithm written here (origin move, |.|, 8 shift-add iterations
//    with the tabulated arctan values, shift-add scaling, quadrant mapping);
//  * accuracy: the same results against real-valued sqrt/atan2 (magnitude
//    within 2, angle within 5 units of 360/1024 degree for |v| >= 16);
//  * the published reference points (seven I/Q pairs with their measured
//    R and A), magnitude within 1 and angle within 3 units;
// plus the latency (10 enabled cycles) and a stall with en toggling.
// Half of the random samples carry a non-zero start angle zi, which must
// come out added to the angle.
module tb_cordic_processor;
  import cordic_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, in_valid = 1'b0;
  logic [9:0] xi = '0, yi = '0, zi = '0;
  logic out_valid;
  logic [9:0] xj, zj;
  logic signed [13:0] yj;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cordic_processor u_dut (.clk, .rst_n, .en, .in_valid, .xi, .yi, .zi, .out_valid, .xj, .yj, .zj);

  localparam int ATAN_DEC [8] = '{127, 75, 39, 20, 10, 5, 2, 1};

  function automatic int fdiv(int v, int d);
    return (v >= 0) ? v / d : -((-v + d - 1) / d);
  endfunction

  // Integer model: returns {r, a}
  function automatic void model(int X, int Y, int Z, output int r, output int a);
    int xs = X - 512, ys = Y - 512;
    int x = ((xs < 0) ? -xs : xs) * 4;
    int y = ((ys < 0) ? -ys : ys) * 4;
    int z = 0, m, xn, yn;
    for (int i = 0; i < 8; i++) begin
      int d = 1 << i;
      if (y >= 0) begin xn = x + fdiv(y, d); yn = y - fdiv(x, d); z += ATAN_DEC[i]; end
      else        begin xn = x - fdiv(y, d); yn = y + fdiv(x, d); z -= ATAN_DEC[i]; end
      x = xn; y = yn;
    end
    m = fdiv(x, 2) + fdiv(x, 8) - fdiv(x, 64) - fdiv(x, 512);
    r = (m + 2) / 4;
    if (xs >= 0 && ys >= 0)     a = z;
    else if (xs < 0 && ys >= 0) a = 512 - z;
    else if (xs < 0)            a = 512 + z;
    else                        a = 1024 - z;
    a = (a + Z) & 1023;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Published operating points: X, Y, R(out), A(out)
  localparam int REF [7][4] = '{
    '{612, 562, 112,  75}, '{612, 612, 142, 127}, '{612, 712, 224, 181},
    '{512, 712, 200, 255}, '{412, 712, 224, 331}, '{412, 612, 142, 385},
    '{412, 562, 112, 437}};

  int qx [$], qy [$], qz [$];
  int n_stall = 0;

  task automatic check_out();
    int er, ea, X, Y, Z;
    real rr, aa, da;
    X = qx.pop_front(); Y = qy.pop_front(); Z = qz.pop_front();
    model(X, Y, Z, er, ea);
    checks++;
    if (int'(xj) != er || int'(zj) != ea) begin
      failures++;
      $display("FAIL X=%0d Y=%0d: R=%0d A=%0d want %0d %0d", X, Y, xj, zj, er, ea);
    end
    rr = $sqrt(real'((X - 512) * (X - 512) + (Y - 512) * (Y - 512)));
    if (rr >= 16.0) begin
      aa = $atan2(real'(Y - 512), real'(X - 512)) * 512.0 / 3.14159265358979 + real'(Z);
      while (aa < 0.0) aa += 1024.0;
      while (aa >= 1024.0) aa -= 1024.0;
      da = real'(zj) - aa;
      if (da > 512.0) da -= 1024.0;
      if (da < -512.0) da += 1024.0;
      checks++;
      if (da > 5.0 || da < -5.0 || real'(xj) - rr > 2.0 || rr - real'(xj) > 2.0) begin
        failures++;
        $display("FAIL accuracy X=%0d Y=%0d: R=%0d (%f) A=%0d (%f)", X, Y, xj, rr, zj, aa);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // Latency: single valid sample with en high every cycle.
    @(negedge clk); en = 1'b1; in_valid = 1'b1; xi = 10'd612; yi = 10'd562;
    qx.push_back(612); qy.push_back(562); qz.push_back(0);
    @(negedge clk); in_valid = 1'b0;
    begin
      automatic int lat = 1;
      while (!out_valid && lat < 40) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 10) begin failures++; $display("FAIL latency %0d, want 10", lat); end
      check_out();
    end
    repeat (12) @(negedge clk);

    // Published points, then random stream, en sometimes low (stall).
    for (int n = 0; n < 4000 + 7; n++) begin
      int X, Y, Z;
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      if (!en) n_stall++;
      if (en && out_valid) check_out();
      if (n < 7) begin X = REF[n][0]; Y = REF[n][1]; Z = 0; end
      else       begin X = int'($urandom_range(0, 1023)); Y = int'($urandom_range(0, 1023));
                       Z = (n % 2 == 0) ? 0 : int'($urandom_range(0, 1023)); end
      if (en) begin
        xi = 10'(X); yi = 10'(Y); zi = 10'(Z); in_valid = 1'b1;
        qx.push_back(X); qy.push_back(Y); qz.push_back(Z);
        if (n < 7) begin
          // the published point enters now; check its result when it leaves
          fork
            automatic int k = n;
            begin
              automatic int seen = 0;
              while (seen < 10) begin @(posedge clk); if (en) seen++; end
              #1;
              checks++;
              if ((int'(xj) - REF[k][2]) > 1 || (REF[k][2] - int'(xj)) > 1 ||
                  (int'(zj) - REF[k][3]) > 3 || (REF[k][3] - int'(zj)) > 3) begin
                failures++;
                $display("FAIL reference point %0d: R=%0d A=%0d, published %0d %0d",
                         k, xj, zj, REF[k][2], REF[k][3]);
              end
            end
          join_none
        end
      end else begin
        xi = ~xi;  // must be ignored
      end
    end
    checks++;
    if (n_stall == 0) failures++;
    $display("stalled cycles: %0d", n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cordic_postproc: scaling and quadrant recovery after the CE pipeline.
//
// Random first-quadrant words (x >= 0, random y, z, quadrant) are fed with
// en held high; two cycles later r must equal round(x * (1/2+1/8-1/64-1/512)
// / 4) computed with floor divisions here, and a the quadrant-mapped angle.
// A separate real-valued check confirms the scale is within 0.1 % of
// K = 0.607259. The 2-cycle latency is checked with a single marked word.
module tb_cordic_postproc;
  import cordic_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  ce_t  din;
  logic out_valid;
  logic [9:0] r, a;
  logic signed [13:0] y_res;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cordic_postproc u_dut (.clk, .rst_n, .en, .ce_in(din), .out_valid, .r, .y_res, .a);

  function automatic int fdiv(int v, int d);
    return (v >= 0) ? v / d : -((-v + d - 1) / d);
  endfunction

  function automatic int exp_r(int x);
    int m = fdiv(x, 2) + fdiv(x, 8) - fdiv(x, 64) - fdiv(x, 512);
    return (m + 2) / 4;
  endfunction

  function automatic int exp_a(int q, int z);
    case (q)
      0: return z;
      1: return (512 - z) & 1023;
      2: return (512 + z) & 1023;
      default: return (1024 - z) & 1023;
    endcase
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xs [$], qs [$], zs [$], ys [$];
    din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // latency: one valid word, then idle
    @(negedge clk); en = 1'b1; din.valid = 1'b1; din.x = 14'd1000;
    @(negedge clk); din.valid = 1'b0;
    begin
      automatic int lat = 1;
      while (!out_valid && lat < 20) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 2) begin failures++; $display("FAIL latency %0d, want 2", lat); end
    end
    // stream of random words
    for (int n = 0; n < 1200; n++) begin
      @(negedge clk);
      if (xs.size() >= 2) begin
        automatic int ex = exp_r(xs.pop_front()), ea = exp_a(qs.pop_front(), zs.pop_front());
        automatic int ey = ys.pop_front();
        checks++;
        if (int'(r) != ex || int'(a) != ea || int'(y_res) != ey) begin
          failures++;
          $display("FAIL r=%0d a=%0d y=%0d want %0d %0d %0d", r, a, y_res, ex, ea, ey);
        end
      end
      din.valid = 1'b1;
      din.x = CE_W'($urandom_range(0, 4772));
      din.y = CE_W'($signed(int'($urandom_range(0, 40)) - 20));
      din.z = ANG_W'($urandom_range(0, 300));
      din.quad = quad_e'($urandom_range(0, 3));
      xs.push_back(int'(din.x)); qs.push_back(int'(din.quad));
      zs.push_back(int'(din.z)); ys.push_back(int'(din.y));
    end
    // scale accuracy against the ideal K: |v| = 1150.0 (x = 4600 with 2 fraction bits)
    @(negedge clk); din.x = 14'd4600; din.quad = QUAD1;
    @(negedge clk); @(negedge clk);
    checks++;
    if (real'(r) / 1150.0 < 0.6066 || real'(r) / 1150.0 > 0.6079) begin
      failures++; $display("FAIL scale %0d / 1150", r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cordic_element: self-checking test of single CORDIC elements.
//
// Instantiates the elements for stages 0, 3 and 7, drives random words
// (both signs of y, random z, quadrant and valid), and compares each
// registered output with a reference computed here with integer
// arithmetic: floor(v / 2^i) by division, the sign rule s = +1 for y >= 0,
// and the tabulated arctan values written out as decimal numbers. Also
// checks that the register holds while en is low.
module tb_cordic_element;
  import cordic_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  ce_t  din;
  ce_t  dout [3];
  int   checks = 0, failures = 0;

  localparam int STG [3] = '{0, 3, 7};
  localparam int ATAN_DEC [8] = '{127, 75, 39, 20, 10, 5, 2, 1};

  always #5 clk = ~clk;

  for (genvar k = 0; k < 3; k++) begin : g_dut
    cordic_element #(.STAGE(STG[k])) u_dut (.clk, .rst_n, .en, .ce_in(din), .ce_out(dout[k]));
  end

  function automatic int floor_div(int v, int d);
    int q = v / d;
    if ((v % d != 0) && (v < 0)) q -= 1;
    return q;
  endfunction

  task automatic check_stage(int k, ce_t in, ce_t out);
    int x = int'(in.x), y = int'(in.y), z = int'(in.z);
    int i = STG[k];
    int ex, ey, ez, s;
    s  = (y >= 0) ? 1 : -1;
    ex = x + s * floor_div(y, 1 << i);
    ey = y - s * floor_div(x, 1 << i);
    ez = (z + s * ATAN_DEC[i]) & 1023;
    checks++;
    if (int'(out.x) != ex || int'(out.y) != ey || int'(out.z) != ez ||
        out.quad != in.quad || out.valid != in.valid) begin
      failures++;
      $display("FAIL stage %0d in x=%0d y=%0d z=%0d: got x=%0d y=%0d z=%0d, want %0d %0d %0d",
               i, x, y, z, int'(out.x), int'(out.y), int'(out.z), ex, ey, ez);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ce_t held [3];
    din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      din.x     = CE_W'($signed(int'($urandom_range(0, 4800)) - 800));
      din.y     = CE_W'($signed(int'($urandom_range(0, 6000)) - 3000));
      din.z     = ANG_W'($urandom);
      din.quad  = quad_e'($urandom_range(0, 3));
      din.valid = 1'($urandom);
      en = 1'b1;
      @(posedge clk); #1;
      for (int k = 0; k < 3; k++) check_stage(k, din, dout[k]);
      // hold check: en low, new input must not be captured
      @(negedge clk);
      for (int k = 0; k < 3; k++) held[k] = dout[k];
      en = 1'b0;
      din.x = ~din.x;
      @(posedge clk); #1;
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (dout[k] != held[k]) begin failures++; $display("FAIL hold stage %0d", STG[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

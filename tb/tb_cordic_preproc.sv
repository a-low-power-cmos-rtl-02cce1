// tb_cordic_preproc: exhaustive-in-steps test of the origin/quadrant move.
//
// For a grid of unsigned I/Q inputs the expected quadrant and first-quadrant
// magnitudes (with the two fraction bits appended) are computed here from
// X' = X - 512, Y' = Y - 512 and compared with the combinational outputs.
// The start angle must be +zi in quadrants 1 and 3 and -zi in 2 and 4.
// Every quadrant is visited, including the axis points.
module tb_cordic_preproc;
  import cordic_pkg::*;

  logic [9:0] xi, yi, zi;
  logic       in_valid;
  ce_t        ce_out;
  int checks = 0, failures = 0;
  int qcount [4] = '{0, 0, 0, 0};

  cordic_preproc u_dut (.xi, .yi, .zi, .in_valid, .ce_out);

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 1024; x += 7) begin
      for (int y = 0; y < 1024; y += 11) begin
        automatic int xs = x - 512, ys = y - 512;
        automatic int q  = (xs >= 0) ? ((ys >= 0) ? 0 : 3) : ((ys >= 0) ? 1 : 2);
        automatic int ax = (xs < 0) ? -xs : xs;
        automatic int ay = (ys < 0) ? -ys : ys;
        automatic int ez;
        xi = 10'(x); yi = 10'(y); zi = 10'($urandom); in_valid = 1'((x + y) & 1);
        ez = (q == 1 || q == 3) ? ((1024 - int'(zi)) & 1023) : int'(zi);
        #1;
        checks++;
        qcount[q]++;
        if (int'(ce_out.quad) != q || int'(ce_out.x) != ax * 4 || int'(ce_out.y) != ay * 4 ||
            int'(ce_out.z) != ez || ce_out.valid != in_valid) begin
          failures++;
          $display("FAIL x=%0d y=%0d: q=%0d x=%0d y=%0d", x, y, ce_out.quad, ce_out.x, ce_out.y);
        end
      end
    end
    // axis and corner points
    foreach (qcount[i]) begin
      checks++;
      if (qcount[i] == 0) begin failures++; $display("FAIL quadrant %0d never seen", i + 1); end
    end
    zi = '0;
    xi = 10'd512; yi = 10'd0; #1; checks++;
    if (ce_out.quad != QUAD4 || int'(ce_out.y) != 2048 || ce_out.x != '0) failures++;
    xi = 10'd0; yi = 10'd512; #1; checks++;
    if (ce_out.quad != QUAD2 || int'(ce_out.x) != 2048 || ce_out.y != '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

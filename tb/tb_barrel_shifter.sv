// tb_barrel_shifter: every shift amount on random data, one-cycle latency.
module tb_barrel_shifter;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [9:0]  din = '0;
  logic [2:0]  shamt = '0;
  logic [16:0] dout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  barrel_shifter u_dut (.clk, .rst_n, .din, .shamt, .dout);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      automatic int v = int'($urandom_range(0, 1023));
      automatic int s = n % 8;
      din = 10'(v); shamt = 3'(s);
      @(posedge clk); #1;
      checks++;
      if (int'(dout) != v * (1 << s)) begin
        failures++;
        $display("FAIL %0d << %0d = %0d", v, s, dout);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_interp_counter: the phase counter counts 0..UP-1 and strobes once per UP.
//
// Runs the default UP = 4 and a UP = 8 instance; checks the phase sequence
// against a counter kept here and that sample_en is high exactly in the
// last phase, i.e. exactly once every UP clocks.
module tb_interp_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] ph4;
  logic [2:0] ph8;
  logic se4, se8;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  interp_counter            u4 (.clk, .rst_n, .phase(ph4), .sample_en(se4));
  interp_counter #(.UP(8))  u8 (.clk, .rst_n, .phase(ph8), .sample_en(se8));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int n4 = 0, n8 = 0;
    repeat (3) @(posedge clk);
    #1; checks++;
    if (ph4 != 0 || ph8 != 0) failures++;
    @(negedge clk); rst_n = 1'b1;
    for (int t = 0; t < 800; t++) begin
      @(negedge clk);
      checks++;
      if (int'(ph4) != ((t + 1) % 4) || int'(ph8) != ((t + 1) % 8) ||
          se4 != (((t + 1) % 4) == 3) || se8 != (((t + 1) % 8) == 7)) begin
        failures++;
        $display("FAIL t=%0d ph4=%0d ph8=%0d se4=%b se8=%b", t, ph4, ph8, se4, se8);
      end
      n4 += int'(se4); n8 += int'(se8);
    end
    checks++;
    if (n4 != 200 || n8 != 100) begin failures++; $display("FAIL strobe counts %0d %0d", n4, n8); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

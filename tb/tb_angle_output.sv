// tb_angle_output: delay matching and serial/parallel port mux.
//
// Parallel mode: angle_out must equal din from DELAY = 2 clocks earlier.
// Serial mode: words are rebuilt from bit 0, framed by the sync on bit 1,
// and each rebuilt word must equal the delayed angle at its load clock
// (din three clocks before the sync). Bits above 1 must be zero.
module tb_angle_output;
  logic clk = 1'b0, rst_n = 1'b0, ser_mode = 1'b0;
  logic [9:0] din = '0, angle_out;
  int checks = 0, failures = 0;
  int hist [$];
  int n_words = 0;

  always #5 clk = ~clk;

  angle_output u_dut (.clk, .rst_n, .ser_mode, .din, .angle_out);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // history of din per clock, newest at the back
  always @(posedge clk) begin
    hist.push_back(int'(din));
    if (hist.size() > 16) void'(hist.pop_front());
  end

  initial begin
    int word, nbits;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      din = 10'($urandom);
      @(negedge clk);
      if (t > 4) begin
        checks++;
        if (int'(angle_out) != hist[hist.size() - 2]) begin
          failures++;
          $display("FAIL parallel t=%0d out=%0d want %0d", t, angle_out, hist[hist.size() - 2]);
        end
      end
    end
    ser_mode = 1'b1;
    nbits = -1; word = 0;
    for (int t = 0; t < 1500; t++) begin
      din = 10'($urandom);
      @(negedge clk);
      checks++;
      if (angle_out[9:2] != '0) failures++;
      if (angle_out[1]) begin
        // sync: MSB now on the line; the word was loaded one clock ago
        // from the delayed angle, i.e. din of three clocks ago.
        automatic int want = hist[hist.size() - 3];
        word = 0; nbits = 0;
        for (int b = 0; b < 10; b++) begin
          word = (word << 1) | int'(angle_out[0]);
          if (b != 9) @(negedge clk);
          din = 10'($urandom);
        end
        checks++;
        n_words++;
        if (word != want) begin
          failures++;
          $display("FAIL serial word %0d want %0d", word, want);
        end
      end
    end
    checks++;
    if (n_words < 100) begin failures++; $display("FAIL only %0d serial words", n_words); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Checks the ring tone against 128 + 127*sin(2*pi*i/64) computed here with
// $sin (within 3 LSB, the error of the integer approximation), that one
// sample is produced per strobe, that the period is 64 strobes, and silence
// when not ringing.
module tb_ring_tone;
  logic clk = 0, rst = 1, ready = 0, ringing = 0;
  logic [7:0] sample;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  ring_tone dut (.clk, .rst, .ready, .ringing, .sample);

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (3) @(posedge clk);
    checks++; if (sample != 0) failures++;
    ringing <= 1;
    @(posedge clk);
    for (int i = 0; i < 130; i++) begin
      real r; int e, d;
      ready <= 1; @(posedge clk); ready <= 0;
      @(posedge clk);
      r = 128.0 + 127.0 * $sin(2.0 * 3.14159265358979 * (i % 64) / 64.0);
      e = int'(r);
      d = int'(sample) - e;
      checks++;
      if (d > 3 || d < -3) begin
        failures++; $display("FAIL sample %0d = %0d, expected about %0d", i, sample, e);
      end
      repeat (3) @(posedge clk);
      checks++;
      if (int'(sample) - e > 3 || int'(sample) - e < -3) failures++;  // held between strobes
    end
    ringing <= 0; @(posedge clk); @(posedge clk);
    checks++; if (sample != 0) begin failures++; $display("FAIL not silent"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Exhaustive check of the mixer against y = min(255, a + b - floor(a*b/256)).
module tb_audio_mixer;
  logic [7:0] a, b, y;
  int checks = 0, failures = 0;
  audio_mixer dut (.a, .b, .y);
  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        int exp;
        a = 8'(i); b = 8'(j);
        #1;
        exp = i + j - (i * j) / 256;
        if (exp > 255) exp = 255;
        checks++;
        if (int'(y) != exp) begin
          failures++;
          if (failures < 5) $display("mix %0d %0d -> %0d, expected %0d", i, j, y, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

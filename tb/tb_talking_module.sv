// The testbench plays the serialisers and the decoder. Checks: the talk
// command goes first; after it the decoder starts at once and the "audio
// from <talker>" command exactly SRC_DELAY (8) cycles later; the audio byte goes out (marked as data) only
// after both the decoded byte and the source command are done, in either
// order; `finished` after the audio byte.
module tb_talking_module;
  import accs_pkg::*;
  logic clk = 0, rst = 1, enable = 0, open = 0;
  logic [1:0] station = 0;
  logic cmd_start, cmd_done = 0, dec_start, dec_valid = 0, finished;
  logic lst_start, lst_is_data, lst_done = 0;
  logic [7:0] cmd_byte, dec_byte = 0, lst_byte;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  talking_module dut (.clk, .rst, .enable, .open, .station, .cmd_start, .cmd_byte, .cmd_done,
    .dec_start, .dec_valid, .dec_byte, .lst_start, .lst_byte, .lst_is_data, .lst_done, .finished);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [7:0] src_code(int s);
    return (s == 0) ? 8'b0110_1110 : (s == 1) ? 8'b0111_0110 : 8'b0111_1010;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 12; n++) begin
      logic [7:0] v;
      int s, t;
      bit dec_first, seen;
      s = n % 3; v = 8'($urandom); dec_first = n[0];
      station <= 2'(s); enable <= 1; open <= 1;
      @(posedge clk); open <= 0;
      seen = 0;
      for (t = 0; t < 5 && !seen; t++) begin @(posedge clk); seen = cmd_start; end
      check(seen && cmd_byte == CMD_TALK, "talk command first");
      repeat (10) @(posedge clk);
      cmd_done <= 1; @(posedge clk); cmd_done <= 0;
      seen = 0;
      for (t = 0; t < 5 && !seen; t++) begin @(posedge clk); seen = dec_start; end
      check(seen && !lst_start, "decoder starts first");
      t = 0;
      while (!lst_start && t < 20) begin @(posedge clk); t++; end
      check(t == 8, $sformatf("source command %0d cycles after the decoder", t));
      check(lst_byte == src_code(s) && !lst_is_data, "source command code");
      repeat (10) @(posedge clk);
      if (dec_first) begin
        dec_byte <= v; dec_valid <= 1; @(posedge clk); dec_valid <= 0;
        repeat (7) @(posedge clk);
        check(!lst_start, "waits for the source command");
        lst_done <= 1; @(posedge clk); lst_done <= 0;
      end else begin
        lst_done <= 1; @(posedge clk); lst_done <= 0;
        repeat (7) @(posedge clk);
        check(!lst_start, "waits for the decoded byte");
        dec_byte <= v; dec_valid <= 1; @(posedge clk); dec_valid <= 0;
      end
      seen = 0;
      for (t = 0; t < 5 && !seen; t++) begin @(posedge clk); seen = lst_start; end
      check(seen && lst_byte == v && lst_is_data, $sformatf("audio %h forwarded", v));
      repeat (10) @(posedge clk);
      check(!finished, "not finished before the audio left");
      lst_done <= 1; @(posedge clk); lst_done <= 0;
      seen = 0;
      for (t = 0; t < 5 && !seen; t++) begin @(posedge clk); seen = finished; end
      check(seen, "finished");
      check(!lst_is_data, "data flag dropped");
      enable <= 0; open <= 1; @(posedge clk); open <= 0;
      repeat (5) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// The testbench plays the serialiser and the decoder: it answers cmd_start
// with cmd_done after a delay and dec_start with a byte. Checks the command
// code, the order start -> done -> decoder start, that the decoded byte and
// the window's station reach User-ID once, `finished`, and that a new window
// opening mid-transaction abandons it.
module tb_calling_module;
  import accs_pkg::*;
  logic clk = 0, rst = 1, enable = 0, open = 0;
  logic [1:0] station = 0;
  logic cmd_start, cmd_done = 0, dec_start, dec_valid = 0, id_valid, finished;
  logic [7:0] cmd_byte, dec_byte = 0, id_byte;
  logic [1:0] id_station;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  calling_module dut (.clk, .rst, .enable, .open, .station, .cmd_start, .cmd_byte, .cmd_done,
    .dec_start, .dec_valid, .dec_byte, .id_valid, .id_station, .id_byte, .finished);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wait_for(ref logic sig, input int limit, output bit seen);
    seen = 0;
    for (int t = 0; t < limit; t++) begin
      @(posedge clk);
      if (sig) begin seen = 1; return; end
    end
  endtask

  initial begin
    bit seen;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 12; n++) begin
      logic [7:0] v;
      int s;
      bit cut;
      s = n % 3; v = 8'($urandom_range(0, 4));
      cut = (n % 4 == 3);
      station <= 2'(s); enable <= 1; open <= 1;
      @(posedge clk); open <= 0;
      wait_for(cmd_start, 5, seen);
      check(seen && cmd_byte == CMD_CALL, "call command sent");
      repeat (20) @(posedge clk);
      check(!dec_start && !id_valid, "decoder waits for the command");
      if (cut) begin
        open <= 1; enable <= 0; @(posedge clk); open <= 0;
        cmd_done <= 1; @(posedge clk); cmd_done <= 0;
        wait_for(dec_start, 20, seen);
        check(!seen, "abandoned window does not start the decoder");
        continue;
      end
      cmd_done <= 1; @(posedge clk); cmd_done <= 0;
      wait_for(dec_start, 5, seen);
      check(seen, "decoder started after the command");
      repeat (30) @(posedge clk);
      dec_byte <= v; dec_valid <= 1; @(posedge clk); dec_valid <= 0;
      wait_for(id_valid, 5, seen);
      check(seen && id_byte == v && id_station == 2'(s), "dial byte to User-ID");
      check(finished, "finished with id_valid");
      wait_for(id_valid, 30, seen);
      check(!seen, "only once");
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

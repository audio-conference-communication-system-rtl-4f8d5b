// Feeds bytes whose bit time differs from the decoder's (26..28 clocks for a
// nominal 27, as from a faster or slower station clock), started a few
// cycles after the decoder, and checks each decoded byte, the bit order and
// that edge re-alignment happened.
module tb_one_byte_decoder;
  localparam int BIT = 27;
  logic clk = 0, rst = 1, start = 0, rx = 0, busy, valid, resync;
  logic [7:0] data;
  int checks = 0, failures = 0, resyncs = 0;
  always #5 clk = ~clk;
  one_byte_decoder #(.BIT_CYCLES(BIT), .ONES_THRESHOLD(18)) dut (
    .clk, .rst, .start, .rx, .busy, .valid, .data, .resync);
  always @(posedge clk) if (resync) resyncs++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [7:0] got; bit seen;
  always @(posedge clk) if (valid) begin got = data; seen = 1; end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 60; n++) begin
      logic [7:0] v; int bt, off;
      v   = (n == 0) ? 8'h01 : (n == 1) ? 8'h80 : 8'($urandom);
      bt  = (n < 2) ? BIT : $urandom_range(BIT - 1, BIT + 1);
      off = $urandom_range(0, 6);
      seen = 0;
      start <= 1; @(posedge clk); start <= 0;
      repeat (off) @(posedge clk);
      for (int k = 0; k < 8; k++) begin
        rx <= v[k];
        repeat (bt) @(posedge clk);
      end
      rx <= 0;
      repeat (BIT) @(posedge clk);
      check(seen, $sformatf("byte %0d decoded", n));
      check(got == v, $sformatf("byte %h decoded as %h (bit time %0d, offset %0d)", v, got, bt, off));
      repeat (5) @(posedge clk);
    end
    check(resyncs > 0, "edge re-alignment happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

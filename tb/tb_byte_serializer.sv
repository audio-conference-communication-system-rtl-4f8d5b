// Sends random bytes and samples the line in the middle of every bit period:
// bit 0 first, BIT_CYCLES clocks per bit, idle low, done after 8 periods.
module tb_byte_serializer;
  localparam int BIT = 27;
  logic clk = 0, rst = 1, start = 0, clear = 0, tx, busy, done;
  logic [7:0] data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  byte_serializer #(.BIT_CYCLES(BIT)) dut (.clk, .rst, .start, .data, .clear, .tx, .busy, .done);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    check(tx == 0 && !busy, "idle low");
    for (int n = 0; n < 40; n++) begin
      logic [7:0] v;
      int t;
      v = 8'($urandom);
      data <= v; start <= 1;
      @(posedge clk); start <= 0;
      // first bit is on the line from this edge on
      repeat (BIT / 2) @(posedge clk);
      for (int k = 0; k < 8; k++) begin
        check(tx == v[k], $sformatf("byte %h bit %0d", v, k));
        if (k < 7) repeat (BIT) @(posedge clk);
      end
      t = 0;
      while (!done && t < 100) begin @(posedge clk); t++; end
      check(done, "done seen");
      // done is high in the cycle after the eighth bit period
      check(t == BIT - BIT / 2 + 1, $sformatf("done timing %0d", t));
      @(posedge clk);
      check(tx == 0 && !busy, "idle after byte");
      repeat ($urandom_range(0, 5)) @(posedge clk);
    end
    // clear in the middle of a byte
    data <= 8'hFF; start <= 1; @(posedge clk); start <= 0;
    repeat (40) @(posedge clk);
    clear <= 1; @(posedge clk); clear <= 0; @(posedge clk);
    check(tx == 0 && !busy, "clear idles the line");
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

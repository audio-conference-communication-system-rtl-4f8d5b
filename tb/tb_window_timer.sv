// Checks that the timer expires exactly WINDOW_CYCLES cycles after a start,
// pulses once, and that a restart in the middle begins a full new count.
module tb_window_timer;
  localparam int W = 800;
  logic clk = 0, rst = 1, start = 0, expired;
  logic [$clog2(W)-1:0] remaining;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  window_timer #(.WINDOW_CYCLES(W)) dut (.clk, .rst, .start, .expired, .remaining);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input int restart_at);
    int t, n;
    start <= 1; @(posedge clk); start <= 0;
    t = 1; n = 0;
    while (t < W + 50) begin
      @(posedge clk);
      if (restart_at > 0 && t == restart_at) begin
        start <= 1; @(posedge clk); start <= 0; t = 1; restart_at = 0;
        continue;
      end
      t++;
      if (expired) begin
        n++;
        check(t == W + 1, $sformatf("expired after %0d cycles", t - 1));
      end
    end
    check(n == 1, $sformatf("one expiry, saw %0d", n));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    run(0);
    run(300);
    run(0);
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

// Walks the TDMA window ring several times. Some windows are closed early by
// `finished`, the others by the timer. Checks the window order, that exactly
// one enable belongs to the window's station and kind, the early close, and
// that a timed-out window lasts WINDOW_CYCLES + GUARD_CYCLES + 1 cycles
// with every enable low during the guard.
module tb_tdma_window;
  import accs_pkg::*;
  localparam int W = 800;
  localparam int G = 243;   // guard after a time-out
  logic clk = 0, rst = 1, finished = 0;
  window_t window;
  logic [1:0] station;
  logic is_talk, advance, expired;
  logic [2:0] en_call, en_talk;
  logic [$clog2(W)-1:0] remaining;
  int checks = 0, failures = 0, n_expired = 0, n_finished = 0;
  always #5 clk = ~clk;
  tdma_window #(.WINDOW_CYCLES(W)) dut (.clk, .rst, .finished, .window, .station, .is_talk,
    .en_call, .en_talk, .advance, .expired, .remaining);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int expect_w;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    while (!advance) @(posedge clk);
    expect_w = 0;
    for (int n = 0; n < 18; n++) begin
      int len, t;
      bit early;
      check(int'(window) == expect_w, $sformatf("window %0d expected %0d", window, expect_w));
      check(station == 2'(expect_w / 2) && is_talk == expect_w[0], "station and kind");
      check(is_talk ? (en_talk == 3'(1 << station) && en_call == 0)
                    : (en_call == 3'(1 << station) && en_talk == 0), "one enable");
      early = (n % 3 != 2);
      len = early ? $urandom_range(50, 600) : 0;
      t = 0;
      @(posedge clk); t++;
      while (!advance) begin
        if (early && t == len) begin
          finished <= 1; @(posedge clk); finished <= 0; t++;
          n_finished++;
          continue;
        end
        if (expired) n_expired++;
        if (!early && t == W + 5) begin
          checks++;
          if (en_call != 0 || en_talk != 0) begin
            failures++;
            $display("FAIL enables high during the guard");
          end
        end
        @(posedge clk); t++;
      end
      if (early) check(t == len + 2, $sformatf("early close after %0d, asked %0d", t, len));
      else       check(t == W + G + 1, $sformatf("timed-out window lasted %0d", t));
      expect_w = (expect_w + 1) % 6;
    end
    check(n_expired == 6, $sformatf("expiries %0d", n_expired));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

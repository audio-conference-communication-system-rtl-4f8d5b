// Samples the station screen: the idle phone is white in the middle and the
// screen is black elsewhere; while ringing the phone moves 8 pixels per frame
// and shrinks to half size after 16 frames. The raster is swept only over
// the pixels checked, with `frame` pulsed by the testbench.
module tb_station_display;
  logic clk = 0, rst = 1, frame = 0, ringing = 0;
  logic [10:0] hcount = 0;
  logic [9:0] vcount = 0;
  logic [23:0] pixel;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  station_display dut (.clk, .rst, .hcount, .vcount, .frame, .ringing, .pixel);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic px(input int x, input int y, output logic [23:0] p);
    hcount <= 11'(x); vcount <= 10'(y);
    @(posedge clk); @(posedge clk);
    p = pixel;
  endtask

  task automatic frames(input int n);
    repeat (n) begin frame <= 1; @(posedge clk); frame <= 0; @(posedge clk); end
  endtask

  initial begin
    logic [23:0] p;
    repeat (3) @(posedge clk);
    rst <= 0;
    // idle phone at x 448..575, y 320..447
    px(512, 330, p); check(p == 24'hFFFFFF, "handset white");
    px(512, 420, p); check(p == 24'hFFFFFF, "body white");
    px(450, 420, p); check(p == 24'h000000, "beside body black");
    px(100, 100, p); check(p == 24'h000000, "background black");
    frames(5);
    px(512, 420, p); check(p == 24'hFFFFFF, "idle phone does not move");
    ringing <= 1; @(posedge clk);
    frames(4);                   // x0 = 448 + 32 = 480
    px(470, 330, p); check(p == 24'h000000, "left edge moved");
    px(600, 330, p); check(p == 24'hFFFFFF, "right part moved in");
    frames(12);                  // 16 frames: half size, x0 = 576
    px(576 + 70, 330, p); check(p == 24'h000000, "half-size phone is narrower");
    px(576 + 30, 330, p); check(p == 24'hFFFFFF, "half-size handset");
    ringing <= 0; @(posedge clk); @(posedge clk);
    px(512, 420, p); check(p == 24'hFFFFFF, "back in the middle");
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

// Samples the coordinator screen for several connection patterns: box
// colours (green busy, grey free) and the yellow bars of connected pairs.
module tb_coordinator_display;
  logic clk = 0;
  logic [10:0] hcount = 0;
  logic [9:0] vcount = 0;
  logic [5:0] connections = 0;
  logic [23:0] pixel;
  int checks = 0, failures = 0;
  localparam logic [23:0] GREY = 24'h808080, GREEN = 24'h00C000, YEL = 24'hFFFF00, BLK = 0;
  always #5 clk = ~clk;
  coordinator_display dut (.clk, .hcount, .vcount, .connections, .pixel);

  task automatic expect_px(input int x, input int y, input logic [23:0] c, input string what);
    hcount <= 11'(x); vcount <= 10'(y);
    @(posedge clk); @(posedge clk);
    checks++;
    if (pixel !== c) begin failures++; $display("FAIL %s: %h", what, pixel); end
  endtask

  initial begin
    @(posedge clk);
    connections <= 6'b000000;
    expect_px(190, 280, GREY, "A free");
    expect_px(350, 280, BLK, "no A-B bar");
    connections <= 6'b000001;          // B->A only: not a call
    expect_px(190, 280, GREY, "one-sided dial is not a call");
    connections <= 6'b000011;          // A-B
    expect_px(190, 280, GREEN, "A busy");
    expect_px(510, 280, GREEN, "B busy");
    expect_px(830, 280, GREY, "C free");
    expect_px(350, 280, YEL, "A-B bar");
    expect_px(670, 280, BLK, "no B-C bar");
    connections <= 6'b111100;          // A-C and B-C
    expect_px(190, 280, GREEN, "A busy");
    expect_px(670, 280, YEL, "B-C bar");
    expect_px(500, 410, YEL, "A-C bar");
    expect_px(350, 280, BLK, "no A-B bar");
    expect_px(10, 10, BLK, "background");
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

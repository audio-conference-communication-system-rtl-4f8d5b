// Raster timing generator for the station and coordinator screens.
//
// Counts pixels and lines of a 1024x768 frame (1344 x 806 totals, the usual
// 65 MHz timing) and gives the active-area flag, active-low syncs and a
// one-cycle pulse at the start of every frame. This design's own generator,
// standing in for the lab kit's XVGA block.
module vga_timing #(
  parameter int unsigned H_ACTIVE = 1024,
  parameter int unsigned H_FP     = 24,
  parameter int unsigned H_SYNC   = 136,
  parameter int unsigned H_TOTAL  = 1344,
  parameter int unsigned V_ACTIVE = 768,
  parameter int unsigned V_FP     = 3,
  parameter int unsigned V_SYNC   = 6,
  parameter int unsigned V_TOTAL  = 806
) (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync_n,
  output logic        vsync_n,
  output logic        active,
  output logic        frame
);
  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
    end else if (hcount == 11'(H_TOTAL - 1)) begin
      hcount <= '0;
      vcount <= (vcount == 10'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
    end else begin
      hcount <= hcount + 1'b1;
    end
  end

  assign active  = (hcount < 11'(H_ACTIVE)) && (vcount < 10'(V_ACTIVE));
  assign hsync_n = ~((hcount >= 11'(H_ACTIVE + H_FP)) && (hcount < 11'(H_ACTIVE + H_FP + H_SYNC)));
  assign vsync_n = ~((vcount >= 10'(V_ACTIVE + V_FP)) && (vcount < 10'(V_ACTIVE + V_FP + V_SYNC)));
  assign frame   = (hcount == '0) && (vcount == '0);
endmodule

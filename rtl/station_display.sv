// Station screen.
//
// Draws a white telephone (a handset bar over a body block) on black. While
// idle the phone sits still in the middle of the screen at full size. While
// `ringing` is high it moves to the right by 8 pixels every frame, wrapping
// at the right edge, and switches between full and half size every 16
// frames. `frame` is a one-cycle pulse at the start of each frame; the pixel
// is registered (one cycle after hcount/vcount). The document describes an
// idle phone and a moving, resizing phone animation stored as images; the
// shapes here are drawn from rectangles instead.
module station_display #(
  parameter int unsigned H_ACTIVE = 1024,
  parameter int unsigned V_ACTIVE = 768
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic        frame,
  input  logic        ringing,
  output logic [23:0] pixel
);
  localparam int unsigned BIG = 128;

  logic [10:0] x0;
  logic [9:0]  y0;
  logic [4:0]  frames;
  logic [7:0]  size;

  always_ff @(posedge clk) begin
    if (rst || !ringing) begin
      x0     <= 11'((H_ACTIVE - BIG) / 2);
      frames <= '0;
    end else if (frame) begin
      frames <= frames + 1'b1;
      x0     <= (x0 + 11'd8 >= 11'(H_ACTIVE - BIG)) ? 11'd0 : x0 + 11'd8;
    end
  end

  assign y0   = 10'((V_ACTIVE - BIG) / 2);
  assign size = (ringing && frames[4]) ? 8'(BIG / 2) : 8'(BIG);

  logic handset, body;
  always_comb begin
    handset = (hcount >= x0) && (hcount < x0 + 11'(size)) &&
              (vcount >= y0) && (vcount < y0 + 10'(size / 4));
    body    = (hcount >= x0 + 11'(size / 8)) && (hcount < x0 + 11'(size) - 11'(size / 8)) &&
              (vcount >= y0 + 10'(size / 4)) && (vcount < y0 + 10'(size));
  end

  always_ff @(posedge clk) pixel <= (handset || body) ? 24'hFF_FF_FF : 24'h00_00_00;
endmodule

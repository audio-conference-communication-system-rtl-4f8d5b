// Coordinator status screen.
//
// Shows the three stations as boxes in a row (A left, B middle, C right).
// A box is green while its station is in at least one call and grey when it
// is free. Each connected pair is drawn as a yellow bar: A-B and B-C between
// neighbouring boxes, A-C as a bar under all three. Pixel colour is a pure
// function of the raster position and the connection register, registered
// once (one cycle of latency). The document says the screen shows
// conferences and busy stations; the layout and colours are this design's.
module coordinator_display
  import accs_pkg::*;
(
  input  logic        clk,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic [5:0]  connections,
  output logic [23:0] pixel
);
  localparam logic [23:0] GREY   = 24'h80_80_80;
  localparam logic [23:0] GREEN  = 24'h00_C0_00;
  localparam logic [23:0] YELLOW = 24'hFF_FF_00;

  // Boxes 160x160 at x = 112, 432, 752; y = 200.
  localparam int unsigned BOX_Y = 200, BOX_H = 160, BOX_W = 160;

  function automatic int unsigned box_x(input int unsigned s);
    return 112 + s * 320;
  endfunction

  logic ab, ac, bc;
  logic [2:0] busy;
  assign ab = connected(connections, 2'd0, 2'd1);
  assign ac = connected(connections, 2'd0, 2'd2);
  assign bc = connected(connections, 2'd1, 2'd2);
  assign busy = {ac | bc, ab | bc, ab | ac};

  logic [23:0] colour;
  always_comb begin
    colour = 24'h00_00_00;
    for (int s = 0; s < 3; s++) begin
      if (hcount >= 11'(box_x(s)) && hcount < 11'(box_x(s) + BOX_W) &&
          vcount >= 10'(BOX_Y) && vcount < 10'(BOX_Y + BOX_H))
        colour = busy[s] ? GREEN : GREY;
    end
    // Bars between neighbours, 20 lines high at mid-box height.
    if (vcount >= 10'(BOX_Y + 70) && vcount < 10'(BOX_Y + 90)) begin
      if (ab && hcount >= 11'(box_x(0) + BOX_W) && hcount < 11'(box_x(1))) colour = YELLOW;
      if (bc && hcount >= 11'(box_x(1) + BOX_W) && hcount < 11'(box_x(2))) colour = YELLOW;
    end
    // A-C bar below the row.
    if (ac && vcount >= 10'(BOX_Y + BOX_H + 40) && vcount < 10'(BOX_Y + BOX_H + 60) &&
        hcount >= 11'(box_x(0) + 70) && hcount < 11'(box_x(2) + 90))
      colour = YELLOW;
  end

  always_ff @(posedge clk) pixel <= colour;
endmodule

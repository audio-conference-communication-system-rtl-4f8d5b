// Ring tone generator of a user-end station.
//
// Plays one period of a sine wave stored in a 64-entry table, one entry per
// codec sample strobe, while `ringing` is high: at 48 kHz that is a 750 Hz
// tone. Samples are unsigned 8-bit, 128 + 127*sin(2*pi*i/64). The table is
// computed when the design is elaborated, with the integer approximation
//   sin(d) ~ 4d(180-d) / (40500 - d(180-d))   (d in degrees, 0..180),
// evaluated in eighths of a degree. When not ringing the output is 0
// (silence) and the table index restarts. The document stores a ringing tone
// in on-chip ROM without giving it; this tone is this design's choice.
module ring_tone #(
  parameter int unsigned TABLE_LEN = 64
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ready,
  input  logic       ringing,
  output logic [7:0] sample
);
  localparam int unsigned IW = $clog2(TABLE_LEN);

  function automatic logic [TABLE_LEN*8-1:0] make_table();
    logic [TABLE_LEN*8-1:0] t;
    longint x, q, s;
    for (int i = 0; i < TABLE_LEN; i++) begin
      // angle in eighths of a degree, folded into 0..1440 (half period)
      x = (longint'(i) * 2880) / longint'(TABLE_LEN);
      if (x >= 1440) x = x - 1440;
      q = x * (1440 - x);
      s = (127 * 4 * q) / (2592000 - q);
      t[i*8 +: 8] = (i < TABLE_LEN / 2) ? 8'(128 + s) : 8'(128 - s);
    end
    return t;
  endfunction

  localparam logic [TABLE_LEN*8-1:0] TABLE = make_table();

  logic [IW-1:0] index;

  always_ff @(posedge clk) begin
    if (rst || !ringing) begin
      index  <= '0;
      sample <= '0;
    end else if (ready) begin
      sample <= TABLE[index*8 +: 8];
      index  <= index + 1'b1;
    end
  end
endmodule

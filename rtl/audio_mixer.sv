// Audio mixer of a user-end station.
//
// Mixes the latest samples of the station's two peers with
//   y = a + b - a*b/256
// on unsigned 8-bit samples (0 is silence). A single voice passes unchanged
// and two loud voices approach full scale without wrapping. The formula
// reaches 256 only at a = b = 255, so the result is saturated to 255.
// Combinational. The formula is the document's; the saturation is this
// design's.
module audio_mixer (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [7:0] y
);
  logic [15:0] prod;
  logic [9:0]  sum;
  assign prod = a * b;
  assign sum  = {2'b00, a} + {2'b00, b} - {2'b00, prod[15:8]};
  assign y    = (sum > 10'd255) ? 8'd255 : sum[7:0];
endmodule

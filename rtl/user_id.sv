// User-ID connection register of the coordinator.
//
// Holds one bit for every ordered pair "caller has dialed callee":
//   bit0 B->A, bit1 A->B, bit2 C->A, bit3 A->C, bit4 C->B, bit5 B->C.
// Two stations are in a call when both bits of their pair are set. A dial
// byte from station s (captured in s's call window, `valid` for one cycle)
// rewrites s's two outgoing bits: 0 hangs up, 1/2/3 dials A/B/C alone, 4
// dials both peers. A code naming s itself, or any other value, leaves the
// register unchanged. The register updates on the clock after `valid`.
//
// The bit layout and the dial codes follow the document's User_ID and
// dialing logic; rewriting both outgoing bits (rather than only setting one)
// is this design's choice, so that a station can drop one of two callees.
module user_id
  import accs_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       valid,
  input  logic [1:0] station,
  input  logic [7:0] dial,
  output logic [5:0] connections
);
  logic [1:0] p0, p1;
  assign p0 = peer(station, 1'b0);
  assign p1 = peer(station, 1'b1);

  always_ff @(posedge clk) begin
    if (rst) begin
      connections <= '0;
    end else if (valid && station != 2'd3) begin
      if (dial == DIAL_HANGUP) begin
        connections[conn_bit(station, p0)] <= 1'b0;
        connections[conn_bit(station, p1)] <= 1'b0;
      end else if (dial == DIAL_BOTH) begin
        connections[conn_bit(station, p0)] <= 1'b1;
        connections[conn_bit(station, p1)] <= 1'b1;
      end else if (dial == {6'd0, p0} + 8'd1) begin
        connections[conn_bit(station, p0)] <= 1'b1;
        connections[conn_bit(station, p1)] <= 1'b0;
      end else if (dial == {6'd0, p1} + 8'd1) begin
        connections[conn_bit(station, p0)] <= 1'b0;
        connections[conn_bit(station, p1)] <= 1'b1;
      end
    end
  end
endmodule

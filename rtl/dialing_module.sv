// Dialing module of a user-end station.
//
// Turns the station's two call switches into the one-byte dial code it sends
// in its call window: 0 for no call (hang up), the callee's number (A = 1,
// B = 2, C = 3) when one switch is on, and 4 when both peers are called.
// call_sw[0] selects the station's first peer and call_sw[1] its second, in
// A/B/C order (A's peers are B and C, B's are A and C, C's are A and B).
// The code is registered, one cycle behind the switches. The codes follow
// the document's dialing logic.
module dialing_module
  import accs_pkg::*;
#(
  parameter int unsigned STATION = 0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] call_sw,
  output logic [7:0] dial
);
  localparam logic [1:0] SELF = 2'(STATION);
  localparam logic [7:0] CODE0 = 8'(peer(SELF, 1'b0)) + 8'd1;
  localparam logic [7:0] CODE1 = 8'(peer(SELF, 1'b1)) + 8'd1;

  always_ff @(posedge clk) begin
    if (rst) dial <= DIAL_HANGUP;
    else begin
      case (call_sw)
        2'b00: dial <= DIAL_HANGUP;
        2'b01: dial <= CODE0;
        2'b10: dial <= CODE1;
        default: dial <= DIAL_BOTH;
      endcase
    end
  end
endmodule

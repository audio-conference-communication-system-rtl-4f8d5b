// Shared types and constants of the audio conference system.
//
// Three user-end stations (A, B, C) talk to one coordinator over point-to-point
// serial lines. The coordinator runs a time-division schedule of six windows,
// a "call" and a "talk" window per station, and tells the stations what to do
// with one-byte command packages. The command codes and the dial codes are the
// document's; the window encoding and the bit-level framing constants are this
// design's own choices.
package accs_pkg;

  // Station identifiers used as array indices.
  typedef enum logic [1:0] {
    STN_A = 2'd0,
    STN_B = 2'd1,
    STN_C = 2'd2
  } station_t;

  // Command packages sent by the coordinator to a station.
  localparam logic [7:0] CMD_CALL   = 8'b0111_1110;  // send your dialing byte now
  localparam logic [7:0] CMD_TALK   = 8'b0101_1110;  // send your audio sample now
  localparam logic [7:0] CMD_FROM_A = 8'b0110_1110;  // next byte is audio from A
  localparam logic [7:0] CMD_FROM_B = 8'b0111_0110;  // next byte is audio from B
  localparam logic [7:0] CMD_FROM_C = 8'b0111_1010;  // next byte is audio from C

  // Dial codes sent by a station in its call window.
  localparam logic [7:0] DIAL_HANGUP = 8'd0;
  localparam logic [7:0] DIAL_A      = 8'd1;
  localparam logic [7:0] DIAL_B      = 8'd2;
  localparam logic [7:0] DIAL_C      = 8'd3;
  localparam logic [7:0] DIAL_BOTH   = 8'd4;

  // TDMA windows in schedule order.
  typedef enum logic [2:0] {
    W_A_CALL = 3'd0,
    W_A_TALK = 3'd1,
    W_B_CALL = 3'd2,
    W_B_TALK = 3'd3,
    W_C_CALL = 3'd4,
    W_C_TALK = 3'd5
  } window_t;

  function automatic logic [7:0] from_cmd(input logic [1:0] src);
    case (src)
      2'd0:    return CMD_FROM_A;
      2'd1:    return CMD_FROM_B;
      default: return CMD_FROM_C;
    endcase
  endfunction

  // The two peers of a station, in A/B/C order.
  function automatic logic [1:0] peer(input logic [1:0] self, input logic which);
    case (self)
      2'd0:    return which ? 2'd2 : 2'd1;
      2'd1:    return which ? 2'd2 : 2'd0;
      default: return which ? 2'd1 : 2'd0;
    endcase
  endfunction

  // Index of the connection bit "caller calls callee":
  // bit0 B->A, bit1 A->B, bit2 C->A, bit3 A->C, bit4 C->B, bit5 B->C.
  function automatic int unsigned conn_bit(input logic [1:0] caller, input logic [1:0] callee);
    case ({caller, callee})
      4'b01_00: return 0;
      4'b00_01: return 1;
      4'b10_00: return 2;
      4'b00_10: return 3;
      4'b10_01: return 4;
      default:  return 5;  // B->C
    endcase
  endfunction

  // Two stations are in a call when each has dialed the other.
  function automatic logic connected(input logic [5:0] conn, input logic [1:0] x, input logic [1:0] y);
    if (x == y) return 1'b0;
    return conn[conn_bit(x, y)] & conn[conn_bit(y, x)];
  endfunction

endpackage

// Coordinator station: the central switch of the conference system.
//
// Three serial lines come in from stations A, B and C and three go out. A
// TDMA window sequencer (tdma_window) steps through A_CALL, A_TALK, B_CALL,
// B_TALK, C_CALL, C_TALK. In a call window the calling controller asks the
// station for its dial byte and the User-ID register updates the six
// connection bits. In a talk window the talking controller fetches one audio
// sample from the talker and forwards it, announced by an "audio from X"
// command, to the two other stations; the output multiplexer withholds the
// audio from a station that is not in a call with the talker.
//
// Datapath: one shared one-byte decoder whose input is the synchronised line
// of the window's station; a command serialiser toward the window's station;
// a listener serialiser toward the other two; a registered output
// multiplexer. Both serialisers are cleared when the window timer expires
// and whenever a window opens, so a transaction cut off by the timer cannot
// spill into the next window; the sequencer's guard interval after a
// time-out lets the stations' receivers run out the cut-off byte. At a
// time-out both controllers are sent back to idle (an `open` with `enable`
// low), so a late reply cannot start a transmission during the guard.
//
// Timing per window (BIT_CYCLES = 27, byte time 216 cycles): call window
// about 2 byte times plus line latency; talk window about 3 byte times plus
// latency (664 cycles), inside WINDOW_CYCLES = 800. The status screen
// is driven from the connection register.
//
// Reply alignment: a station answers a few cycles after the command's last
// bit has reached it (its synchroniser, bit decision and serialiser start,
// about 5 cycles), and its answer passes this side's synchroniser (2 more).
// The decoder therefore starts REPLY_DELAY cycles after the command ends, so
// the reply's bit grid lines up with the decoder's when the cables add no
// delay, and the decoder's edge re-alignment absorbs up to about 13 cycles
// of round-trip cable delay. REPLY_DELAY is this design's choice.
module coordinator
  import accs_pkg::*;
#(
  parameter int unsigned BIT_CYCLES     = 27,
  parameter int unsigned ONES_THRESHOLD = 18,
  parameter int unsigned WINDOW_CYCLES  = 800,
  parameter int unsigned REPLY_DELAY    = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [2:0]  rx,
  output logic [2:0]  tx,
  output logic [5:0]  connections,
  output window_t     window,
  output logic        window_advance,
  output logic        window_expired,
  output logic        window_finished,
  output logic        dec_resync,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  output logic [23:0] pixel
);
  logic [2:0] rx_s;
  for (genvar s = 0; s < 3; s++) begin : g_sync
    sync2 u_sync (.clk, .rst, .d(rx[s]), .q(rx_s[s]));
  end

  logic [1:0] station;
  logic       is_talk;
  logic [2:0] en_call, en_talk;
  logic       finished;
  logic [$clog2(WINDOW_CYCLES)-1:0] remaining;

  tdma_window #(.WINDOW_CYCLES(WINDOW_CYCLES), .GUARD_CYCLES(9 * BIT_CYCLES)) u_window (
    .clk, .rst, .finished, .window, .station, .is_talk, .en_call, .en_talk,
    .advance(window_advance), .expired(window_expired), .remaining
  );

  // Calling controller
  logic       c_cmd_start, c_dec_start, c_finished, id_valid;
  logic [7:0] c_cmd_byte, id_byte;
  logic [1:0] id_station;
  // Talking controller
  logic       t_cmd_start, t_dec_start, t_finished, lst_start, lst_is_data;
  logic [7:0] t_cmd_byte, lst_byte;
  // Shared datapath
  logic       cmd_done, lst_done, cmd_tx, lst_tx, cmd_busy, lst_busy;
  logic       dec_valid, dec_busy;
  logic [7:0] dec_byte;

  calling_module u_calling (
    .clk, .rst, .enable(|en_call & ~window_expired), .open(window_advance | window_expired), .station,
    .cmd_start(c_cmd_start), .cmd_byte(c_cmd_byte), .cmd_done,
    .dec_start(c_dec_start), .dec_valid, .dec_byte,
    .id_valid, .id_station, .id_byte, .finished(c_finished)
  );

  talking_module #(.SRC_DELAY(REPLY_DELAY)) u_talking (
    .clk, .rst, .enable(|en_talk & ~window_expired), .open(window_advance | window_expired), .station,
    .cmd_start(t_cmd_start), .cmd_byte(t_cmd_byte), .cmd_done,
    .dec_start(t_dec_start), .dec_valid, .dec_byte,
    .lst_start, .lst_byte, .lst_is_data, .lst_done, .finished(t_finished)
  );

  assign finished        = c_finished | t_finished;
  assign window_finished = finished;

  byte_serializer #(.BIT_CYCLES(BIT_CYCLES)) u_cmd_ser (
    .clk, .rst, .start(c_cmd_start | t_cmd_start),
    .data(is_talk ? t_cmd_byte : c_cmd_byte), .clear(window_advance | window_expired),
    .tx(cmd_tx), .busy(cmd_busy), .done(cmd_done)
  );

  byte_serializer #(.BIT_CYCLES(BIT_CYCLES)) u_lst_ser (
    .clk, .rst, .start(lst_start), .data(lst_byte), .clear(window_advance | window_expired),
    .tx(lst_tx), .busy(lst_busy), .done(lst_done)
  );

  // decoder start, REPLY_DELAY cycles after the controller asks for it
  logic [REPLY_DELAY-1:0] dec_start_sr;
  logic                   dec_start;
  always_ff @(posedge clk) begin
    if (rst || window_advance || window_expired) dec_start_sr <= '0;
    else dec_start_sr <= {dec_start_sr[REPLY_DELAY-2:0], c_dec_start | t_dec_start};
  end
  assign dec_start = dec_start_sr[REPLY_DELAY-1];

  one_byte_decoder #(.BIT_CYCLES(BIT_CYCLES), .ONES_THRESHOLD(ONES_THRESHOLD)) u_decoder (
    .clk, .rst, .start(dec_start), .rx(rx_s[station]),
    .busy(dec_busy), .valid(dec_valid), .data(dec_byte), .resync(dec_resync)
  );

  user_id u_user_id (
    .clk, .rst, .valid(id_valid), .station(id_station), .dial(id_byte), .connections
  );

  output_mux u_mux (
    .clk, .rst, .station, .connections, .cmd_bit(cmd_tx), .lst_bit(lst_tx),
    .lst_is_data, .tx
  );

  coordinator_display u_display (
    .clk, .hcount, .vcount, .connections, .pixel
  );
endmodule

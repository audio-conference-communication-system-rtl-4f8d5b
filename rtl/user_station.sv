// One user-end station of the conference system (A, B or C by STATION).
//
// Receive path: the coordinator's line is synchronised and fed to the
// command detector, which recognises the command packages and captures the
// audio bytes announced by "audio from X". Transmit path: the station
// controller answers "call" with the dial code from the dialing switches and
// "talk" with the latest microphone sample, through a byte serialiser on the
// line back to the coordinator. The replies start about five cycles after
// the command's last bit.
//
// Audio out: on every codec `codec_ready` strobe the headphone sample is
// updated from the voicemail player while `vm_listen` is high, else from the
// ring tone while `ringing` is high, else from the mixer of the two peers'
// latest samples. The ring tone and voicemail outputs load on the same
// strobe, so they reach the headphone one codec sample later. Voicemail records the microphone while `vm_record` is high
// into an external ZBT SRAM (ram_* port). The screen shows an idle phone or
// the ringing animation. `ringing` is an input driven by a switch. All
// samples are unsigned 8-bit with 0 as silence.
module user_station
  import accs_pkg::*;
#(
  parameter int unsigned STATION        = 0,
  parameter int unsigned BIT_CYCLES     = 27,
  parameter int unsigned ONES_THRESHOLD = 18
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        rx,
  output logic        tx,
  input  logic [1:0]  call_sw,
  input  logic        codec_ready,
  input  logic [7:0]  codec_in,
  output logic [7:0]  headphone,
  input  logic        ringing,
  input  logic        vm_record,
  input  logic        vm_listen,
  input  logic [1:0]  vm_msg_num,
  input  logic        vm_delete,
  output logic [2:0]  vm_msg_count,
  output logic [18:0] ram_addr,
  output logic        ram_we,
  output logic [35:0] ram_wdata,
  input  logic [35:0] ram_rdata,
  output logic [23:0] pixel,
  output logic        hsync_n,
  output logic        vsync_n,
  output logic [7:0]  peer0_sample,
  output logic [7:0]  peer1_sample,
  output logic        det_call,
  output logic        det_talk,
  output logic        audio_rx,
  output logic        rx_resync
);
  logic       rx_s;
  logic       data_valid;
  logic [1:0] data_src;
  logic [7:0] data, dial, tx_byte, mixed, tone, vm_out;
  logic       tx_start, tx_busy, tx_done;

  sync2 u_sync (.clk, .rst, .d(rx), .q(rx_s));

  command_detector #(.BIT_CYCLES(BIT_CYCLES), .ONES_THRESHOLD(ONES_THRESHOLD)) u_detect (
    .clk, .rst, .rx(rx_s), .det_call, .det_talk, .data_valid, .data_src, .data,
    .resync(rx_resync)
  );
  assign audio_rx = data_valid;

  dialing_module #(.STATION(STATION)) u_dial (.clk, .rst, .call_sw, .dial);

  user_end #(.STATION(STATION)) u_ctrl (
    .clk, .rst, .det_call, .det_talk, .data_valid, .data_src, .data, .dial,
    .codec_ready, .codec_in, .tx_start, .tx_byte,
    .peer0(peer0_sample), .peer1(peer1_sample)
  );

  byte_serializer #(.BIT_CYCLES(BIT_CYCLES)) u_ser (
    .clk, .rst, .start(tx_start), .data(tx_byte), .clear(1'b0),
    .tx, .busy(tx_busy), .done(tx_done)
  );

  audio_mixer u_mix (.a(peer0_sample), .b(peer1_sample), .y(mixed));

  ring_tone u_ring (.clk, .rst, .ready(codec_ready), .ringing, .sample(tone));

  logic [18:0] vm_start [5];
  voicemail u_vm (
    .clk, .rst, .record(vm_record), .listen(vm_listen), .msg_num(vm_msg_num),
    .erase(vm_delete), .ready(codec_ready), .audio_in(codec_in), .audio_out(vm_out),
    .ram_addr, .ram_we, .ram_wdata, .ram_rdata, .msg_count(vm_msg_count),
    .msg_start(vm_start)
  );

  always_ff @(posedge clk) begin
    if (rst) headphone <= '0;
    else if (codec_ready) headphone <= vm_listen ? vm_out : (ringing ? tone : mixed);
  end

  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        active, frame;
  vga_timing u_vga (.clk, .rst, .hcount, .vcount, .hsync_n, .vsync_n, .active, .frame);
  station_display u_disp (.clk, .rst, .hcount, .vcount, .frame, .ringing, .pixel);
endmodule

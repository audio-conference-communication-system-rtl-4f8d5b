// Audio conference system: one coordinator and three user-end stations.
//
// The coordinator polls the stations in a six-window TDMA schedule (a call
// and a talk window per station). In its call window a station reports whom
// it is calling; two stations that have dialed each other are in a call. In
// its talk window a station sends one audio sample, which the coordinator
// forwards to the stations in a call with it; every station mixes the
// samples of its two peers for its headphone.
//
// The lines between the coordinator and the stations pass through RS-485
// transceivers and cables in the real system, so they are ports here:
// coord_tx[s] must reach stn_rx[s] and stn_tx[s] must reach coord_rx[s]
// outside this module. Everything runs on one clock; the receivers still
// re-align to line edges as they would between separately clocked boards.
// Each station has its own voicemail ZBT port, codec samples and screen.
module accs_top
  import accs_pkg::*;
#(
  parameter int unsigned BIT_CYCLES     = 27,
  parameter int unsigned ONES_THRESHOLD = 18,
  parameter int unsigned WINDOW_CYCLES  = 800
) (
  input  logic        clk,
  input  logic        rst,
  // serial lines, to be joined through the transceivers
  output logic [2:0]  coord_tx,
  input  logic [2:0]  stn_rx,
  output logic [2:0]  stn_tx,
  input  logic [2:0]  coord_rx,
  // per-station user side
  input  logic [1:0]  call_sw     [3],
  input  logic        codec_ready,
  input  logic [7:0]  codec_in    [3],
  output logic [7:0]  headphone   [3],
  input  logic [2:0]  ringing,
  input  logic [2:0]  vm_record,
  input  logic [2:0]  vm_listen,
  input  logic [1:0]  vm_msg_num  [3],
  input  logic [2:0]  vm_delete,
  output logic [2:0]  vm_msg_count[3],
  output logic [18:0] ram_addr    [3],
  output logic [2:0]  ram_we,
  output logic [35:0] ram_wdata   [3],
  input  logic [35:0] ram_rdata   [3],
  output logic [23:0] stn_pixel   [3],
  output logic [2:0]  stn_hsync_n,
  output logic [2:0]  stn_vsync_n,
  // per-station observation
  output logic [7:0]  peer0_sample[3],
  output logic [7:0]  peer1_sample[3],
  output logic [2:0]  stn_det_call,
  output logic [2:0]  stn_det_talk,
  output logic [2:0]  stn_audio_rx,
  output logic [2:0]  stn_resync,
  // coordinator side
  output logic [5:0]  connections,
  output window_t     window,
  output logic        window_advance,
  output logic        window_expired,
  output logic        window_finished,
  output logic        coord_resync,
  output logic [23:0] coord_pixel,
  output logic        coord_hsync_n,
  output logic        coord_vsync_n
);
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        active, frame;

  vga_timing u_vga (.clk, .rst, .hcount, .vcount, .hsync_n(coord_hsync_n),
                    .vsync_n(coord_vsync_n), .active, .frame);

  coordinator #(.BIT_CYCLES(BIT_CYCLES), .ONES_THRESHOLD(ONES_THRESHOLD),
                .WINDOW_CYCLES(WINDOW_CYCLES)) u_coord (
    .clk, .rst, .rx(coord_rx), .tx(coord_tx), .connections, .window,
    .window_advance, .window_expired, .window_finished, .dec_resync(coord_resync),
    .hcount, .vcount, .pixel(coord_pixel)
  );

  for (genvar s = 0; s < 3; s++) begin : g_stn
    user_station #(.STATION(s), .BIT_CYCLES(BIT_CYCLES), .ONES_THRESHOLD(ONES_THRESHOLD)) u_stn (
      .clk, .rst, .rx(stn_rx[s]), .tx(stn_tx[s]), .call_sw(call_sw[s]),
      .codec_ready, .codec_in(codec_in[s]), .headphone(headphone[s]),
      .ringing(ringing[s]), .vm_record(vm_record[s]), .vm_listen(vm_listen[s]),
      .vm_msg_num(vm_msg_num[s]), .vm_delete(vm_delete[s]), .vm_msg_count(vm_msg_count[s]),
      .ram_addr(ram_addr[s]), .ram_we(ram_we[s]), .ram_wdata(ram_wdata[s]),
      .ram_rdata(ram_rdata[s]), .pixel(stn_pixel[s]), .hsync_n(stn_hsync_n[s]),
      .vsync_n(stn_vsync_n[s]), .peer0_sample(peer0_sample[s]), .peer1_sample(peer1_sample[s]),
      .det_call(stn_det_call[s]), .det_talk(stn_det_talk[s]), .audio_rx(stn_audio_rx[s]),
      .rx_resync(stn_resync[s])
    );
  end
endmodule

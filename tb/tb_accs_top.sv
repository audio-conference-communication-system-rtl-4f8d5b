// End-to-end test of the conference system: a coordinator and three
// stations joined by lines with different delays in each direction (so the
// receivers see bits at arbitrary phases), each station with a voicemail
// SRAM model. A second system with 500-cycle windows, shorter than a talk
// transaction, runs beside it on undelayed lines so that windows close by
// time-out too.
//
// The test walks through: no calls (all forwarded audio must be silence), a
// call A<->B, a conference in which A talks with B and C, a hang-up, the
// ring tone at C and a voicemail recorded and replayed at B. Monitors check
// every forwarded sample against the talker's microphone (or silence when
// the pair is not in a call) and every headphone sample against the mix of
// the two peers, and count each mechanism: call set-up, hang-up, forwarding,
// silencing, mixing, window closed by its transaction, window closed by
// time-out, receiver re-alignment at the coordinator and at the stations,
// ring tone, voicemail playback and both screens. A mechanism that never
// happens counts as a failure.
module tb_accs_top;
  import accs_pkg::*;
  localparam int BIT = 27;
  localparam int DOWN[3] = '{1, 3, 5};   // coordinator -> station line delay
  localparam int UP[3]   = '{4, 2, 5};   // station -> coordinator line delay

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  // inputs shared by both systems
  logic [1:0]  call_sw[3];
  logic        codec_ready = 0;
  logic [7:0]  codec_in[3];
  logic [2:0]  ringing = 0, vm_record = 0, vm_listen = 0, vm_delete = 0;
  logic [1:0]  vm_msg_num[3];

  // system under test, default sizes
  logic [2:0]  coord_tx, stn_rx, stn_tx, coord_rx;
  logic [7:0]  headphone[3], peer0_sample[3], peer1_sample[3];
  logic [2:0]  vm_msg_count[3];
  logic [18:0] ram_addr[3];
  logic [2:0]  ram_we;
  logic [35:0] ram_wdata[3], ram_rdata[3];
  logic [23:0] stn_pixel[3], coord_pixel;
  logic [2:0]  stn_hsync_n, stn_vsync_n, stn_det_call, stn_det_talk, stn_audio_rx, stn_resync;
  logic [5:0]  connections;
  window_t     window;
  logic        window_advance, window_expired, window_finished, coord_resync;
  logic        coord_hsync_n, coord_vsync_n;

  accs_top dut (.clk, .rst, .coord_tx, .stn_rx, .stn_tx, .coord_rx, .call_sw, .codec_ready,
    .codec_in, .headphone, .ringing, .vm_record, .vm_listen, .vm_msg_num, .vm_delete,
    .vm_msg_count, .ram_addr, .ram_we, .ram_wdata, .ram_rdata, .stn_pixel, .stn_hsync_n,
    .stn_vsync_n, .peer0_sample, .peer1_sample, .stn_det_call, .stn_det_talk, .stn_audio_rx,
    .stn_resync, .connections, .window, .window_advance, .window_expired, .window_finished,
    .coord_resync, .coord_pixel, .coord_hsync_n, .coord_vsync_n);

  for (genvar s = 0; s < 3; s++) begin : g_ram
    zbt_model ram (.clk, .addr(ram_addr[s]), .we(ram_we[s]), .wdata(ram_wdata[s]),
                   .rdata(ram_rdata[s]));
  end

  // delayed lines
  logic [15:0] down_sr[3], up_sr[3];
  always_ff @(posedge clk)
    for (int s = 0; s < 3; s++) begin
      down_sr[s] <= {down_sr[s][14:0], coord_tx[s]};
      up_sr[s]   <= {up_sr[s][14:0], stn_tx[s]};
    end
  always_comb
    for (int s = 0; s < 3; s++) begin
      stn_rx[s]   = down_sr[s][DOWN[s]-1];
      coord_rx[s] = up_sr[s][UP[s]-1];
    end

  // second system: windows shorter than a talk transaction
  logic [2:0]  x_line_dn, x_line_up;
  logic [7:0]  x_headphone[3], x_peer0[3], x_peer1[3];
  logic [2:0]  x_vm_count[3];
  logic [18:0] x_ram_addr[3];
  logic [2:0]  x_ram_we;
  logic [35:0] x_ram_wdata[3];
  logic [35:0] x_ram_rdata[3] = '{default: '0};
  logic [23:0] x_stn_pixel[3], x_coord_pixel;
  logic [2:0]  x_hs, x_vs, x_det_call, x_det_talk, x_audio_rx, x_resync;
  logic [5:0]  x_connections;
  window_t     x_window;
  logic        x_advance, x_expired, x_finished, x_coord_resync, x_chs, x_cvs;

  accs_top #(.WINDOW_CYCLES(500)) dut_x (.clk, .rst, .coord_tx(x_line_dn), .stn_rx(x_line_dn),
    .stn_tx(x_line_up), .coord_rx(x_line_up), .call_sw, .codec_ready, .codec_in,
    .headphone(x_headphone), .ringing(3'b000), .vm_record(3'b000), .vm_listen(3'b000),
    .vm_msg_num, .vm_delete(3'b000), .vm_msg_count(x_vm_count), .ram_addr(x_ram_addr),
    .ram_we(x_ram_we), .ram_wdata(x_ram_wdata), .ram_rdata(x_ram_rdata),
    .stn_pixel(x_stn_pixel), .stn_hsync_n(x_hs), .stn_vsync_n(x_vs), .peer0_sample(x_peer0),
    .peer1_sample(x_peer1), .stn_det_call(x_det_call), .stn_det_talk(x_det_talk),
    .stn_audio_rx(x_audio_rx), .stn_resync(x_resync), .connections(x_connections),
    .window(x_window), .window_advance(x_advance), .window_expired(x_expired),
    .window_finished(x_finished), .coord_resync(x_coord_resync), .coord_pixel(x_coord_pixel),
    .coord_hsync_n(x_chs), .coord_vsync_n(x_cvs));

  // codec frame strobe every 100 cycles
  initial forever begin
    repeat (99) @(posedge clk);
    codec_ready <= 1;
    @(posedge clk);
    codec_ready <= 0;
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [7:0] mix(input logic [7:0] a, input logic [7:0] b);
    int y;
    y = int'(a) + int'(b) - (int'(a) * int'(b)) / 256;
    return (y > 255) ? 8'hFF : 8'(y);
  endfunction

  // ---------------------------------------------------------------- monitors
  bit stable = 0;     // switches and microphones unchanged for two rounds
  int n_setup = 0, n_hangup = 0, n_fwd = 0, n_silenced = 0, n_mix = 0, n_mix_both = 0;
  int n_finished = 0, n_expired = 0, n_x_setup = 0, n_coord_resync = 0, n_stn_resync = 0;
  int n_call_cmd = 0, n_talk_cmd = 0, n_green = 0, n_phone = 0, n_rounds = 0;
  int n_ring = 0, n_vm = 0, max_round = 0;
  logic [5:0] conn_q = '0, x_conn_q = '0;
  bit pend[3];
  logic [1:0] pend_talker[3];
  bit mix_pend[3];
  logic [7:0] mix_exp[3];
  int round_t0 = 0, cyc = 0;
  logic [1:0] last_talker = '0;   // the audio byte may land just after its window

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      conn_q <= connections;
      x_conn_q <= x_connections;
      for (int x = 0; x < 3; x++)
        for (int y = x + 1; y < 3; y++) begin
          if (connected(connections, 2'(x), 2'(y)) && !connected(conn_q, 2'(x), 2'(y))) n_setup++;
          if (!connected(connections, 2'(x), 2'(y)) && connected(conn_q, 2'(x), 2'(y))) n_hangup++;
          if (connected(x_connections, 2'(x), 2'(y)) && !connected(x_conn_q, 2'(x), 2'(y))) n_x_setup++;
        end
      if (window[0]) last_talker = window[2:1];
      if (window_finished) n_finished++;
      if (window_expired) begin
        failures++;
        $display("FAIL default-size window %0d timed out", window);
      end
      if (x_expired) n_expired++;
      if (coord_resync) n_coord_resync++;
      if (|stn_resync) n_stn_resync++;
      if (|stn_det_call) n_call_cmd++;
      if (|stn_det_talk) n_talk_cmd++;
      if (window_advance && window == W_A_CALL) begin
        if (round_t0 != 0 && cyc - round_t0 > max_round) max_round = cyc - round_t0;
        round_t0 = cyc;
        n_rounds++;
      end
      if (connections != 0 && coord_pixel == 24'h00C000) n_green++;
      if (stn_pixel[0] == 24'hFFFFFF) n_phone++;
      for (int l = 0; l < 3; l++) begin
        // forwarded audio, checked the cycle after it is stored
        if (pend[l] && stable) begin
          logic [7:0] got, want;
          logic [1:0] t;
          t = pend_talker[l];
          got = (t == peer(2'(l), 1'b0)) ? peer0_sample[l] : peer1_sample[l];
          want = connected(connections, t, 2'(l)) ? codec_in[t] : 8'h00;
          checks++;
          if (got != want) begin
            failures++;
            $display("FAIL station %0d got %h from %0d, expected %h", l, got, t, want);
          end
          if (connected(connections, t, 2'(l))) n_fwd++; else n_silenced++;
        end
        pend[l] = stn_audio_rx[l];
        pend_talker[l] = last_talker;
        // headphone mix, checked the cycle after the codec strobe
        if (mix_pend[l] && stable) begin
          checks++;
          if (headphone[l] != mix_exp[l]) begin
            failures++;
            $display("FAIL station %0d headphone %h, expected %h", l, headphone[l], mix_exp[l]);
          end
          n_mix++;
          if (peer0_sample[l] != 0 && peer1_sample[l] != 0) n_mix_both++;
        end
        mix_pend[l] = codec_ready && !ringing[l] && !vm_listen[l];
        mix_exp[l] = mix(peer0_sample[l], peer1_sample[l]);
      end
    end
  end

  task automatic rounds(input int n);
    int r0;
    r0 = n_rounds;
    while (n_rounds < r0 + n) @(posedge clk);
  endtask

  // change the switches, let two rounds settle, then check `n` rounds
  task automatic phase(input logic [1:0] a, input logic [1:0] b, input logic [1:0] c,
                       input int n);
    stable = 0;
    call_sw[0] <= a; call_sw[1] <= b; call_sw[2] <= c;
    rounds(2);
    stable = 1;
    rounds(n);
  endtask

  task automatic strobe_wait();
    @(posedge clk iff codec_ready);
  endtask

  // ---------------------------------------------------------------- sequence
  initial begin
    for (int s = 0; s < 3; s++) begin call_sw[s] = 0; vm_msg_num[s] = 0; end
    codec_in[0] = 8'h50; codec_in[1] = 8'h90; codec_in[2] = 8'h30;
    repeat (5) @(posedge clk);
    rst <= 0;
    phase(2'b00, 2'b00, 2'b00, 2);
    check(connections == 6'b000000, $sformatf("idle connections %b", connections));
    phase(2'b01, 2'b01, 2'b00, 2);                 // A calls B, B calls A
    check(connections == 6'b000011, $sformatf("A-B connections %b", connections));
    check(x_connections == 6'b000011, $sformatf("short-window connections %b", x_connections));
    phase(2'b11, 2'b01, 2'b01, 3);                 // A calls both, C calls A
    check(connections == 6'b001111, $sformatf("conference connections %b", connections));
    // stay in the conference until both screens have been drawn over their
    // boxes and the phone (about half a frame)
    while ((n_green == 0 || n_phone == 0) && cyc < 900000) @(posedge clk);
    check(n_green > 0, "coordinator screen shows a connected station");
    check(n_phone > 0, "station screen shows the phone");
    phase(2'b00, 2'b01, 2'b01, 2);                 // A hangs up
    check(connections == 6'b000101, $sformatf("after hang-up %b", connections));
    stable = 0;
    // ring tone at C
    begin
      int lo, hi;
      lo = 255; hi = 0;
      ringing[2] <= 1;
      strobe_wait();
      strobe_wait();
      for (int i = 0; i < 70; i++) begin
        strobe_wait();
        @(posedge clk);
        if (int'(headphone[2]) < lo) lo = int'(headphone[2]);
        if (int'(headphone[2]) > hi) hi = int'(headphone[2]);
      end
      ringing[2] <= 0;
      check(lo < 10 && hi > 245, $sformatf("ring tone range %0d..%0d", lo, hi));
      if (lo < 10 && hi > 245) n_ring++;
    end
    // voicemail at B: record 12 samples, replay them
    begin
      logic [7:0] rec[12], heard[16];
      int found;
      strobe_wait();
      vm_record[1] <= 1;
      for (int i = 0; i < 12; i++) begin
        rec[i] = 8'(8'h21 + i * 19);
        codec_in[1] <= rec[i];
        strobe_wait();
      end
      vm_record[1] <= 0;
      repeat (5) @(posedge clk);
      check(vm_msg_count[1] == 1, $sformatf("message count %0d", vm_msg_count[1]));
      vm_msg_num[1] <= 0;
      vm_listen[1] <= 1;
      for (int i = 0; i < 16; i++) begin
        strobe_wait();
        @(posedge clk);
        heard[i] = headphone[1];
      end
      vm_listen[1] <= 0;
      found = 0;
      for (int o = 0; o + 12 <= 16; o++) begin
        bit same;
        same = 1;
        for (int i = 0; i < 12; i++) if (heard[o + i] != rec[i]) same = 0;
        if (same) found = 1;
      end
      if (found == 0)
        for (int i = 0; i < 16; i++) $display("heard %0d: %h (recorded %h)", i, heard[i], i < 12 ? rec[i] : 8'h0);
      check(found == 1, "voicemail replays the recorded samples");
      n_vm += found;
    end
    rounds(1);
    check(max_round > 0 && max_round <= 6 * 800 + 12, $sformatf("round of %0d cycles", max_round));
    $display("counts: setup=%0d hangup=%0d forwarded=%0d silenced=%0d mix=%0d mix_two=%0d",
             n_setup, n_hangup, n_fwd, n_silenced, n_mix, n_mix_both);
    $display("counts: finished=%0d expired=%0d short_setup=%0d coord_resync=%0d stn_resync=%0d",
             n_finished, n_expired, n_x_setup, n_coord_resync, n_stn_resync);
    $display("counts: call_cmd=%0d talk_cmd=%0d green=%0d phone=%0d ring=%0d vm=%0d rounds=%0d max_round=%0d",
             n_call_cmd, n_talk_cmd, n_green, n_phone, n_ring, n_vm, n_rounds, max_round);
    check(n_setup > 0, "call set-up never happened");
    check(n_hangup > 0, "hang-up never happened");
    check(n_fwd > 0, "forwarding never happened");
    check(n_silenced > 0, "silencing never happened");
    check(n_mix_both > 0, "two-peer mix never happened");
    check(n_finished > 0, "window closed by its transaction never happened");
    check(n_expired > 0, "window time-out never happened");
    check(n_x_setup > 0, "call set-up with short windows never happened");
    check(n_coord_resync > 0, "coordinator re-alignment never happened");
    check(n_stn_resync > 0, "station re-alignment never happened");
    check(n_call_cmd > 0 && n_talk_cmd > 0, "commands never detected");
    check(n_ring > 0, "ring tone never happened");
    check(n_vm > 0, "voicemail playback never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

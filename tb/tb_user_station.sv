// Station B (STATION = 1) driven by a testbench coordinator. Checks: a call
// command is answered with the dial code of the switches, a talk command
// with the latest microphone sample, both starting within a few cycles of
// the command's end; audio announced as from A or C lands in the right peer
// register; the headphone carries the mix A + C - A*C/256, the ring tone
// while ringing, and recorded voicemail while listening; the screen shows
// the phone.
module tb_user_station;
  import accs_pkg::*;
  localparam int BIT = 27;
  logic clk = 0, rst = 1, rx = 0, tx;
  logic [1:0] call_sw = 0;
  logic codec_ready = 0, ringing = 0, vm_record = 0, vm_listen = 0, vm_delete = 0;
  logic [7:0] codec_in = 0, headphone, peer0_sample, peer1_sample;
  logic [1:0] vm_msg_num = 0;
  logic [2:0] vm_msg_count;
  logic [18:0] ram_addr;
  logic ram_we;
  logic [35:0] ram_wdata, ram_rdata;
  logic [23:0] pixel;
  logic hsync_n, vsync_n, det_call, det_talk, audio_rx, rx_resync;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  user_station #(.STATION(1), .BIT_CYCLES(BIT)) dut (.clk, .rst, .rx, .tx, .call_sw,
    .codec_ready, .codec_in, .headphone, .ringing, .vm_record, .vm_listen, .vm_msg_num,
    .vm_delete, .vm_msg_count, .ram_addr, .ram_we, .ram_wdata, .ram_rdata, .pixel,
    .hsync_n, .vsync_n, .peer0_sample, .peer1_sample, .det_call, .det_talk, .audio_rx,
    .rx_resync);
  zbt_model ram (.clk, .addr(ram_addr), .we(ram_we), .wdata(ram_wdata), .rdata(ram_rdata));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(input logic [7:0] v);
    for (int k = 0; k < 8; k++) begin rx <= v[k]; repeat (BIT) @(posedge clk); end
    rx <= 0;
  endtask

  // Records the line for nine bit times after a command and decodes the
  // reply. The first rising edge gives the start: for a reply whose lowest
  // set bit is k it comes k bit times after the start, which must be within
  // `limit` cycles of the command's end. Bits are read in their middles.
  task automatic receive(input int limit, input logic [7:0] want, output logic [7:0] v,
                         output int lat);
    logic line[9 * BIT];
    int edge_at, k;
    for (int i = 0; i < 9 * BIT; i++) begin line[i] = tx; @(posedge clk); end
    edge_at = -1;
    for (int i = 1; i < 9 * BIT && edge_at < 0; i++) if (line[i] && !line[i-1]) edge_at = i;
    v = 0;
    lat = 0;
    if (want == 0) begin
      for (int i = 0; i < 9 * BIT; i++) if (line[i]) v = 8'hFF;   // any 1 is wrong
      return;
    end
    k = 0;
    while (!want[k]) k++;
    lat = (edge_at < 0) ? 9999 : edge_at - k * BIT;
    if (lat < 0 || lat > limit) return;
    for (int j = 0; j < 8; j++) v[j] = line[lat + BIT / 2 + j * BIT];
  endtask

  task automatic strobe(input logic [7:0] v);
    codec_in <= v; codec_ready <= 1; @(posedge clk); codec_ready <= 0;
    repeat (20) @(posedge clk);
  endtask

  initial begin
    logic [7:0] v;
    int lat, e;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (200) @(posedge clk);
    for (int w = 0; w < 4; w++) begin
      call_sw <= 2'(w); repeat (3) @(posedge clk);
      send(CMD_CALL);
      e = (w == 0) ? 0 : (w == 1) ? 1 : (w == 2) ? 3 : 4;
      receive(12, 8'(e), v, lat);
      check(int'(v) == e, $sformatf("dial reply %0d for switches %b, expected %0d", v, w, e));
      check(lat <= 12, $sformatf("reply latency %0d", lat));
    end
    strobe(8'h9B);
    send(CMD_TALK);
    receive(12, 8'h9B, v, lat);
    check(v == 8'h9B, $sformatf("talk reply %h", v));
    send(CMD_FROM_A); send(8'h80);      // A's audio
    send(CMD_FROM_C); send(8'h40);      // C's audio
    send(CMD_FROM_B); send(8'h11);      // own audio: ignored
    repeat (5) @(posedge clk);
    check(peer0_sample == 8'h80 && peer1_sample == 8'h40, "peer registers");
    strobe(8'h00);
    check(headphone == 8'(128 + 64 - (128 * 64) / 256), $sformatf("mix %h", headphone));
    // a command code as audio data must not act as a command
    send(CMD_FROM_A); send(CMD_TALK);
    begin
      bit quiet;
      quiet = 1;
      for (int i = 0; i < 9 * BIT; i++) begin @(posedge clk); if (tx) quiet = 0; end
      check(quiet && peer0_sample == CMD_TALK, "audio equal to a command code");
    end
    // ring tone
    ringing <= 1;
    begin
      int lo, hi;
      lo = 255; hi = 0;
      for (int i = 0; i < 64; i++) begin
        strobe(8'h00);
        if (int'(headphone) < lo) lo = int'(headphone);
        if (int'(headphone) > hi) hi = int'(headphone);
      end
      check(lo < 5 && hi > 250, $sformatf("ring tone swings %0d..%0d", lo, hi));
    end
    check(pixel == 24'hFFFFFF || pixel == 24'h0, "pixel is black or white");
    ringing <= 0;
    // voicemail: record 8 samples, play them back
    vm_record <= 1; repeat (3) @(posedge clk);
    for (int i = 0; i < 8; i++) strobe(8'(i * 16 + 3));
    vm_record <= 0; repeat (5) @(posedge clk);
    check(vm_msg_count == 1, "one message");
    vm_msg_num <= 0; vm_listen <= 1; repeat (8) @(posedge clk);
    // the voicemail output register and the headphone register both load on
    // the codec strobe, so playback reaches the headphone one sample later
    for (int i = 0; i < 9; i++) begin
      strobe(8'h00);
      if (i > 0)
        check(headphone == 8'((i - 1) * 16 + 3), $sformatf("voicemail sample %0d = %h", i - 1, headphone));
    end
    vm_listen <= 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

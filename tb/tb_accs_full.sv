// Full-size run of the conference system with every parameter at its
// default (27-cycle bits, 800-cycle windows): lines looped back directly,
// A and B dial each other while C stays idle, then each station talks.
// Checks that the connection register shows the A-B call, that A and B
// receive each other's microphone samples while C receives silence, that
// A's headphone carries B's sample, that no window times out and that a
// polling round (six windows) takes at most 6 x 800 cycles.
module tb_accs_full;
  import accs_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [1:0]  call_sw[3];
  logic        codec_ready = 0;
  logic [7:0]  codec_in[3];
  logic [1:0]  vm_msg_num[3];
  logic [2:0]  line_dn, line_up;
  logic [7:0]  headphone[3], peer0_sample[3], peer1_sample[3];
  logic [2:0]  vm_msg_count[3];
  logic [18:0] ram_addr[3];
  logic [2:0]  ram_we;
  logic [35:0] ram_wdata[3];
  logic [35:0] ram_rdata[3] = '{default: '0};
  logic [23:0] stn_pixel[3], coord_pixel;
  logic [2:0]  stn_hsync_n, stn_vsync_n, stn_det_call, stn_det_talk, stn_audio_rx, stn_resync;
  logic [5:0]  connections;
  window_t     window;
  logic        window_advance, window_expired, window_finished, coord_resync;
  logic        coord_hsync_n, coord_vsync_n;

  accs_top dut (.clk, .rst, .coord_tx(line_dn), .stn_rx(line_dn), .stn_tx(line_up),
    .coord_rx(line_up), .call_sw, .codec_ready, .codec_in, .headphone, .ringing(3'b000),
    .vm_record(3'b000), .vm_listen(3'b000), .vm_msg_num, .vm_delete(3'b000), .vm_msg_count,
    .ram_addr, .ram_we, .ram_wdata, .ram_rdata, .stn_pixel, .stn_hsync_n, .stn_vsync_n,
    .peer0_sample, .peer1_sample, .stn_det_call, .stn_det_talk, .stn_audio_rx, .stn_resync,
    .connections, .window, .window_advance, .window_expired, .window_finished, .coord_resync,
    .coord_pixel, .coord_hsync_n, .coord_vsync_n);

  int checks = 0, failures = 0, n_rounds = 0, n_expired = 0, t0 = 0, cyc = 0, max_round = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial forever begin
    repeat (99) @(posedge clk);
    codec_ready <= 1;
    @(posedge clk);
    codec_ready <= 0;
  end

  always @(posedge clk) begin
    cyc++;
    if (!rst && window_expired) n_expired++;
    if (window_advance && window == W_A_CALL) begin
      if (t0 != 0 && cyc - t0 > max_round) max_round = cyc - t0;
      t0 = cyc;
      n_rounds++;
    end
  end

  task automatic rounds(input int n);
    int r0;
    r0 = n_rounds;
    while (n_rounds < r0 + n) @(posedge clk);
  endtask

  initial begin
    call_sw[0] = 2'b01;   // A calls its first peer, B
    call_sw[1] = 2'b01;   // B calls its first peer, A
    call_sw[2] = 2'b00;
    codec_in[0] = 8'h6C; codec_in[1] = 8'hB4; codec_in[2] = 8'h2D;
    for (int s = 0; s < 3; s++) vm_msg_num[s] = 0;
    repeat (5) @(posedge clk);
    rst <= 0;
    rounds(3);
    check(connections == 6'b000011, $sformatf("connections %b", connections));
    check(peer0_sample[1] == 8'h6C, $sformatf("B hears A: %h", peer0_sample[1]));
    check(peer0_sample[0] == 8'hB4, $sformatf("A hears B: %h", peer0_sample[0]));
    check(peer1_sample[0] == 8'h00 && peer1_sample[1] == 8'h00, "C is not heard");
    check(peer0_sample[2] == 8'h00 && peer1_sample[2] == 8'h00, "C hears silence");
    @(posedge clk iff codec_ready);
    @(posedge clk);
    check(headphone[0] == 8'hB4, $sformatf("A's headphone %h", headphone[0]));
    check(n_expired == 0, $sformatf("%0d windows timed out", n_expired));
    check(max_round > 0 && max_round <= 6 * 800, $sformatf("round of %0d cycles", max_round));
    $display("round of %0d cycles", max_round);
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

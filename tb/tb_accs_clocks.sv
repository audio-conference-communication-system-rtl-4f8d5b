// The conference system with every station on its own clock, as on
// separate boards: the coordinator's clock period is 1000 time units,
// station A's 1% longer, B's 1% shorter and C's 2% longer. The lines cross clock domains
// through the receivers' synchronisers, and the receivers' edge re-alignment
// must absorb the drift over each byte. A calls both peers, B and C call A,
// so A-B and A-C are calls and B-C is not. Checks over several rounds and
// two sets of microphone samples: the connection register never changes
// while the switches stand still, every audio byte a station receives is
// the talker's sample or silence as the calls require, no window times out,
// and the re-alignment actually happened at both ends.
module tb_accs_clocks;
  import accs_pkg::*;

  logic clk = 0, rst = 1;
  always #500 clk = ~clk;
  logic [2:0] sclk = '0;
  localparam int HALF[3] = '{505, 495, 510};
  for (genvar s = 0; s < 3; s++) begin : g_clk
    initial forever #(HALF[s]) sclk[s] = ~sclk[s];
  end

  logic [2:0]  c_rx, c_tx;
  logic [5:0]  connections;
  window_t     window;
  logic        window_advance, window_expired, window_finished, dec_resync;
  logic [23:0] c_pixel;

  coordinator u_coord (.clk, .rst, .rx(c_rx), .tx(c_tx), .connections, .window,
    .window_advance, .window_expired, .window_finished, .dec_resync,
    .hcount(11'd0), .vcount(10'd0), .pixel(c_pixel));

  logic [1:0]  call_sw[3];
  logic [7:0]  mic[3];
  logic [2:0]  audio_rx, det_call, det_talk, s_resync;
  logic [7:0]  headphone[3], peer0[3], peer1[3];
  int          n_rx[3], n_bad[3], n_sresync[3];
  bit          stable = 0;

  for (genvar s = 0; s < 3; s++) begin : g_stn
    logic [2:0]  vm_count;
    logic [18:0] ram_addr;
    logic        ram_we, hs, vs;
    logic [35:0] ram_wdata;
    logic [23:0] pixel;
    int          tick = 0;
    logic        codec_ready = 1'b0;

    user_station #(.STATION(s)) u_stn (.clk(sclk[s]), .rst, .rx(c_tx[s]), .tx(c_rx[s]),
      .call_sw(call_sw[s]), .codec_ready(codec_ready), .codec_in(mic[s]),
      .headphone(headphone[s]), .ringing(1'b0), .vm_record(1'b0), .vm_listen(1'b0),
      .vm_msg_num(2'd0), .vm_delete(1'b0), .vm_msg_count(vm_count), .ram_addr, .ram_we,
      .ram_wdata, .ram_rdata(36'd0), .pixel, .hsync_n(hs), .vsync_n(vs),
      .peer0_sample(peer0[s]), .peer1_sample(peer1[s]), .det_call(det_call[s]),
      .det_talk(det_talk[s]), .audio_rx(audio_rx[s]), .rx_resync(s_resync[s]));

    // codec strobe every 50 station cycles
    always @(posedge sclk[s]) begin
      tick <= (tick == 49) ? 0 : tick + 1;
      codec_ready <= (tick == 49);
    end

    // check each received audio byte one station cycle after it is stored
    bit pend = 0;
    always @(posedge sclk[s]) begin
      if (pend && stable) begin
        logic [1:0] t;
        logic [7:0] got, want;
        t = u_stn.u_detect.data_src;
        got = (t == peer(2'(s), 1'b0)) ? peer0[s] : peer1[s];
        want = connected(connections, t, 2'(s)) ? mic[t] : 8'h00;
        n_rx[s]++;
        if (got != want) begin
          n_bad[s]++;
          $display("FAIL station %0d got %h from %0d, expected %h", s, got, t, want);
        end
      end
      pend = audio_rx[s];
      if (s_resync[s]) n_sresync[s]++;
    end
  end

  int checks = 0, failures = 0, n_rounds = 0, n_expired = 0, n_cresync = 0, n_conn_change = 0;
  logic [5:0] conn_q = '0;
  always @(posedge clk) begin
    if (!rst) begin
      if (window_expired) n_expired++;
      if (dec_resync) n_cresync++;
      if (window_advance && window == W_A_CALL) n_rounds++;
      if (stable && connections != conn_q) n_conn_change++;
      conn_q <= connections;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic rounds(input int n);
    int r0;
    r0 = n_rounds;
    while (n_rounds < r0 + n) @(posedge clk);
  endtask

  initial begin
    for (int s = 0; s < 3; s++) begin n_rx[s] = 0; n_bad[s] = 0; n_sresync[s] = 0; end
    call_sw[0] = 2'b11;   // A calls B and C
    call_sw[1] = 2'b01;   // B calls A
    call_sw[2] = 2'b01;   // C calls A
    mic[0] = 8'h3A; mic[1] = 8'hC5; mic[2] = 8'h81;
    repeat (20) @(posedge clk);
    rst <= 0;
    rounds(3);
    stable = 1;
    check(connections == 6'b001111, $sformatf("connections %b", connections));
    rounds(4);
    stable = 0;
    mic[0] = 8'hE1; mic[1] = 8'h1E; mic[2] = 8'h5B;
    rounds(2);
    stable = 1;
    rounds(4);
    check(peer0[1] == 8'hE1 && peer1[1] == 8'h00, "B hears A only");
    check(peer0[2] == 8'hE1 && peer1[2] == 8'h00, "C hears A only");
    check(peer0[0] == 8'h1E && peer1[0] == 8'h5B, "A hears B and C");
    for (int s = 0; s < 3; s++) begin
      check(n_rx[s] >= 10, $sformatf("station %0d checked %0d audio bytes", s, n_rx[s]));
      check(n_bad[s] == 0, $sformatf("station %0d had %0d wrong audio bytes", s, n_bad[s]));
      check(n_sresync[s] > 0, $sformatf("station %0d never re-aligned", s));
      checks += n_rx[s];
    end
    check(n_conn_change == 0, $sformatf("connection register changed %0d times", n_conn_change));
    check(n_expired == 0, $sformatf("%0d windows timed out", n_expired));
    check(n_cresync > 0, "coordinator never re-aligned");
    $display("audio bytes checked %0d/%0d/%0d, re-alignments coordinator %0d stations %0d/%0d/%0d",
             n_rx[0], n_rx[1], n_rx[2], n_cresync, n_sresync[0], n_sresync[1], n_sresync[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Coordinator against three behavioural stations written in the testbench.
// Each model watches its line, recognises a command by sampling the bits in
// their middles (every command starts 0,1, so the first rising edge marks
// bit 1), answers "call" with its dial code and "talk" with its sample a few
// cycles after the command ends, and records the audio byte that follows an
// "audio from X" command. Checks: the connection register after the call
// windows, that forwarded audio equals the talker's sample for connected
// stations and zero otherwise, the window order, and the window lengths.
module tb_coordinator;
  import accs_pkg::*;
  localparam int BIT = 27;
  logic clk = 0, rst = 1;
  logic [2:0] rx = 0, tx;
  logic [5:0] connections;
  window_t window;
  logic window_advance, window_expired, window_finished, dec_resync;
  logic [23:0] pixel;
  int checks = 0, failures = 0;
  int n_call_cmd[3], n_talk_cmd[3], n_audio[3];
  logic [7:0] dial[3], mic[3];
  logic [7:0] heard[3][3];     // heard[listener][source]
  int n_expired = 0, n_finished = 0, n_resync = 0;
  always #5 clk = ~clk;

  coordinator #(.BIT_CYCLES(BIT)) dut (.clk, .rst, .rx, .tx, .connections, .window,
    .window_advance, .window_expired, .window_finished, .dec_resync,
    .hcount(11'd0), .vcount(10'd0), .pixel);

  always @(posedge clk) begin
    if (window_expired) n_expired++;
    if (window_finished) n_finished++;
    if (dec_resync) n_resync++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  for (genvar s = 0; s < 3; s++) begin : g_model
    initial begin
      logic [7:0] cmd, b;
      n_call_cmd[s] = 0; n_talk_cmd[s] = 0; n_audio[s] = 0;
      forever begin
        @(posedge tx[s]);
        cmd = 0;
        repeat (BIT / 2) @(posedge clk);
        for (int k = 1; k < 8; k++) begin
          cmd[k] = tx[s];
          if (k < 7) repeat (BIT) @(posedge clk);
        end
        repeat (BIT - BIT / 2 + 3) @(posedge clk);   // command over, station latency
        if (cmd == CMD_CALL || cmd == CMD_TALK) begin
          b = (cmd == CMD_CALL) ? dial[s] : mic[s];
          if (cmd == CMD_CALL) n_call_cmd[s]++; else n_talk_cmd[s]++;
          for (int k = 0; k < 8; k++) begin
            rx[s] <= b[k];
            repeat (BIT) @(posedge clk);
          end
          rx[s] <= 0;
        end else if (cmd == CMD_FROM_A || cmd == CMD_FROM_B || cmd == CMD_FROM_C) begin
          int src;
          src = (cmd == CMD_FROM_A) ? 0 : (cmd == CMD_FROM_B) ? 1 : 2;
          // the audio byte follows within a few cycles: sample mid-bit
          repeat (BIT / 2 + 4) @(posedge clk);
          for (int k = 0; k < 8; k++) begin
            b[k] = tx[s];
            if (k < 7) repeat (BIT) @(posedge clk);
          end
          heard[s][src] = b;
          n_audio[s]++;
        end else begin
          $display("FAIL station %0d saw unknown command %b", s, cmd);
          failures++;
        end
      end
    end
  end

  // runs until the start of the next A_CALL window
  task automatic one_round();
    @(posedge clk);
    while (!(window_advance && window == W_A_CALL)) @(posedge clk);
    @(posedge clk);
    while (!(window_advance && window == W_A_CALL)) @(posedge clk);
  endtask

  initial begin
    int t0, len;
    for (int a = 0; a < 3; a++) for (int c = 0; c < 3; c++) heard[a][c] = 8'hEE;
    dial[0] = DIAL_B; dial[1] = DIAL_A; dial[2] = DIAL_A;   // A<->B, C->A one-sided
    mic[0] = 8'h5A; mic[1] = 8'hC3; mic[2] = 8'h77;
    repeat (3) @(posedge clk);
    rst <= 0;
    // window order and lengths over the first round
    for (int w = 0; w < 6; w++) begin
      while (!window_advance) @(posedge clk);
      check(int'(window) == w, $sformatf("window %0d in order", w));
      t0 = int'($time);
      @(posedge clk);
      while (!window_advance) @(posedge clk);
      len = (int'($time) - t0) / 10;
      if (w % 2 == 0) check(len > 8 * 2 * BIT && len < 8 * 2 * BIT + 40, $sformatf("call window %0d cycles", len));
      else            check(len > 8 * 3 * BIT && len < 8 * 3 * BIT + 40, $sformatf("talk window %0d cycles", len));
    end
    check(connections == 6'b000111, $sformatf("connections %b", connections));
    one_round();
    check(heard[1][0] == 8'h5A && heard[0][1] == 8'hC3, "A and B hear each other");
    check(heard[2][0] == 8'h00 && heard[2][1] == 8'h00, "C hears nothing");
    check(heard[0][2] == 8'h00 && heard[1][2] == 8'h00, "C is heard by nobody");
    // A now calls both: A-C becomes a call; C changes its sample
    dial[0] = DIAL_BOTH; mic[2] = 8'h3C; mic[0] = 8'hA5;
    one_round();
    one_round();
    check(connections == 6'b001111, $sformatf("connections %b", connections));
    check(heard[2][0] == 8'hA5 && heard[0][2] == 8'h3C, "A and C hear each other");
    check(heard[1][2] == 8'h00 && heard[2][1] == 8'h00, "B and C not in a call");
    // everyone hangs up
    dial[0] = DIAL_HANGUP; dial[1] = DIAL_HANGUP; dial[2] = DIAL_HANGUP;
    one_round();
    one_round();
    check(connections == 6'b000000, "all hung up");
    check(heard[1][0] == 8'h00, "no audio after hang-up");
    for (int s = 0; s < 3; s++)
      check(n_call_cmd[s] >= 5 && n_talk_cmd[s] >= 5 && n_audio[s] >= 10, "every station served");
    check(n_expired == 0 && n_finished > 30, "windows closed by their transactions");
    check(n_resync > 0, "decoder re-aligned on station replies");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

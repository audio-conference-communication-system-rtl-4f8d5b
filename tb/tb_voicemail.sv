// Records messages of several lengths into the ZBT model, checks the start
// addresses (one word per four samples, messages back to back), the packed
// words (first sample in bits 7:0, bits 35:32 zero), plays every message back
// sample by sample, then checks the four-message limit, deleting one message
// (it plays silence) and deleting all (memory reused from address 0).
module tb_voicemail;
  localparam int AW = 19;
  logic clk = 0, rst = 1, record = 0, listen = 0, erase = 0, ready = 0;
  logic [1:0] msg_num = 0;
  logic [7:0] audio_in = 0, audio_out;
  logic [AW-1:0] ram_addr;
  logic ram_we;
  logic [35:0] ram_wdata, ram_rdata;
  logic [2:0] msg_count;
  logic [AW-1:0] msg_start [5];
  int checks = 0, failures = 0;
  byte unsigned rec [4][$];
  always #5 clk = ~clk;

  voicemail #(.MSGS(4), .ADDR_W(AW), .RAM_LATENCY(2)) dut (.clk, .rst, .record, .listen,
    .msg_num, .erase, .ready, .audio_in, .audio_out, .ram_addr, .ram_we, .ram_wdata,
    .ram_rdata, .msg_count, .msg_start);
  zbt_model #(.ADDR_W(AW), .LATENCY(2)) ram (.clk, .addr(ram_addr), .we(ram_we),
    .wdata(ram_wdata), .rdata(ram_rdata));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic strobe(input logic [7:0] v);
    audio_in <= v; ready <= 1; @(posedge clk); ready <= 0;
    repeat (15) @(posedge clk);
  endtask

  task automatic record_msg(input int m, input int len);
    record <= 1; @(posedge clk); @(posedge clk);
    for (int i = 0; i < len; i++) begin
      byte unsigned v;
      v = 8'($urandom_range(1, 255));
      rec[m].push_back(v);
      strobe(v);
    end
    record <= 0; repeat (3) @(posedge clk);
  endtask

  task automatic play(input int m, input int len, input bit silent);
    msg_num <= 2'(m); listen <= 1; repeat (6) @(posedge clk);
    for (int i = 0; i < ((len + 3) / 4) * 4 + 4; i++) begin
      int e;
      ready <= 1; @(posedge clk); ready <= 0; @(posedge clk);
      e = (silent || i >= len) ? 0 : int'(rec[m][i]);
      checks++;
      if (int'(audio_out) != e) begin
        failures++;
        if (failures < 10) $display("FAIL msg %0d sample %0d = %h expected %h", m, i, audio_out, e);
      end
      repeat (12) @(posedge clk);
    end
    listen <= 0; repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0; @(posedge clk);
    record_msg(0, 16);
    check(msg_count == 1 && msg_start[1] == 4, $sformatf("first message ends at word 4 (%0d)", msg_start[1]));
    record_msg(1, 17);
    check(msg_count == 2 && msg_start[2] == 9, $sformatf("second message ends at word 9 (%0d)", msg_start[2]));
    record_msg(2, 8);
    check(msg_count == 3 && msg_start[3] == 11, "third message ends at word 11");
    // packed words
    check(ram.mem[0] == {4'b0, rec[0][3], rec[0][2], rec[0][1], rec[0][0]}, "word 0 packing");
    check(ram.mem[8] == {4'b0, 24'd0, rec[1][16]}, "partial last word");
    play(0, 16, 0);
    play(1, 17, 0);
    play(2, 8, 0);
    record_msg(3, 5);
    check(msg_count == 4, "four messages");
    record <= 1; audio_in <= 8'h55; repeat (3) begin ready <= 1; @(posedge clk); ready <= 0; repeat (5) @(posedge clk); end
    record <= 0; repeat (3) @(posedge clk);
    check(msg_count == 4 && msg_start[4] == 13, "fifth message refused");
    play(3, 5, 0);
    msg_num <= 1; erase <= 1; @(posedge clk); erase <= 0; @(posedge clk);
    play(1, 17, 1);
    play(2, 8, 0);
    for (int m = 0; m < 4; m++) begin
      msg_num <= 2'(m); erase <= 1; @(posedge clk); erase <= 0; @(posedge clk);
    end
    check(msg_count == 0, "all deleted");
    rec[0].delete();
    record_msg(0, 4);
    check(msg_count == 1 && msg_start[1] == 1, "memory reused from 0");
    play(0, 4, 0);
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

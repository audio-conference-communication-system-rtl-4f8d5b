// Drives a line with command packages and audio bytes (bit 0 first, 27
// clocks a bit, some bits stretched or shortened by a clock) and checks that
// each command raises its pulse once, that the byte after "audio from X" is
// delivered with source X, and that an audio byte equal to a command code is
// not taken for a command.
module tb_command_detector;
  import accs_pkg::*;
  localparam int BIT = 27;
  logic clk = 0, rst = 1, rx = 0;
  logic det_call, det_talk, data_valid, resync;
  logic [1:0] data_src;
  logic [7:0] data;
  int checks = 0, failures = 0;
  int n_call = 0, n_talk = 0, n_data = 0;
  logic [7:0] last_data; logic [1:0] last_src;
  always #5 clk = ~clk;
  command_detector #(.BIT_CYCLES(BIT)) dut (.clk, .rst, .rx, .det_call, .det_talk,
    .data_valid, .data_src, .data, .resync);
  always @(posedge clk) begin
    if (det_call) n_call++;
    if (det_talk) n_talk++;
    if (data_valid) begin n_data++; last_data = data; last_src = data_src; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(input logic [7:0] v);
    for (int k = 0; k < 8; k++) begin
      rx <= v[k];
      repeat (BIT + $urandom_range(0, 2) - 1) @(posedge clk);
    end
    rx <= 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (100) @(posedge clk);
    for (int n = 0; n < 30; n++) begin
      int kind, c0, t0, d0;
      logic [7:0] v;
      kind = $urandom_range(0, 4);
      c0 = n_call; t0 = n_talk; d0 = n_data;
      case (kind)
        0: send(CMD_CALL);
        1: send(CMD_TALK);
        default: begin
          v = (n % 4 == 0) ? CMD_CALL : (n % 4 == 1) ? CMD_TALK : 8'($urandom);
          send(from_cmd(2'(kind - 2)));
          send(v);
        end
      endcase
      repeat (BIT + 5) @(posedge clk);
      case (kind)
        0: check(n_call == c0 + 1 && n_talk == t0 && n_data == d0, "call detected alone");
        1: check(n_talk == t0 + 1 && n_call == c0 && n_data == d0, "talk detected alone");
        default: begin
          check(n_data == d0 + 1 && n_call == c0 && n_talk == t0, $sformatf("audio byte %h only", v));
          check(last_data == v, $sformatf("audio %h got %h", v, last_data));
          check(last_src == 2'(kind - 2), "audio source");
        end
      endcase
      repeat ($urandom_range(0, 300)) @(posedge clk);
    end
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

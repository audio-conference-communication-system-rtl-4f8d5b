// Station B's controller: answers call with the dial code and talk with the
// latest microphone sample, files audio bytes under the right peer (A is
// peer0, C is peer1) and ignores bytes marked as its own.
module tb_user_end;
  logic clk = 0, rst = 1;
  logic det_call = 0, det_talk = 0, data_valid = 0, codec_ready = 0, tx_start;
  logic [1:0] data_src = 0;
  logic [7:0] data = 0, dial = 0, codec_in = 0, tx_byte, peer0, peer1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  user_end #(.STATION(1)) dut (.clk, .rst, .det_call, .det_talk, .data_valid, .data_src, .data,
    .dial, .codec_ready, .codec_in, .tx_start, .tx_byte, .peer0, .peer1);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [7:0] m0, m1, m2;
    m0 = 0; m1 = 0; m2 = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 200; n++) begin
      int op;
      logic [7:0] v;
      op = $urandom_range(0, 3);
      v = 8'($urandom);
      case (op)
        0: begin codec_in <= v; codec_ready <= 1; @(posedge clk); codec_ready <= 0; @(posedge clk); m0 = v; end
        1: begin
          dial <= 8'($urandom_range(0, 4)); @(posedge clk);
          det_call <= 1; @(posedge clk); det_call <= 0; @(posedge clk);
          check(tx_start && tx_byte == dial, "call answered with dial code");
        end
        2: begin
          det_talk <= 1; @(posedge clk); det_talk <= 0; @(posedge clk);
          check(tx_start && tx_byte == m0, $sformatf("talk answered with microphone sample %h %h %b", tx_byte, m0, tx_start));
        end
        default: begin
          int src;
          src = $urandom_range(0, 2);
          data <= v; data_src <= 2'(src); data_valid <= 1; @(posedge clk); data_valid <= 0;
          if (src == 0) m1 = v;
          if (src == 2) m2 = v;
          @(posedge clk);
          check(peer0 == m1 && peer1 == m2, "peer samples");
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

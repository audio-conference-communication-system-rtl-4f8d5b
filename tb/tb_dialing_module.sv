// All switch settings for all three stations against the dial-code table.
module tb_dialing_module;
  logic clk = 0, rst = 1;
  logic [1:0] sw [3];
  logic [7:0] dial [3];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  for (genvar s = 0; s < 3; s++) begin : g
    dialing_module #(.STATION(s)) dut (.clk, .rst, .call_sw(sw[s]), .dial(dial[s]));
  end
  // expected code for station s, switches w: peers in A/B/C order
  function automatic int exp_code(int s, int w);
    int p0, p1;
    p0 = (s == 0) ? 1 : 0;
    p1 = (s == 2) ? 1 : 2;
    case (w)
      0: return 0;
      1: return p0 + 1;
      2: return p1 + 1;
      default: return 4;
    endcase
  endfunction
  initial begin
    for (int s = 0; s < 3; s++) sw[s] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int r = 0; r < 3; r++)
      for (int w = 0; w < 4; w++) begin
        for (int s = 0; s < 3; s++) sw[s] <= 2'(w);
        @(posedge clk); @(posedge clk);
        for (int s = 0; s < 3; s++) begin
          checks++;
          if (int'(dial[s]) != exp_code(s, w)) begin
            failures++; $display("FAIL station %0d switches %b dial %0d", s, w, dial[s]);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

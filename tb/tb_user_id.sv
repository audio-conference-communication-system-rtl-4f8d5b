// Random dial codes from random stations, compared with a reference model of
// the connection register and of the derived "connected" pairs.
module tb_user_id;
  import accs_pkg::*;
  logic clk = 0, rst = 1, valid = 0;
  logic [1:0] station;
  logic [7:0] dial;
  logic [5:0] connections;
  logic [5:0] model;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  user_id dut (.clk, .rst, .valid, .station, .dial, .connections);

  // reference: index of bit "x calls y", written out from the table
  function automatic int idx(int x, int y);
    if (x == 1 && y == 0) return 0;
    if (x == 0 && y == 1) return 1;
    if (x == 2 && y == 0) return 2;
    if (x == 0 && y == 2) return 3;
    if (x == 2 && y == 1) return 4;
    return 5;
  endfunction

  initial begin
    model = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int n = 0; n < 400; n++) begin
      int s, d, p0, p1;
      s = $urandom_range(0, 2);
      d = $urandom_range(0, 6);
      p0 = (s == 0) ? 1 : 0;
      p1 = (s == 2) ? 1 : 2;
      case (d)
        0: begin model[idx(s, p0)] = 0; model[idx(s, p1)] = 0; end
        4: begin model[idx(s, p0)] = 1; model[idx(s, p1)] = 1; end
        1, 2, 3: if (d - 1 == p0) begin model[idx(s, p0)] = 1; model[idx(s, p1)] = 0; end
                 else if (d - 1 == p1) begin model[idx(s, p0)] = 0; model[idx(s, p1)] = 1; end
        default: ;
      endcase
      valid <= 1; station <= 2'(s); dial <= 8'(d);
      @(posedge clk); valid <= 0;
      @(posedge clk);
      checks++;
      if (connections !== model) begin
        failures++;
        $display("FAIL station %0d dial %0d: %b expected %b", s, d, connections, model);
      end
      checks++;
      if (connected(connections, 2'd0, 2'd1) != (model[0] & model[1])) failures++;
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

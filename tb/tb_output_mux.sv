// Random inputs against a reference: the window's station gets the command
// bit, the others get the listener bit, audio only when connected.
module tb_output_mux;
  logic clk = 0, rst = 1;
  logic [1:0] station;
  logic [5:0] connections;
  logic cmd_bit, lst_bit, lst_is_data;
  logic [2:0] tx;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  output_mux dut (.clk, .rst, .station, .connections, .cmd_bit, .lst_bit, .lst_is_data, .tx);

  function automatic bit conn(logic [5:0] c, int x, int y);
    // pairs: A-B bits 0,1; A-C bits 2,3; B-C bits 4,5
    if ((x == 0 && y == 1) || (x == 1 && y == 0)) return c[0] & c[1];
    if ((x == 0 && y == 2) || (x == 2 && y == 0)) return c[2] & c[3];
    return c[4] & c[5];
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 500; n++) begin
      logic [2:0] exp;
      int s;
      s = $urandom_range(0, 2);
      station <= 2'(s); connections <= 6'($urandom);
      cmd_bit <= 1'($urandom); lst_bit <= 1'($urandom); lst_is_data <= 1'($urandom);
      @(posedge clk);
      #1;
      for (int k = 0; k < 3; k++)
        exp[k] = (k == s) ? cmd_bit : (lst_bit & (!lst_is_data | conn(connections, s, k)));
      @(posedge clk); #1;
      checks++;
      if (tx !== exp) begin failures++; $display("FAIL s=%0d tx=%b exp=%b", s, tx, exp); end
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

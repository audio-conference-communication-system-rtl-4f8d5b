// Behavioural model of the voicemail ZBT SRAM (36-bit words), for
// simulation only. Writes take effect on the clock edge with `we` high; a
// read returns the word at the address presented LATENCY clocks earlier.
// Only the words touched are stored (associative array); unwritten words
// read as zero.
module zbt_model #(
  parameter int ADDR_W  = 19,
  parameter int LATENCY = 2
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  logic [35:0]       wdata,
  output logic [35:0]       rdata
);
  logic [35:0] mem [int];
  logic [ADDR_W-1:0] pipe [LATENCY];
  always @(posedge clk) begin
    if (we) mem[int'(addr)] = wdata;
    pipe[0] <= addr;
    for (int i = 1; i < LATENCY; i++) pipe[i] <= pipe[i-1];
  end
  assign rdata = mem.exists(int'(pipe[LATENCY-1])) ? mem[int'(pipe[LATENCY-1])] : 36'd0;
endmodule

// Output multiplexer of the coordinator.
//
// Drives the three lines toward stations A, B and C. The line of the station
// that owns the current window carries the command serialiser (call or talk
// command). The two other lines carry the listener serialiser: its "audio
// from X" command always, and its audio byte only where that station is in a
// call with the talker; elsewhere the audio bits are held low, which the
// station receives as a zero byte. Outputs are registered (one cycle).
module output_mux
  import accs_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] station,
  input  logic [5:0] connections,
  input  logic       cmd_bit,
  input  logic       lst_bit,
  input  logic       lst_is_data,
  output logic [2:0] tx
);
  always_ff @(posedge clk) begin
    if (rst) begin
      tx <= '0;
    end else begin
      for (int s = 0; s < 3; s++) begin
        if (2'(s) == station)
          tx[s] <= cmd_bit;
        else
          tx[s] <= lst_bit & (~lst_is_data | connected(connections, station, 2'(s)));
      end
    end
  end
endmodule

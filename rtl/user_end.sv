// Station controller of a user-end station.
//
// Keeps the latest microphone sample (taken on every codec `codec_ready`
// strobe) and answers the coordinator's commands through the station's
// serialiser: a "call" command is answered with the current dial code, a
// "talk" command with the latest microphone sample. Audio bytes arriving
// after an "audio from X" command are stored in a register for peer X; the
// two peer registers feed the mixer. A byte marked as coming from the
// station itself is ignored. `tx_start` pulses one cycle after the command
// pulse.
module user_end
  import accs_pkg::*;
#(
  parameter int unsigned STATION = 0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       det_call,
  input  logic       det_talk,
  input  logic       data_valid,
  input  logic [1:0] data_src,
  input  logic [7:0] data,
  input  logic [7:0] dial,
  input  logic       codec_ready,
  input  logic [7:0] codec_in,
  output logic       tx_start,
  output logic [7:0] tx_byte,
  output logic [7:0] peer0,
  output logic [7:0] peer1
);
  localparam logic [1:0] SELF = 2'(STATION);
  localparam logic [1:0] P0 = peer(SELF, 1'b0);
  localparam logic [1:0] P1 = peer(SELF, 1'b1);

  logic [7:0] mic;

  always_ff @(posedge clk) begin
    tx_start <= 1'b0;
    if (rst) begin
      mic     <= '0;
      tx_byte <= '0;
      peer0   <= '0;
      peer1   <= '0;
    end else begin
      if (codec_ready) mic <= codec_in;
      if (det_call) begin
        tx_start <= 1'b1;
        tx_byte  <= dial;
      end else if (det_talk) begin
        tx_start <= 1'b1;
        tx_byte  <= mic;
      end
      if (data_valid && data_src == P0) peer0 <= data;
      if (data_valid && data_src == P1) peer1 <= data;
    end
  end
endmodule

// Talk-window controller of the coordinator.
//
// When its window opens it sends the command package "transmit audio"
// (01011110) to the talker. When that command has left, two things run side
// by side for one byte time: the one-byte decoder captures the talker's audio
// sample, and the listener serialiser sends "next audio is from <talker>"
// (01101110, 01110110 or 01111010) to the two other stations. The source
// command starts SRC_DELAY cycles after the talk command has left, the same
// delay the coordinator puts before its decoder, so it ends as the sample is
// captured: the stations' receivers run freely and need the audio byte to
// follow the source command without a gap of half a bit or more. When both
// are done the captured sample is sent to the listeners, with `lst_is_data` high
// so the output multiplexer can withhold it from a station that is not in a
// call with the talker (that station receives a zero byte). `finished` then
// closes the window. A new window opening while it is busy abandons the
// transaction.
//
// The command codes are the document's. The overlap of the source command
// with the talker's reply, and silence for unconnected listeners, are this
// design's reading of it.
module talking_module
  import accs_pkg::*;
#(
  parameter int unsigned SRC_DELAY = 8   // at least 1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       enable,
  input  logic       open,
  input  logic [1:0] station,
  output logic       cmd_start,
  output logic [7:0] cmd_byte,
  input  logic       cmd_done,
  output logic       dec_start,
  input  logic       dec_valid,
  input  logic [7:0] dec_byte,
  output logic       lst_start,
  output logic [7:0] lst_byte,
  output logic       lst_is_data,
  input  logic       lst_done,
  output logic       finished
);
  typedef enum logic [2:0] {T_IDLE, T_SEND, T_RECV, T_FWD, T_DONE} tstate_t;
  tstate_t    state;
  logic [1:0] talker;
  logic       got_byte, sent_src, src_pending;
  logic [$clog2(SRC_DELAY+1)-1:0] src_wait;
  logic [7:0] sample;

  assign cmd_byte = CMD_TALK;

  always_ff @(posedge clk) begin
    cmd_start <= 1'b0;
    dec_start <= 1'b0;
    lst_start <= 1'b0;
    finished  <= 1'b0;
    if (rst) begin
      state       <= T_IDLE;
      talker      <= '0;
      got_byte    <= 1'b0;
      sent_src    <= 1'b0;
      src_pending <= 1'b0;
      src_wait    <= '0;
      sample      <= '0;
      lst_byte    <= '0;
      lst_is_data <= 1'b0;
    end else if (open) begin
      lst_is_data <= 1'b0;
      got_byte    <= 1'b0;
      sent_src    <= 1'b0;
      src_pending <= 1'b0;
      if (enable) begin
        state     <= T_SEND;
        cmd_start <= 1'b1;
        talker    <= station;
      end else begin
        state <= T_IDLE;
      end
    end else begin
      case (state)
        T_SEND: if (cmd_done) begin
          dec_start   <= 1'b1;
          src_pending <= 1'b1;
          src_wait    <= ($bits(src_wait))'(SRC_DELAY - 1);
          state       <= T_RECV;
        end
        T_RECV: begin
          if (src_pending) begin
            if (src_wait == 0) begin
              lst_start   <= 1'b1;
              lst_byte    <= from_cmd(talker);
              src_pending <= 1'b0;
            end else begin
              src_wait <= src_wait - 1'b1;
            end
          end
          if (dec_valid) begin
            got_byte <= 1'b1;
            sample   <= dec_byte;
          end
          if (lst_done) sent_src <= 1'b1;
          if ((got_byte || dec_valid) && (sent_src || lst_done)) begin
            lst_start   <= 1'b1;
            lst_byte    <= dec_valid ? dec_byte : sample;
            lst_is_data <= 1'b1;
            state       <= T_FWD;
          end
        end
        T_FWD: if (lst_done) begin
          lst_is_data <= 1'b0;
          finished    <= 1'b1;
          state       <= T_DONE;
        end
        default: ;
      endcase
    end
  end
endmodule

// Call-window controller of the coordinator.
//
// When its window opens (`open` with `enable` high) it sends the command
// package "transmit your calling information" (01111110) to the window's
// station through the command serialiser. As soon as the command has left
// (`cmd_done`) it starts the one-byte decoder on that station's line; the
// station answers right after the command, so the decoded byte is its dial
// code. That byte goes to the User_ID register with a one-cycle `id_valid`,
// and `finished` tells the window sequencer the window may close early.
// A new window opening while it is still busy abandons the transaction.
//
// The station's dial byte doubles as the acknowledgement the document's
// calling module waits for: there is no separate acknowledgement packet, so
// that the exchange fits in one window.
module calling_module
  import accs_pkg::*;
(
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
  output logic       id_valid,
  output logic [1:0] id_station,
  output logic [7:0] id_byte,
  output logic       finished
);
  typedef enum logic [1:0] {C_IDLE, C_SEND, C_RECV, C_DONE} cstate_t;
  cstate_t state;

  assign cmd_byte = CMD_CALL;

  always_ff @(posedge clk) begin
    cmd_start <= 1'b0;
    dec_start <= 1'b0;
    id_valid  <= 1'b0;
    finished  <= 1'b0;
    if (rst) begin
      state      <= C_IDLE;
      id_station <= '0;
      id_byte    <= '0;
    end else if (open) begin
      if (enable) begin
        state      <= C_SEND;
        cmd_start  <= 1'b1;
        id_station <= station;
      end else begin
        state <= C_IDLE;
      end
    end else begin
      case (state)
        C_SEND: if (cmd_done) begin
          dec_start <= 1'b1;
          state     <= C_RECV;
        end
        C_RECV: if (dec_valid) begin
          id_valid <= 1'b1;
          id_byte  <= dec_byte;
          finished <= 1'b1;
          state    <= C_DONE;
        end
        default: ;
      endcase
    end
  end
endmodule

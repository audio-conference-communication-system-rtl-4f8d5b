// Station receiver: command detection and audio capture.
//
// A free-running bit_sampler recovers bits from the coordinator's line
// (BIT_CYCLES samples per bit, majority of ones, edges re-align the grid).
// The bits slide through an 8-bit window, newest bit in the top, so that the
// window equals a byte sent bit 0 first once all eight have arrived. When the
// window matches a command package the matching pulse is raised and the
// window is cleared:
//   01111110 call  -> det_call      01011110 talk -> det_talk
//   01101110 / 01110110 / 01111010 "audio from A / B / C"
// After an "audio from X" command the next eight bits are not searched for
// commands: they are the audio byte, delivered on `data` with `data_src` = X
// and a one-cycle `data_valid`. Because the line idles low and every command
// ends and begins with a 0 and has a 1 in its second bit, a partly filled
// window cannot match.
//
// The codes are the document's; the sliding-window matcher stands for its
// large state machine.
module command_detector
  import accs_pkg::*;
#(
  parameter int unsigned BIT_CYCLES     = 27,
  parameter int unsigned ONES_THRESHOLD = 18
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx,
  output logic       det_call,
  output logic       det_talk,
  output logic       data_valid,
  output logic [1:0] data_src,
  output logic [7:0] data,
  output logic       resync
);
  logic       bit_valid, bit_val;
  logic [7:0] win;
  logic [7:0] next_win;
  logic       in_data;
  logic [2:0] count;

  bit_sampler #(.BIT_CYCLES(BIT_CYCLES), .ONES_THRESHOLD(ONES_THRESHOLD)) u_sampler (
    .clk, .rst, .run(1'b1), .restart(1'b0), .rx,
    .bit_valid, .bit_val, .resync
  );

  assign next_win = {bit_val, win[7:1]};

  always_ff @(posedge clk) begin
    det_call   <= 1'b0;
    det_talk   <= 1'b0;
    data_valid <= 1'b0;
    if (rst) begin
      win      <= '0;
      in_data  <= 1'b0;
      count    <= '0;
      data_src <= '0;
      data     <= '0;
    end else if (bit_valid) begin
      if (in_data) begin
        win   <= next_win;
        count <= count + 1'b1;
        if (count == 3'd7) begin
          in_data    <= 1'b0;
          data_valid <= 1'b1;
          data       <= next_win;
          win        <= '0;
        end
      end else begin
        win <= next_win;
        unique case (next_win)
          CMD_CALL: begin det_call <= 1'b1; win <= '0; end
          CMD_TALK: begin det_talk <= 1'b1; win <= '0; end
          CMD_FROM_A, CMD_FROM_B, CMD_FROM_C: begin
            in_data  <= 1'b1;
            count    <= '0;
            win      <= '0;
            data_src <= (next_win == CMD_FROM_A) ? 2'd0 :
                        (next_win == CMD_FROM_B) ? 2'd1 : 2'd2;
          end
          default: ;
        endcase
      end
    end
  end
endmodule

// Byte serialiser: the transmit side of every serial line.
//
// `start` loads `data` and sends its eight bits, bit 0 first, each held on
// `tx` for BIT_CYCLES clocks. Between bytes the line rests low. `done` pulses
// in the cycle after the last bit period ends; `busy` is high while a byte is
// on the line. `clear` drops the line to idle at once. `tx` is a register, so
// the first bit appears one cycle after `start`.
//
// The bit time matches the receivers' 27-sample oversampling. The idle level
// and the bit order are this design's choices (bit order matching the
// document's decoder).
module byte_serializer #(
  parameter int unsigned BIT_CYCLES = 27
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [7:0] data,
  input  logic       clear,
  output logic       tx,
  output logic       busy,
  output logic       done
);
  localparam int unsigned CW = $clog2(BIT_CYCLES);

  logic [7:0]    shreg;
  logic [2:0]    count;
  logic [CW-1:0] phase;

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst || clear) begin
      busy  <= 1'b0;
      tx    <= 1'b0;
      shreg <= '0;
      count <= '0;
      phase <= '0;
    end else if (start) begin
      busy  <= 1'b1;
      tx    <= data[0];
      shreg <= {1'b0, data[7:1]};
      count <= '0;
      phase <= '0;
    end else if (busy) begin
      if (phase == CW'(BIT_CYCLES - 1)) begin
        phase <= '0;
        if (count == 3'd7) begin
          busy <= 1'b0;
          tx   <= 1'b0;
          done <= 1'b1;
        end else begin
          count <= count + 1'b1;
          tx    <= shreg[0];
          shreg <= {1'b0, shreg[7:1]};
        end
      end else begin
        phase <= phase + 1'b1;
      end
    end
  end
endmodule

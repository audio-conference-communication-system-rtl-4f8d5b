// One-byte decoder: turns eight oversampled serial bits into a byte.
//
// On `start` the decoder opens a fresh bit grid on `rx` and collects the next
// eight bits from a bit_sampler (BIT_CYCLES samples per bit, more than
// ONES_THRESHOLD ones make a 1, edges re-align the grid). The first bit
// received lands in data[0], as in the document's decoder. After the eighth
// bit `valid` pulses for one cycle with the byte on `data`; `data` holds its
// value until the next byte. A `start` while busy restarts the byte.
//
// Timing: a byte takes 8 * BIT_CYCLES cycles from `start` (fewer or more by
// the re-alignments), plus one cycle to present it.
module one_byte_decoder #(
  parameter int unsigned BIT_CYCLES     = 27,
  parameter int unsigned ONES_THRESHOLD = 18
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic       rx,
  output logic       busy,
  output logic       valid,
  output logic [7:0] data,
  output logic       resync
);
  logic       bit_valid, bit_val;
  logic [2:0] count;
  logic [7:0] shreg;

  bit_sampler #(.BIT_CYCLES(BIT_CYCLES), .ONES_THRESHOLD(ONES_THRESHOLD)) u_sampler (
    .clk, .rst, .run(busy), .restart(start), .rx,
    .bit_valid, .bit_val, .resync
  );

  always_ff @(posedge clk) begin
    valid <= 1'b0;
    if (rst) begin
      busy  <= 1'b0;
      count <= '0;
      shreg <= '0;
      data  <= '0;
    end else if (start) begin
      busy  <= 1'b1;
      count <= '0;
    end else if (busy && bit_valid) begin
      shreg <= {bit_val, shreg[7:1]};
      count <= count + 1'b1;
      if (count == 3'd7) begin
        busy  <= 1'b0;
        valid <= 1'b1;
        data  <= {bit_val, shreg[7:1]};
      end
    end
  end
endmodule

// Oversampling bit recovery with edge resynchronisation.
//
// Every bit on a line lasts BIT_CYCLES clocks. While `run` is high the sampler
// counts the ones seen in each bit period and, at its end, emits the bit as 1
// when more than ONES_THRESHOLD samples were high (the document's 27-sample,
// more-than-18 rule). A change of level on the line re-aligns the bit grid:
// an edge in the first half of a bit period means the bit really starts now,
// so the period restarts; an edge in the second half means the next bit came
// early, so the current bit is decided from the samples taken so far (the
// threshold scaled to their number) and a new period starts. This keeps
// stations with slightly different clocks from drifting apart. The scaling
// and the half-period split are this design's own choices.
//
// Interface: `rx` must already be synchronised to clk. `restart` clears the
// grid so that a new period begins on the next cycle. `bit_valid` pulses for
// one cycle with the decided bit on `bit_val`.
module bit_sampler #(
  parameter int unsigned BIT_CYCLES     = 27,
  parameter int unsigned ONES_THRESHOLD = 18
) (
  input  logic clk,
  input  logic rst,
  input  logic run,
  input  logic restart,
  input  logic rx,
  output logic bit_valid,
  output logic bit_val,
  output logic resync      // pulse: an edge re-aligned the grid
);
  localparam int unsigned CW = $clog2(BIT_CYCLES + 1);

  logic [CW-1:0] phase;    // samples taken in the current period
  logic [CW-1:0] ones;     // ones among them
  logic          rx_prev;
  logic          edge_seen;

  assign edge_seen = (rx != rx_prev);

  always_ff @(posedge clk) begin
    bit_valid <= 1'b0;
    resync    <= 1'b0;
    rx_prev   <= rx;
    if (rst || restart || !run) begin
      phase <= '0;
      ones  <= '0;
      bit_val <= 1'b0;
    end else if (edge_seen && phase != 0 && phase < CW'(BIT_CYCLES / 2)) begin
      // Late grid: the bit starts with this sample.
      phase  <= CW'(1);
      ones   <= CW'(rx);
      resync <= 1'b1;
    end else if (edge_seen && phase >= CW'(BIT_CYCLES / 2)) begin
      // Early edge: close the current bit with the samples taken so far.
      bit_valid <= 1'b1;
      bit_val   <= (32'(ones) * BIT_CYCLES) > (32'(phase) * ONES_THRESHOLD);
      phase     <= CW'(1);
      ones      <= CW'(rx);
      resync    <= 1'b1;
    end else if (phase == CW'(BIT_CYCLES - 1)) begin
      bit_valid <= 1'b1;
      bit_val   <= (32'(ones) + 32'(rx)) > ONES_THRESHOLD;
      phase     <= '0;
      ones      <= '0;
    end else begin
      phase <= phase + 1'b1;
      ones  <= ones + CW'(rx);
    end
  end
endmodule

// Window timer: the countdown that bounds each TDMA window.
//
// `start` loads WINDOW_CYCLES-1; the counter then counts down one per clock
// and `expired` pulses for one cycle when it reaches zero, WINDOW_CYCLES
// cycles after `start`. After expiring it stays at zero until restarted.
// `remaining` shows the count, like the countdown bus of the document's
// timer. A plain down counter: the document gives the window length, not the
// counter's insides.
module window_timer #(
  parameter int unsigned WINDOW_CYCLES = 800
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  output logic expired,
  output logic [$clog2(WINDOW_CYCLES)-1:0] remaining
);
  localparam int unsigned CW = $clog2(WINDOW_CYCLES);
  logic running;

  always_ff @(posedge clk) begin
    expired <= 1'b0;
    if (rst) begin
      remaining <= '0;
      running   <= 1'b0;
    end else if (start) begin
      remaining <= CW'(WINDOW_CYCLES - 1);
      running   <= 1'b1;
    end else if (running) begin
      if (remaining == CW'(1)) begin
        expired <= 1'b1;
        running <= 1'b0;
      end
      remaining <= remaining - 1'b1;
    end
  end
endmodule

// TDMA window sequencer of the coordinator.
//
// The schedule is a ring of six windows, A_CALL, A_TALK, B_CALL, B_TALK,
// C_CALL, C_TALK, then A_CALL again. Exactly one of the six enables
// (en_call[s], en_talk[s] for station s) is high at a time, so only one
// station uses the shared machinery in a window. A window ends when the
// controller working in it reports `finished` or when the window timer
// expires after WINDOW_CYCLES cycles, whichever comes first; the sequencer
// then moves to the next window, pulses `advance` and restarts the timer.
//
// A window closed by the timer is followed by a guard interval of
// GUARD_CYCLES with every enable low before the next window opens. A
// transaction cut off by the timer may leave a station's receiver in the
// middle of an audio byte; the guard (default nine bit times of 27 cycles)
// lets that byte run out on the idle line, so the station is searching for
// commands again when the next window's command arrives. A timed-out window
// thus lasts WINDOW_CYCLES + GUARD_CYCLES + 1 cycles; one closed by
// `finished` ends two cycles after it. The guard is this design's addition.
//
// After reset the first window, A_CALL, opens on the second cycle (the
// `advance` pulse of the first cycle restarts the timer). The window order and
// the finished-or-expired rule follow the document; the window length
// follows its timing figure (800 cycles) rather than its text (656).
module tdma_window
  import accs_pkg::*;
#(
  parameter int unsigned WINDOW_CYCLES = 800,
  parameter int unsigned GUARD_CYCLES  = 243
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       finished,
  output window_t    window,
  output logic [1:0] station,    // station owning the window
  output logic       is_talk,    // talk window (else call window)
  output logic [2:0] en_call,
  output logic [2:0] en_talk,
  output logic       advance,    // one-cycle pulse as a window opens
  output logic       expired,    // window closed by the timer
  output logic [$clog2(WINDOW_CYCLES)-1:0] remaining
);
  logic timer_expired;
  logic started;
  logic guarding;
  logic [$clog2(GUARD_CYCLES+2)-1:0] guard_left;

  window_timer #(.WINDOW_CYCLES(WINDOW_CYCLES)) u_timer (
    .clk, .rst, .start(advance), .expired(timer_expired), .remaining
  );

  function automatic window_t next_window(input window_t w);
    case (w)
      W_A_CALL: return W_A_TALK;
      W_A_TALK: return W_B_CALL;
      W_B_CALL: return W_B_TALK;
      W_B_TALK: return W_C_CALL;
      W_C_CALL: return W_C_TALK;
      default:  return W_A_CALL;
    endcase
  endfunction

  assign expired = timer_expired & ~finished & started & ~guarding;

  always_ff @(posedge clk) begin
    advance <= 1'b0;
    if (rst) begin
      window     <= W_A_CALL;
      started    <= 1'b0;
      guarding   <= 1'b0;
      guard_left <= '0;
    end else if (!started) begin
      started <= 1'b1;
      advance <= 1'b1;
    end else if (guarding) begin
      if (guard_left == 0) begin
        guarding <= 1'b0;
        window   <= next_window(window);
        advance  <= 1'b1;
      end else begin
        guard_left <= guard_left - 1'b1;
      end
    end else if (!advance && finished) begin
      window  <= next_window(window);
      advance <= 1'b1;
    end else if (!advance && timer_expired) begin
      if (GUARD_CYCLES == 0) begin
        window  <= next_window(window);
        advance <= 1'b1;
      end else begin
        guarding   <= 1'b1;
        guard_left <= ($bits(guard_left))'(GUARD_CYCLES - 1);
      end
    end
  end

  assign station = window[2:1];
  assign is_talk = window[0];

  always_comb begin
    en_call = '0;
    en_talk = '0;
    if (started && !guarding) begin
      if (is_talk) en_talk[station] = 1'b1;
      else         en_call[station] = 1'b1;
    end
  end

  // Only one window may be open at a time.
  a_one_window: assert property (@(posedge clk) disable iff (rst)
    $onehot0({en_call, en_talk}));
endmodule

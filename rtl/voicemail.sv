// Voicemail recorder and player of a user-end station.
//
// Messages live in an external ZBT SRAM of 36-bit words. Four 8-bit samples
// are packed into the low 32 bits of a word (first sample in bits 7:0, bits
// 35:32 written as zero), so the address advances once per four samples.
// Up to MSGS messages are kept back to back: a message starts where the
// previous one ended, and the start addresses are kept in registers
// (msg_start[k]; msg_start[msg_count] is the first free word).
//
// Recording: while `record` is high, every `ready` strobe adds `audio_in`
// to the current word; a full word is written at once, a partly filled last
// word when recording stops. A recording starts only if fewer than MSGS
// messages are held, and stops when the memory is full.
// Playback: a rising edge of `listen` selects message `msg_num`; each `ready`
// strobe while `listen` stays high puts the next sample on `audio_out`. The
// word is fetched ahead of use, RAM_LATENCY cycles after its address; the
// address advances after four samples. The output is 0 (silence) when the
// message ends, when it was deleted or when nothing is playing.
// Delete: an `erase` pulse removes message `msg_num`; once every held
// message is deleted the memory is reused from address 0.
//
// Packing 32 of 36 bits, four messages and the start-address bookkeeping
// follow the document; the byte order in a word, the handling of deletion
// and the partial last word are this design's choices.
module voicemail #(
  parameter int unsigned MSGS        = 4,
  parameter int unsigned ADDR_W      = 19,
  parameter int unsigned RAM_LATENCY = 2
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              record,
  input  logic              listen,
  input  logic [1:0]        msg_num,
  input  logic              erase,
  input  logic              ready,
  input  logic [7:0]        audio_in,
  output logic [7:0]        audio_out,
  output logic [ADDR_W-1:0] ram_addr,
  output logic              ram_we,
  output logic [35:0]       ram_wdata,
  input  logic [35:0]       ram_rdata,
  output logic [$clog2(MSGS+1)-1:0] msg_count,
  output logic [ADDR_W-1:0] msg_start [MSGS+1]
);
  localparam int unsigned MW = $clog2(MSGS + 1);
  localparam logic [ADDR_W-1:0] LAST_ADDR = '1;

  logic              record_q, listen_q;
  logic              recording, playing;
  logic [ADDR_W-1:0] wr_addr, rd_addr, rd_end;
  logic [1:0]        wr_byte, rd_byte;
  logic [31:0]       wr_word, rd_word;
  logic [MSGS-1:0]   held;
  logic [$clog2(RAM_LATENCY+1)-1:0] wait_cnt;
  logic              fetching, word_ok;

  always_ff @(posedge clk) begin
    ram_we <= 1'b0;
    if (rst) begin
      record_q  <= 1'b0;
      listen_q  <= 1'b0;
      recording <= 1'b0;
      playing   <= 1'b0;
      wr_addr   <= '0;
      rd_addr   <= '0;
      rd_end    <= '0;
      wr_byte   <= '0;
      rd_byte   <= '0;
      wr_word   <= '0;
      rd_word   <= '0;
      held      <= '0;
      msg_count <= '0;
      wait_cnt  <= '0;
      fetching  <= 1'b0;
      word_ok   <= 1'b0;
      audio_out <= '0;
      ram_addr  <= '0;
      ram_wdata <= '0;
      for (int k = 0; k <= MSGS; k++) msg_start[k] <= '0;
    end else begin
      record_q <= record;
      listen_q <= listen;

      // ---------------- recording ----------------
      if (record && !record_q && !recording && !playing && msg_count < MW'(MSGS)) begin
        recording <= 1'b1;
        wr_byte   <= '0;
        wr_word   <= '0;
      end else if (recording && (!record || (wr_addr == LAST_ADDR && wr_byte == 2'd3 && ready))) begin
        // close the message; write a partly filled word
        logic [ADDR_W-1:0] end_addr;
        end_addr = wr_addr;
        if (wr_byte != 0 || (record && ready)) begin
          ram_we    <= 1'b1;
          ram_addr  <= wr_addr;
          ram_wdata <= {4'b0, (record && ready) ? {audio_in, wr_word[23:0]} : wr_word};
          end_addr  = wr_addr + 1'b1;
        end
        recording              <= 1'b0;
        wr_addr                <= end_addr;
        msg_start[msg_count+1] <= end_addr;
        held[msg_count[$clog2(MSGS)-1:0]] <= 1'b1;
        msg_count              <= msg_count + 1'b1;
      end else if (recording && ready) begin
        wr_word[wr_byte*8 +: 8] <= audio_in;
        wr_byte                 <= wr_byte + 1'b1;
        if (wr_byte == 2'd3) begin
          ram_we    <= 1'b1;
          ram_addr  <= wr_addr;
          ram_wdata <= {4'b0, audio_in, wr_word[23:0]};
          wr_addr   <= wr_addr + 1'b1;
          wr_word   <= '0;
        end
      end

      // ---------------- deleting ----------------
      if (erase && !recording && 32'(msg_num) < 32'(msg_count)) begin
        held[msg_num] <= 1'b0;
        if ((held & ~(MSGS'(1) << msg_num)) == '0) begin
          msg_count <= '0;
          wr_addr   <= '0;
          for (int k = 0; k <= MSGS; k++) msg_start[k] <= '0;
        end
      end

      // ---------------- playback ----------------
      if (!listen) begin
        playing   <= 1'b0;
        fetching  <= 1'b0;
        word_ok   <= 1'b0;
        audio_out <= '0;
      end else if (!listen_q && !recording) begin
        if (32'(msg_num) < 32'(msg_count) && held[msg_num] &&
            msg_start[MW'(msg_num)] != msg_start[MW'(msg_num)+1]) begin
          playing  <= 1'b1;
          rd_addr  <= msg_start[MW'(msg_num)];
          rd_end   <= msg_start[MW'(msg_num)+1];
          rd_byte  <= '0;
          ram_addr <= msg_start[MW'(msg_num)];
          fetching <= 1'b1;
          word_ok  <= 1'b0;
          wait_cnt <= '0;
        end
      end else if (playing) begin
        if (fetching) begin
          if (32'(wait_cnt) == RAM_LATENCY) begin
            rd_word  <= ram_rdata[31:0];
            word_ok  <= 1'b1;
            fetching <= 1'b0;
          end else begin
            wait_cnt <= wait_cnt + 1'b1;
          end
        end
        if (ready) begin
          if (word_ok) begin
            audio_out <= rd_word[rd_byte*8 +: 8];
            rd_byte   <= rd_byte + 1'b1;
            if (rd_byte == 2'd3) begin
              word_ok <= 1'b0;
              if (rd_addr + 1'b1 == rd_end) begin
                playing <= 1'b0;
              end else begin
                rd_addr  <= rd_addr + 1'b1;
                ram_addr <= rd_addr + 1'b1;
                fetching <= 1'b1;
                wait_cnt <= '0;
              end
            end
          end else begin
            audio_out <= '0;
          end
        end
      end else if (ready) begin
        audio_out <= '0;
      end
    end
  end
endmodule

// Pulse-segment capture (segmented / pulse event mode, and calibration mode).
//
// Instead of every sample, only a window around each trigger is kept: seg_width
// samples starting seg_pre samples before the sample that fired the trigger.
// A circular buffer of PRE_MAX samples delays the sample stream by seg_pre, so
// when a trigger arrives the delayed stream already holds the first sample of
// the window. The segment leaves as one 128-bit header (trp_pkg::seg_hdr_t:
// channel, window sizes, segment number, time stamp of the trigger) followed
// by ceil(seg_width/8) words of eight 16-bit samples, oldest in bits [15:0];
// a last partial word is filled with zeros.
//
// out_last marks the last word of a segment; busy_o is high while one is
// being captured.
// Timing: the header leaves the clock after the trigger; a data word leaves
// the clock after its eighth sample. Triggers that arrive while a segment is
// still being captured are ignored (the trigger detector's pulse-width
// inhibit normally prevents them). A segment under way when en falls is still
// completed, so every segment that starts also ends. seg_pre must be below
// PRE_MAX and below seg_width, and seg_width at least 2 (a smaller width
// captures nothing).
// The pulse width and pre-trigger sample count as user settings and the time
// stamping follow the document; header layout, PRE_MAX and the window being
// "seg_width samples including the pre-trigger part" are this design's choices.
module segmenter #(
  parameter int PRE_MAX = 256
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  input  logic [1:0]         ch,
  input  logic [15:0]        samp,
  input  logic               samp_valid,
  input  logic               trig,
  input  trp_pkg::ts_t       ts,
  input  logic [15:0]        seg_width,
  input  logic [15:0]        seg_pre,
  output logic [127:0]       out_word,
  output logic               out_valid,
  output logic               out_last,
  output logic               busy_o
);
  import trp_pkg::*;
  localparam int AW = $clog2(PRE_MAX);

  logic [15:0]   dly_mem [PRE_MAX];
  logic [AW-1:0] wp;
  logic [15:0]   delayed;

  logic          busy;
  logic [15:0]   remain;
  logic [2:0]    slot;
  logic [111:0]  acc;
  logic [39:0]   seq;

  logic [AW-1:0] rd_addr;
  assign rd_addr = wp - seg_pre[AW-1:0];
  assign delayed = (seg_pre == 0) ? samp : dly_mem[rd_addr];
  assign busy_o  = busy;

  initial assert (PRE_MAX >= 2 && (1 << AW) == PRE_MAX) else $error("PRE_MAX must be a power of 2");

  always_ff @(posedge clk) begin
    if (samp_valid) dly_mem[wp] <= samp;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp        <= '0;
      busy      <= 1'b0;
      remain    <= '0;
      slot      <= '0;
      acc       <= '0;
      seq       <= '0;
      out_word  <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      if (samp_valid) wp <= wp + 1'b1;
      if (!en && !busy) seq <= '0;
      // a segment under way is completed even if en falls meanwhile
      if (samp_valid && (en || busy)) begin
        logic        cap;
        logic [15:0] rem_now;
        logic [2:0]  slot_now;
        cap      = busy;
        rem_now  = remain;
        slot_now = slot;
        if (en && !busy && trig && seg_width > 16'd1) begin
          seg_hdr_t h;
          h.rec   = REC_SEG_HDR;
          h.ch    = ch;
          h.width = seg_width;
          h.pre   = seg_pre;
          h.rsvd  = '0;
          h.seq   = seq;
          h.ts    = ts;
          out_word  <= h;
          out_valid <= 1'b1;
          seq       <= seq + 1'b1;
          cap       = 1'b1;
          rem_now   = seg_width;
          slot_now  = '0;
        end
        if (cap) begin
          // place this sample; emit the word when full or at the window end,
          // a short last word shifted down so that it is zero-filled on top
          if (slot_now == 3'd7 || rem_now == 16'd1) begin
            out_word  <= {delayed, acc} >> (16 * (7 - int'(slot_now)));
            out_valid <= 1'b1;
            out_last  <= (rem_now == 16'd1);
            slot      <= '0;
          end else slot <= slot_now + 1'b1;
          acc    <= {delayed, acc[111:16]};
          remain <= rem_now - 1'b1;
          busy   <= (rem_now != 16'd1);
        end
      end
    end
  end
endmodule

// One acquisition channel: the four data paths fed by one ADC.
//
// The ADC samples pass the input buffer and the digital trigger and are then
// offered at once to every path:
//   raw         every sample, packed 8 per 128-bit word (raw_packer);
//   segmented   a pulse-width window around each trigger (segmenter);
//   calibration the segmented capture, on channel CAL_CH only;
//   processed   one time-stamped energy per pulse (pha_trapezoid).
// store_en with data_mode chooses which path writes 128-bit words to DDR2
// (store_word/store_valid; store_last marks the last word of a segment, and
// is high for every raw and processed word); stream_en sends the processed 64-bit events to the
// PCIe stream (stream_ev/stream_valid). Both can be active together: raw
// storage plus processed streaming is the concurrent mode. In segmented and
// calibration storage the trigger is inhibited for one pulse width after it
// fires; in the processed path it is not, so pile-up can be seen.
// A segment or an energy measurement under way when its path is disabled is
// completed; busy_o is high until then. Outputs are single-clock pulses; a path that is not selected is held idle,
// and its counters restart when it is enabled again.
// The four paths, the raw-plus-processed combination, the pulse-width inhibit
// and calibration on one channel only follow the document; the mapping of
// "channel 2" to index 2 of 0..3 is this design's reading.
module acq_channel #(
  parameter int ADC_BITS = 13,
  parameter int CH       = 0,
  parameter int CAL_CH   = 2,
  parameter int PRE_MAX  = 256,
  parameter int DLY      = 512
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [ADC_BITS-1:0]   adc_data,
  input  logic                  adc_valid,
  input  trp_pkg::ts_t          ts,
  input  logic                  store_en,
  input  trp_pkg::data_mode_e   data_mode,
  input  logic                  stream_en,
  input  logic [3:0]            thr_exp,
  input  logic [1:0]            avg_log2,
  input  logic [15:0]           seg_width,
  input  logic [15:0]           seg_pre,
  input  logic [9:0]            k,
  input  logic [9:0]            l,
  input  logic [15:0]           m,
  input  logic [4:0]            e_shift,
  output logic [127:0]          store_word,
  output logic                  store_valid,
  output logic                  store_last,
  output trp_pkg::event_t       stream_ev,
  output logic                  stream_valid,
  output logic                  trig_o,
  output logic                  busy_o,
  output logic [31:0]           n_events,
  output logic [31:0]           n_pileup
);
  import trp_pkg::*;

  logic        acq_en, raw_en, seg_en, proc_en, pulse_mode;
  logic [15:0] samp_b, samp_t;
  logic        samp_b_v, samp_t_v, trig;
  logic [63:0] word64;
  logic        word64_v;
  logic [127:0] raw_w, seg_w;
  logic        raw_v, seg_v, seg_last, seg_busy, pha_busy;
  event_t      ev;
  logic        ev_v;
  proc_rec_t   prec;

  assign pulse_mode = (data_mode == DM_SEG) || (data_mode == DM_CAL);
  assign raw_en  = store_en && data_mode == DM_RAW;
  assign seg_en  = store_en && (data_mode == DM_SEG || (data_mode == DM_CAL && CH == CAL_CH));
  assign proc_en = (store_en && data_mode == DM_PROC) || stream_en;
  assign acq_en  = store_en || stream_en;

  // events finishing after the path was disabled go where the path sent
  // them while it was enabled
  logic stream_mode, proc_store_mode;
  always_ff @(posedge clk) begin
    if (rst) begin
      stream_mode     <= 1'b0;
      proc_store_mode <= 1'b0;
    end else if (acq_en) begin
      stream_mode     <= stream_en;
      proc_store_mode <= store_en && data_mode == DM_PROC;
    end
  end

  input_buffer #(.ADC_BITS(ADC_BITS), .LANES(1)) u_ib (
    .clk, .rst, .clear(!acq_en),
    .adc_data(adc_data), .adc_valid,
    .samp_o(samp_b), .samp_valid_o(samp_b_v),
    .word_o(word64), .word_valid_o(word64_v));

  trigger_detector #(.ADC_BITS(ADC_BITS)) u_trig (
    .clk, .rst, .en(acq_en),
    .samp(samp_b), .samp_valid(samp_b_v),
    .thr_exp, .avg_log2,
    .inhibit_en(store_en && pulse_mode), .inhibit_len(seg_width),
    .samp_o(samp_t), .samp_valid_o(samp_t_v), .trig_o(trig));

  raw_packer u_raw (
    .clk, .rst, .en(raw_en),
    .in_word(word64), .in_valid(word64_v),
    .out_word(raw_w), .out_valid(raw_v));

  segmenter #(.PRE_MAX(PRE_MAX)) u_seg (
    .clk, .rst, .en(seg_en), .ch(2'(CH)),
    .samp(samp_t), .samp_valid(samp_t_v), .trig, .ts,
    .seg_width, .seg_pre,
    .out_word(seg_w), .out_valid(seg_v), .out_last(seg_last), .busy_o(seg_busy));

  pha_trapezoid #(.DLY(DLY)) u_pha (
    .clk, .rst, .en(proc_en), .ch(2'(CH)),
    .samp(samp_t), .samp_valid(samp_t_v), .trig, .ts,
    .k, .l, .m, .e_shift,
    .ev_o(ev), .ev_valid_o(ev_v), .n_events, .n_pileup, .busy_o(pha_busy));

  always_comb begin
    prec.rec  = REC_PROC;
    prec.rsvd = '0;
    prec.ev   = ev;
    unique case (data_mode)
      DM_RAW:  begin store_word = raw_w; store_valid = raw_v;             store_last = 1'b1; end
      DM_PROC: begin store_word = prec;  store_valid = ev_v && (store_en || proc_store_mode); store_last = 1'b1; end
      default: begin store_word = seg_w; store_valid = seg_v;             store_last = seg_last; end
    endcase
  end

  assign stream_ev    = ev;
  assign stream_valid = ev_v && (stream_en || stream_mode);
  assign trig_o       = trig && acq_en;
  assign busy_o       = seg_busy || pha_busy;
endmodule

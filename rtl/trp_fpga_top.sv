// One acquisition block of a transient recorder and processing (TRP) board.
//
// A TRP board carries two such blocks, each an FPGA with four free-running
// ADC channels, its own DDR2 memory and its own PCIe x1 endpoint; three boards
// (six blocks) cover the 19 lines of sight of the gamma-ray cameras. In one
// block:
//   * each channel (acq_channel) buffers its samples, detects pulses with a
//     digital level trigger and feeds the raw, segmented, calibration and
//     processed (pulse-height analysis) paths;
//   * the 128-bit words of the path chosen for storage are merged from the
//     four channels and written to DDR2 (ddr2_store_ctrl);
//   * the processed 64-bit energy words are merged into the stream buffer;
//   * the task manager runs one task per START, in store, stream or
//     concurrent mode, and switches the DMA engine between the stream buffer
//     and data read back from DDR2;
//   * the DMA engine sends the data to host memory as PCIe memory writes and
//     signals each DMA packet with an MSI;
//   * the register file holds the host's settings, counters and the
//     time-stamped error log; the time stamper counts from START;
//   * master_slave_sync picks master or slave from the slot address and
//     distributes START over the backplane.
// The PCIe endpoint core, the DDR2 controller/PHY, the ADCs and the clock
// buffers are outside: their signals are ports. All logic runs on one clock,
// the acquisition clock (250 MHz with the document's ADC), one sample per
// channel per clock.
// The partition into these blocks follows the document's description of the
// FPGA; the single clock domain, the buffer depths and the port formats are
// this design's choices.
module trp_fpga_top #(
  parameter int         NCH          = 4,
  parameter int         ADC_BITS     = 13,
  parameter int         MEM_AW       = 27,
  parameter int         TICK_DIV     = 250,
  parameter logic [7:0] MASTER_SLOT  = 8'd7,
  parameter int         PRE_MAX      = 256,
  parameter int         DLY          = 512,
  parameter int         STORE_DEPTH  = 64,
  parameter int         STREAM_DEPTH = 64
) (
  input  logic                           clk,
  input  logic                           rst,
  // ADCs
  input  logic [NCH-1:0][ADC_BITS-1:0]   adc_data,
  input  logic                           adc_valid,
  // timing and backplane
  input  logic [7:0]                     slot_addr,
  input  logic                           ext_start,
  input  logic                           bp_start_i,
  output logic                           bp_start_o,
  output logic                           bp_start_oe,
  output logic [1:0]                     clk_src,
  // host register access (from the PCIe endpoint core)
  input  logic                           reg_wr,
  input  logic [7:0]                     reg_addr,
  input  logic [31:0]                    reg_wdata,
  output logic [31:0]                    reg_rdata,
  input  logic [15:0]                    req_id,
  // PCIe transmit stream and MSI (to the PCIe endpoint core)
  output logic [63:0]                    tx_data,
  output logic                           tx_valid,
  input  logic                           tx_ready,
  output logic                           tx_sof,
  output logic                           tx_eof,
  output logic                           tx_rem,
  output logic                           msi_req,
  input  logic                           msi_ack,
  // DDR2 controller word interface
  output logic                           mem_req,
  output logic                           mem_we,
  output logic [MEM_AW-1:0]              mem_addr,
  output logic [127:0]                   mem_wdata,
  input  logic                           mem_gnt,
  input  logic                           mem_rvalid,
  input  logic [127:0]                   mem_rdata,
  // per-channel trigger pulses, for monitoring
  output logic [NCH-1:0]                 trig_o
);
  import trp_pkg::*;

  // register file outputs
  op_mode_e            op_mode;
  data_mode_e          data_mode, ch_mode;
  logic                arm, ext_sel, sw_start, sw_stop, dma_req, dma_req_clear;
  logic [31:0]         acq_time, nbytes, dma_addr;
  logic [15:0]         seg_width, seg_pre, m;
  logic [NCH-1:0][3:0] thr_exp;
  logic [1:0]          avg_log2;
  logic [9:0]          k, l;
  logic [4:0]          e_shift;

  // control
  logic        start, is_master;
  logic        store_en, stream_en, ts_start, clear, rd_start, src_ddr, dma_flush, busy, task_done;
  logic [2:0]  tm_state;
  ts_t         ts;

  // channel outputs
  logic [NCH-1:0][127:0] st_word;
  logic [NCH-1:0]        st_valid, st_last, ch_busy;
  logic                  sto_merge_idle, str_merge_idle;
  logic [NCH-1:0][63:0]  sm_word;
  logic [NCH-1:0]        sm_valid;
  logic [NCH-1:0][31:0]  n_events, n_pileup;
  logic [NCH-1:0]        store_ovf, stream_ovf;

  // merged streams
  logic [127:0] sto_data;
  logic         sto_valid, sto_ready, store_idle;
  logic [63:0]  str_data;
  logic         str_valid, str_ready, stream_idle;
  logic [63:0]  ddr_data;
  logic         ddr_valid, ddr_ready;
  logic [63:0]  dma_data;
  logic         dma_valid, dma_ready, dma_idle;
  logic         mem_full, rd_busy, rd_done;
  logic [MEM_AW:0] words_written, limit_words;
  logic [31:0]  tlp_count, dma_count;

  reg_file #(.NCH(NCH)) u_regs (
    .clk, .rst, .reg_wr, .reg_addr, .reg_wdata, .reg_rdata,
    .op_mode, .data_mode, .arm, .ext_sel, .sw_start, .sw_stop,
    .acq_time, .nbytes, .seg_width, .seg_pre, .thr_exp, .avg_log2,
    .k, .l, .m, .e_shift, .dma_addr, .dma_req,
    .dma_req_clear, .state(tm_state), .busy, .mem_full, .is_master,
    .words_written(32'(words_written)), .tlp_count, .dma_count,
    .n_events, .n_pileup, .ts, .store_ovf, .stream_ovf, .task_done);

  master_slave_sync #(.MASTER_SLOT(MASTER_SLOT)) u_sync (
    .clk, .rst, .slot_addr, .ext_sel, .ext_start, .sw_start,
    .bp_start_i, .bp_start_o, .bp_start_oe, .is_master, .clk_src,
    .start_o(start));

  time_stamper u_ts (.clk, .rst, .start(ts_start), .ts);

  task_manager #(.TICK_DIV(TICK_DIV)) u_task (
    .clk, .rst, .arm, .start, .sw_stop, .op_mode, .acq_time,
    .mem_full, .store_idle, .stream_idle, .rd_busy, .rd_done, .dma_idle,
    .store_en, .stream_en, .ts_start, .clear, .rd_start, .src_ddr,
    .dma_flush, .busy, .task_done, .state_o(tm_state));

  // the concurrent mode always stores raw data
  assign ch_mode = (op_mode == OP_CONCURRENT) ? DM_RAW : data_mode;

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    event_t ev;
    acq_channel #(.ADC_BITS(ADC_BITS), .CH(c), .PRE_MAX(PRE_MAX), .DLY(DLY)) u_ch (
      .clk, .rst, .adc_data(adc_data[c]), .adc_valid, .ts,
      .store_en, .data_mode(ch_mode), .stream_en,
      .thr_exp(thr_exp[c]), .avg_log2, .seg_width, .seg_pre, .k, .l, .m, .e_shift,
      .store_word(st_word[c]), .store_valid(st_valid[c]), .store_last(st_last[c]),
      .stream_ev(ev), .stream_valid(sm_valid[c]),
      .trig_o(trig_o[c]), .busy_o(ch_busy[c]), .n_events(n_events[c]), .n_pileup(n_pileup[c]));
    assign sm_word[c] = ev;
  end

  stream_merge #(.N(NCH), .W(128), .DEPTH(STORE_DEPTH)) u_store_merge (
    .clk, .rst, .clear,
    .in_data(st_word), .in_valid(st_valid), .in_last(st_last),
    .out_data(sto_data), .out_valid(sto_valid), .out_ready(sto_ready),
    .overflow(store_ovf), .idle(sto_merge_idle));

  stream_merge #(.N(NCH), .W(64), .DEPTH(STREAM_DEPTH)) u_stream_merge (
    .clk, .rst, .clear,
    .in_data(sm_word), .in_valid(sm_valid), .in_last('1),
    .out_data(str_data), .out_valid(str_valid), .out_ready(str_ready),
    .overflow(stream_ovf), .idle(str_merge_idle));

  // nothing more will come once the channels finished what they had begun
  assign store_idle  = sto_merge_idle && (ch_busy == '0);
  assign stream_idle = str_merge_idle && (ch_busy == '0);

  // bytes to acquire -> 128-bit words; more than the memory means all of it
  assign limit_words = ((nbytes >> 4) > (32'd1 << MEM_AW)) ? '0 : (MEM_AW+1)'(nbytes >> 4);

  ddr2_store_ctrl #(.MEM_AW(MEM_AW)) u_ddr (
    .clk, .rst, .clear, .limit_words,
    .in_data(sto_data), .in_valid(sto_valid), .in_ready(sto_ready),
    .rd_start, .out_data(ddr_data), .out_valid(ddr_valid), .out_ready(ddr_ready),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata,
    .full(mem_full), .words_written, .rd_busy, .rd_done);

  // stream/DDR2 arbitrator
  assign dma_data  = src_ddr ? ddr_data  : str_data;
  assign dma_valid = src_ddr ? ddr_valid : str_valid;
  assign ddr_ready = src_ddr && dma_ready;
  assign str_ready = !src_ddr && dma_ready;

  dma_engine u_dma (
    .clk, .rst, .in_data(dma_data), .in_valid(dma_valid), .in_ready(dma_ready),
    .flush(dma_flush), .tlps_per_pkt(src_ddr ? 6'd32 : 6'd1),
    .host_addr(dma_addr), .req(dma_req), .req_clear(dma_req_clear), .req_id,
    .tx_data, .tx_valid, .tx_ready, .tx_sof, .tx_eof, .tx_rem,
    .msi_req, .msi_ack, .idle(dma_idle), .tlp_count, .dma_count);
endmodule

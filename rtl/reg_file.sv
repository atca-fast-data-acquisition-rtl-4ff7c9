// Board registers of one acquisition block, as seen by the host over PCIe.
//
// The host configures a task through these registers (operating mode, data
// path, trigger source, acquisition time, number of bytes to acquire, pulse
// width and pre-trigger samples, trigger thresholds and averaging, shaper
// and pole-zero parameters, DMA buffer address), arms the block, asks for
// data by setting the DMA request bit, and reads status and counters back.
// Operational errors (a data buffer that overflowed) are time stamped and
// kept in an error log of ERR_DEPTH entries that the host reads and pops.
//
// Bus: 32-bit registers at word addresses; a write takes effect at the clock
// edge where reg_wr is high; reg_rdata holds the register addressed in the
// previous clock (one clock of read latency). Map (word address):
//   0x00 CTRL     [1:0] op_mode, [3:2] data_mode, [4] arm, [7] external START;
//                 writing 1 to [5] gives a software START, to [6] a stop
//   0x01 STATUS   [2:0] task state, [3] busy, [4] memory full, [5] master,
//                 [6] DMA request pending, [7] error log not empty,
//                 [31:16] errors seen (read only)
//   0x02 ACQ_TIME acquisition time in us (0: no limit)
//   0x03 NBYTES   bytes to acquire (0: whole memory)
//   0x04 PULSE    [15:0] pulse width, [31:16] pre-trigger samples
//   0x05 TRIG     [4i+3:4i] threshold exponent of channel i, [17:16] log2 of
//                 the averaging length
//   0x06 SHAPER   [9:0] rise k, [25:16] rise plus flat top l
//   0x07 PZ       [15:0] pole-zero factor M (Q8.8), [20:16] energy shift
//   0x08 DMA_ADDR host buffer address
//   0x09 DMA_CTRL write 1 to [0] to request a DMA packet; [0] reads the request
//   0x0A words written to DDR2, 0x0B TLPs sent, 0x0C DMA packets sent
//   0x0D ERR_LO   time stamp [31:0] of the oldest logged error
//   0x0E ERR_HI   [11:0] time stamp [43:32], [17:16] channel, [23:20] code;
//                 a write pops the entry
//   0x10-0x13 triggers of channel 0-3, 0x14-0x17 pile-ups of channel 0-3
//   0x18/0x19 present time stamp, low/high
//   0x1A tasks completed since reset
// The parameters that can be set follow the document's list of board
// parameters; the map, the widths, the reset values and the error log depth
// are this design's choices.
module reg_file #(
  parameter int NCH       = 4,
  parameter int ERR_DEPTH = 16
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  reg_wr,
  input  logic [7:0]            reg_addr,
  input  logic [31:0]           reg_wdata,
  output logic [31:0]           reg_rdata,
  // configuration
  output trp_pkg::op_mode_e     op_mode,
  output trp_pkg::data_mode_e   data_mode,
  output logic                  arm,
  output logic                  ext_sel,
  output logic                  sw_start,
  output logic                  sw_stop,
  output logic [31:0]           acq_time,
  output logic [31:0]           nbytes,
  output logic [15:0]           seg_width,
  output logic [15:0]           seg_pre,
  output logic [NCH-1:0][3:0]   thr_exp,
  output logic [1:0]            avg_log2,
  output logic [9:0]            k,
  output logic [9:0]            l,
  output logic [15:0]           m,
  output logic [4:0]            e_shift,
  output logic [31:0]           dma_addr,
  output logic                  dma_req,
  // status
  input  logic                  dma_req_clear,
  input  logic [2:0]            state,
  input  logic                  busy,
  input  logic                  mem_full,
  input  logic                  is_master,
  input  logic [31:0]           words_written,
  input  logic [31:0]           tlp_count,
  input  logic [31:0]           dma_count,
  input  logic [NCH-1:0][31:0]  n_events,
  input  logic [NCH-1:0][31:0]  n_pileup,
  input  trp_pkg::ts_t          ts,
  input  logic [NCH-1:0]        store_ovf,
  input  logic [NCH-1:0]        stream_ovf,
  input  logic                  task_done
);
  import trp_pkg::*;
  logic [31:0] tasks_done;

  typedef struct packed {
    logic [3:0] code;
    logic [1:0] ch;
    ts_t        ts;
  } err_t;

  err_t        e_in, e_head;
  logic        e_push, e_valid, e_pop, e_rdy_unused, e_ovf_unused;
  logic [$clog2(ERR_DEPTH):0] e_cnt_unused;
  logic [15:0] err_count;

  // Log the lowest-numbered error of this clock; others of the same clock
  // are only counted.
  always_comb begin
    e_in   = '0;
    e_push = 1'b0;
    for (int i = NCH-1; i >= 0; i--) begin
      if (stream_ovf[i]) begin e_in = '{ERR_STREAM_OVF, 2'(i), ts}; e_push = 1'b1; end
    end
    for (int i = NCH-1; i >= 0; i--) begin
      if (store_ovf[i])  begin e_in = '{ERR_STORE_OVF, 2'(i), ts}; e_push = 1'b1; end
    end
  end
  assign e_pop = reg_wr && reg_addr == 8'h0E;

  sync_fifo #(.W($bits(err_t)), .DEPTH(ERR_DEPTH)) u_errlog (
    .clk, .rst, .clear(1'b0),
    .in_data(e_in), .in_valid(e_push), .in_ready(e_rdy_unused),
    .out_data(e_head), .out_valid(e_valid), .out_ready(e_pop),
    .count(e_cnt_unused), .overflow(e_ovf_unused));

  always_ff @(posedge clk) begin
    if (rst) begin
      op_mode <= OP_STORE; data_mode <= DM_RAW; arm <= 1'b0; ext_sel <= 1'b0;
      sw_start <= 1'b0; sw_stop <= 1'b0;
      acq_time <= '0; nbytes <= '0; seg_width <= 16'd128; seg_pre <= 16'd16;
      thr_exp <= {NCH{4'd6}}; avg_log2 <= 2'd2; k <= 10'd32; l <= 10'd48;
      m <= '0; e_shift <= '0; dma_addr <= '0; dma_req <= 1'b0; err_count <= '0;
      reg_rdata <= '0;
    end else begin
      sw_start <= 1'b0;
      sw_stop  <= 1'b0;
      if (dma_req_clear) dma_req <= 1'b0;
      err_count <= err_count + 16'($countones({store_ovf, stream_ovf}));
      if (reg_wr) begin
        unique case (reg_addr)
          8'h00: begin
            op_mode   <= op_mode_e'(reg_wdata[1:0]);
            data_mode <= data_mode_e'(reg_wdata[3:2]);
            arm       <= reg_wdata[4];
            sw_start  <= reg_wdata[5];
            sw_stop   <= reg_wdata[6];
            ext_sel   <= reg_wdata[7];
          end
          8'h02: acq_time <= reg_wdata;
          8'h03: nbytes   <= reg_wdata;
          8'h04: begin seg_width <= reg_wdata[15:0]; seg_pre <= reg_wdata[31:16]; end
          8'h05: begin
            for (int i = 0; i < NCH; i++) thr_exp[i] <= reg_wdata[4*i +: 4];
            avg_log2 <= reg_wdata[17:16];
          end
          8'h06: begin k <= reg_wdata[9:0]; l <= reg_wdata[25:16]; end
          8'h07: begin m <= reg_wdata[15:0]; e_shift <= reg_wdata[20:16]; end
          8'h08: dma_addr <= reg_wdata;
          8'h09: if (reg_wdata[0]) dma_req <= 1'b1;
          default: ;
        endcase
      end
      unique case (reg_addr)
        8'h00: reg_rdata <= {24'd0, ext_sel, 2'b00, arm, data_mode, op_mode};
        8'h01: reg_rdata <= {err_count, 8'd0, e_valid, dma_req, is_master, mem_full, busy, state};
        8'h02: reg_rdata <= acq_time;
        8'h03: reg_rdata <= nbytes;
        8'h04: reg_rdata <= {seg_pre, seg_width};
        8'h05: reg_rdata <= 32'({avg_log2, 16'(thr_exp)});
        8'h06: reg_rdata <= {6'd0, l, 6'd0, k};
        8'h07: reg_rdata <= {11'd0, e_shift, m};
        8'h08: reg_rdata <= dma_addr;
        8'h09: reg_rdata <= {31'd0, dma_req};
        8'h0A: reg_rdata <= words_written;
        8'h0B: reg_rdata <= tlp_count;
        8'h0C: reg_rdata <= dma_count;
        8'h0D: reg_rdata <= e_head.ts[31:0];
        8'h0E: reg_rdata <= {8'd0, e_head.code, 2'd0, e_head.ch, 4'd0, e_head.ts[43:32]};
        8'h18: reg_rdata <= ts[31:0];
        8'h19: reg_rdata <= {20'd0, ts[43:32]};
        8'h1A: reg_rdata <= tasks_done;
        default: begin
          reg_rdata <= '0;
          for (int i = 0; i < NCH; i++) begin
            if (reg_addr == 8'(8'h10 + i)) reg_rdata <= n_events[i];
            if (reg_addr == 8'(8'h14 + i)) reg_rdata <= n_pileup[i];
          end
        end
      endcase
    end
  end
  always_ff @(posedge clk) begin
    if (rst)            tasks_done <= '0;
    else if (task_done) tasks_done <= tasks_done + 1'b1;
  end
endmodule

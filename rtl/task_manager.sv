// Task manager: runs one task per START and arbitrates the DMA data source.
//
// Once armed, every START runs a task in the selected operating mode:
//   OP_STORE      the chosen data path writes to DDR2 until the memory (or
//                 the byte count) is full, the acquisition time has passed or
//                 software stops it; the stored data is then retrieved.
//   OP_STREAM     processed energies are streamed over PCIe until the
//                 acquisition time has passed or software stops it.
//   OP_CONCURRENT raw data goes to DDR2 while processed energies are streamed;
//                 at the end of the acquisition time the stream is flushed and
//                 the DDR2 contents are retrieved automatically.
// After acquisition the manager waits for the storage buffers to drain before
// starting retrieval (rd_start), and flushes the DMA engine (dma_flush) until
// it is idle, so that a last partly filled packet reaches the host.
// src_ddr is the stream/DDR2 arbitrator: 0 routes the stream buffers to the
// DMA engine, 1 routes data read back from DDR2.
//
// Timing: acq_time counts ticks of TICK_DIV clocks (1 us at 250 MHz); 0 means
// no time limit. ts_start pulses in the clock a START is accepted and resets
// the time stamp; clear empties the data buffers at the same time. Dropping
// arm aborts a task and returns to IDLE. task_done pulses at the end of each
// task, after which the manager waits for the next START.
// The three modes, one task per START, the end conditions and the automatic
// retrieval after the streaming interval follow the document; the states, the
// time unit and the drain/flush steps are this design's choices.
module task_manager #(
  parameter int TICK_DIV = 250
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              arm,
  input  logic              start,
  input  logic              sw_stop,
  input  trp_pkg::op_mode_e op_mode,
  input  logic [31:0]       acq_time,
  input  logic              mem_full,
  input  logic              store_idle,
  input  logic              stream_idle,
  input  logic              rd_busy,
  input  logic              rd_done,
  input  logic              dma_idle,
  output logic              store_en,
  output logic              stream_en,
  output logic              ts_start,
  output logic              clear,
  output logic              rd_start,
  output logic              src_ddr,
  output logic              dma_flush,
  output logic              busy,
  output logic              task_done,
  output logic [2:0]        state_o
);
  import trp_pkg::*;

  typedef enum logic [2:0] {
    S_IDLE, S_ARMED, S_ACQ, S_FLUSH_S, S_DRAIN, S_RETR, S_FLUSH_D
  } state_e;

  state_e      st;
  op_mode_e    op;
  logic [31:0] ticks;
  logic [$clog2(TICK_DIV+1)-1:0] pre;
  logic        tick, time_up;
  logic [1:0]  quiet;

  assign state_o = st;
  assign tick    = (32'(pre) == TICK_DIV - 1);
  assign time_up = (acq_time != 0) && (ticks >= acq_time);

  always_comb begin
    store_en  = 1'b0;
    stream_en = 1'b0;
    src_ddr   = 1'b0;
    dma_flush = 1'b0;
    if (st == S_ACQ) begin
      store_en  = (op != OP_STREAM) && !mem_full;
      stream_en = (op != OP_STORE);
    end
    if (st == S_FLUSH_S) dma_flush = 1'b1;
    if (st == S_RETR || st == S_FLUSH_D) src_ddr = 1'b1;
    if (st == S_FLUSH_D) dma_flush = 1'b1;
  end
  assign busy = (st != S_IDLE) && (st != S_ARMED);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_IDLE; op <= OP_STORE; ticks <= '0; pre <= '0; quiet <= '0;
      ts_start <= 1'b0; clear <= 1'b0; rd_start <= 1'b0; task_done <= 1'b0;
    end else begin
      ts_start  <= 1'b0;
      clear     <= 1'b0;
      rd_start  <= 1'b0;
      task_done <= 1'b0;
      if (tick) begin
        pre <= '0;
        if (ticks != '1) ticks <= ticks + 1'b1;
      end else pre <= pre + 1'b1;

      if (!arm) st <= S_IDLE;
      else unique case (st)
        S_IDLE:  st <= S_ARMED;
        S_ARMED: if (start) begin
          st       <= S_ACQ;
          op       <= op_mode;
          ts_start <= 1'b1;
          clear    <= 1'b1;
          ticks    <= '0;
          pre      <= '0;
        end
        S_ACQ: begin
          // OP_STORE also ends when the memory is full
          if (time_up || sw_stop || (op == OP_STORE && mem_full)) begin
            quiet <= '0;
            st    <= (op == OP_STORE) ? S_DRAIN : S_FLUSH_S;
          end
        end
        S_FLUSH_S: begin
          // the stream buffers and the DMA engine must both be empty for
          // two clocks running (the paths may still deliver one last word)
          quiet <= (stream_idle && dma_idle) ? quiet + (quiet != 2'd3) : '0;
          if (quiet == 2'd3) begin
            quiet <= '0;
            if (op == OP_STREAM) begin
              st        <= S_ARMED;
              task_done <= 1'b1;
            end else st <= S_DRAIN;
          end
        end
        S_DRAIN: begin
          quiet <= store_idle ? quiet + (quiet != 2'd3) : '0;
          if (quiet == 2'd3) begin
            st       <= S_RETR;
            rd_start <= 1'b1;
          end
        end
        S_RETR: if (rd_done) begin
          quiet <= '0;
          st    <= S_FLUSH_D;
        end
        S_FLUSH_D: begin
          quiet <= (dma_idle && !rd_busy) ? quiet + (quiet != 2'd3) : '0;
          if (quiet == 2'd3) begin
            st        <= S_ARMED;
            task_done <= 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule

// Testbench of task_manager with the data path around it modelled by simple
// flags. For each operating mode it checks which paths are enabled during
// acquisition, that acquisition lasts acq_time ticks (TICK_DIV = 10 clocks),
// ends early on memory full (store mode) or a software stop, that the stream
// is flushed before DDR2 retrieval in concurrent mode, that retrieval starts
// only after the storage buffers drained and the DMA source switches to DDR2,
// and that each task ends with task_done and waits for the next START.
module tb_task_manager;
  import trp_pkg::*;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;
  int checks = 0, failures = 0;

  logic arm = 0, start = 0, sw_stop = 0, mem_full = 0, store_idle = 1, stream_idle = 1;
  logic rd_busy = 0, rd_done = 0, dma_idle = 1;
  op_mode_e op_mode = OP_STORE;
  logic [31:0] acq_time = 32'd20;
  logic store_en, stream_en, ts_start, clear, rd_start, src_ddr, dma_flush, busy, task_done;
  logic [2:0] state_o;
  task_manager #(.TICK_DIV(10)) dut (.clk, .rst, .arm, .start, .sw_stop, .op_mode, .acq_time,
    .mem_full, .store_idle, .stream_idle, .rd_busy, .rd_done, .dma_idle,
    .store_en, .stream_en, .ts_start, .clear, .rd_start, .src_ddr, .dma_flush, .busy,
    .task_done, .state_o);

  int cyc = 0;
  always @(posedge clk) cyc++;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // the rest of the block: retrieval takes 30 clocks after rd_start
  int rd_left = 0, n_rd_start = 0, flush_seen = 0, acq_cycles = 0;
  bit store_seen, stream_seen, src_during_flush_s;
  always @(posedge clk) begin
    rd_done <= 1'b0;
    if (rst) ;
    else if (rd_start) begin rd_busy <= 1; rd_left = 30; n_rd_start++;
      chk(store_idle && !store_en, "retrieval only after the buffers drained");
    end
    else if (rd_left > 0) begin
      rd_left--;
      if (rd_left == 0) begin rd_busy <= 0; rd_done <= 1; end
    end
    if (store_en || stream_en) acq_cycles++;
    if (store_en) store_seen = 1;
    if (stream_en) stream_seen = 1;
    if (dma_flush && !src_ddr) flush_seen++;
    if (rd_busy) chk(src_ddr, "DMA source is DDR2 during retrieval");
  end

  task automatic do_task(input op_mode_e op, input int stop_at, input bit full_at_10,
                         input int exp_acq, input bit exp_store, input bit exp_stream, input bit exp_rd);
    int n0;
    n0 = n_rd_start; acq_cycles = 0; store_seen = 0; stream_seen = 0; flush_seen = 0;
    op_mode = op;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    chk(busy && state_o == 3'd2, "acquiring after START");
    // storage buffers hold data for a while after acquisition
    store_idle = 0;
    for (int i = 0; !task_done && i < 2000; i++) begin
      @(negedge clk);
      if (stop_at >= 0 && i == stop_at) sw_stop = 1; else sw_stop = 0;
      if (full_at_10 && i == 10) mem_full = 1;
      if (!store_en && !stream_en && !dma_flush && !src_ddr) store_idle = 1;
      else if (!store_en && dma_flush) store_idle = 0;  // still draining while stream flushes
      if (!store_en && !dma_flush) store_idle = 1;
    end
    chk(task_done, "task ended");
    chk(acq_cycles >= exp_acq - 1 && acq_cycles <= exp_acq + 1, $sformatf("acquisition length %0d ~ %0d", acq_cycles, exp_acq));
    chk(store_seen == exp_store && stream_seen == exp_stream, "paths enabled");
    chk((n_rd_start - n0) == int'(exp_rd), "DDR2 retrieval");
    chk(exp_stream == (flush_seen > 0), "stream flushed when streaming");
    mem_full = 0;
    @(negedge clk);
    chk(!busy && state_o == 3'd1, "armed again, waiting for START");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk); arm = 1;
    repeat (3) @(negedge clk);
    chk(state_o == 3'd1 && !busy, "armed");
    do_task(OP_STORE, -1, 0, 200, 1, 0, 1);        // 20 ticks of 10 clocks
    do_task(OP_STORE, -1, 1, 12, 1, 0, 1);         // memory full first
    do_task(OP_STREAM, -1, 0, 200, 0, 1, 0);
    do_task(OP_STREAM, 50, 0, 51, 0, 1, 0);        // software stop
    do_task(OP_CONCURRENT, -1, 0, 200, 1, 1, 1);
    acq_time = 0;                                  // no time limit: stop by software
    do_task(OP_CONCURRENT, 300, 0, 301, 1, 1, 1);
    // disarm aborts
    @(negedge clk); start = 1; @(negedge clk); start = 0; arm = 0;
    @(negedge clk);
    chk(state_o == 3'd0 && !store_en, "disarm returns to idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

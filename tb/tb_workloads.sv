// Workload testbench of trp_fpga_top at its default parameters: runs each
// operating point the system is sized for, for a short time, and checks that
// the block keeps up and that the measured data rate gives the expected
// memory fill time.
//   W1 raw mode, four channels at 250 MS/s: the DDR2 side must take one
//      128-bit word every 2 clocks (2 GB/s), so 2 GiB fill in about 1.07 s.
//   W2 pulse-event mode at 2 M pulses/s per block (0.5 M per channel),
//      128-sample windows: every trigger gives one header and 16 data words,
//      nothing overflows; fill time 2 GiB / (rate x 272 B).
//   W3 processed mode at 2 M pulses/s per channel: one 16-byte record per
//      trigger, nothing overflows; fill time 2 GiB / (4 x rate x 16 B).
//   W4 concurrent mode at 2 M pulses/s per channel with the PCIe link
//      throttled to a x1 link (one 64-bit beat in 9 clocks, about 220 MB/s):
//      every trigger reaches the host as a streamed event, no stream buffer
//      overflows, and the raw data stored meanwhile is retrieved afterwards.
// The ADC model adds exponential pulses (decay 1/16 per sample) at random
// times with the given mean spacing; the DDR2 model grants 7 requests in 8.
// Rates and pulse widths are the figures the system was specified for; the
// pulse shape and the link throttle are this testbench's own.
module tb_workloads;
  import trp_pkg::*;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;

  logic [3:0][12:0] adc_data;
  logic        reg_wr = 0;
  logic [7:0]  reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic [63:0] tx_data;
  logic        tx_valid, tx_ready, tx_sof, tx_eof, tx_rem, msi_req, msi_ack;
  logic        mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [26:0] mem_addr;
  logic [127:0] mem_wdata, mem_rdata;
  logic        bp_o, bp_oe, bp_line;
  logic [1:0]  clk_src;
  logic [3:0]  trig_o;

  trp_fpga_top dut (.clk, .rst, .adc_data, .adc_valid(1'b1),
    .slot_addr(8'd7), .ext_start(1'b0), .bp_start_i(bp_line), .bp_start_o(bp_o),
    .bp_start_oe(bp_oe), .clk_src,
    .reg_wr, .reg_addr, .reg_wdata, .reg_rdata, .req_id(16'h0200),
    .tx_data, .tx_valid, .tx_ready, .tx_sof, .tx_eof, .tx_rem, .msi_req, .msi_ack,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata, .trig_o);
  assign bp_line = bp_o & bp_oe;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // ---------------- ADC model ----------------
  real val[4] = '{0.0, 0.0, 0.0, 0.0};
  int  spacing = 500;              // mean clocks between pulses per channel
  always @(negedge clk) begin
    for (int c = 0; c < 4; c++) begin
      if (($urandom % spacing) == 0) val[c] += 400 + $urandom % 3000;
      adc_data[c] <= 13'(int'(val[c]) + int'($urandom % 5) - 2);
      val[c] = val[c] * 15.0 / 16.0;
    end
  end

  // ---------------- DDR2 model ----------------
  logic [127:0] ddr [int];
  typedef struct { int due; logic [127:0] d; } rd_t;
  rd_t  rq[$];
  logic gnt_r = 0;
  assign mem_gnt = gnt_r;
  always @(posedge clk) begin
    cyc++;
    gnt_r <= ($urandom % 8) != 0;
    mem_rvalid <= 1'b0;
    if (mem_req && mem_gnt) begin
      if (mem_we) ddr[int'(mem_addr)] = mem_wdata;
      else rq.push_back('{cyc + 3 + $urandom % 8, ddr.exists(int'(mem_addr)) ? ddr[int'(mem_addr)] : '0});
    end
    if (rq.size() > 0 && rq[0].due <= cyc) begin
      mem_rvalid <= 1'b1;
      mem_rdata  <= rq[0].d;
      void'(rq.pop_front());
    end
  end

  // ---------------- host model ----------------
  int  link_div = 1;               // one beat accepted every link_div clocks
  int  beat = 0, n_ev_rx = 0, n_qw_ddr = 0;
  bit  want_req = 0;
  int  req_delay = 0;
  always @(posedge clk) begin
    tx_ready <= (cyc % link_div) == 0;
    msi_ack  <= msi_req && !msi_ack;
    if (msi_req && msi_ack) begin want_req = 1; req_delay = 20; end
    if (!rst && tx_valid && tx_ready) begin
      // payload doublewords: beat 1 low half, beats 2..16 both, beat 17 high
      if (beat >= 1) begin
        if (!dut.src_ddr) begin
          // an event is complete at every odd payload doubleword (the high one)
          if (beat >= 2 && tx_data[63:32] != 0 && tx_data[60]) n_ev_rx++;
        end else if (beat >= 2) n_qw_ddr++;
      end
      beat = tx_eof ? 0 : beat + 1;
    end
  end

  bit bus_busy = 0;
  task automatic bus_get();
    @(negedge clk);
    while (bus_busy) @(negedge clk);
    bus_busy = 1;
  endtask
  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    bus_get(); reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_wr = 0; bus_busy = 0;
  endtask
  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    bus_get(); reg_addr = a;
    @(negedge clk); d = reg_rdata; bus_busy = 0;
  endtask
  initial forever begin
    @(negedge clk);
    if (want_req) begin
      if (req_delay > 0) req_delay--;
      else begin want_req = 0; wr(8'h09, 32'd1); end
    end
  end

  // triggers while a path is enabled
  int n_trig = 0;
  always @(posedge clk) if (!rst) for (int c = 0; c < 4; c++) if (trig_o[c]) n_trig++;

  task automatic start_task(input op_mode_e op, input data_mode_e dm, input int acq_us, input int nbytes);
    wr(8'h02, 32'(acq_us));
    wr(8'h03, 32'(nbytes));
    wr(8'h00, {24'd0, 3'b000, 1'b1, 2'(dm), 2'(op)});
    wr(8'h00, {24'd0, 3'b001, 1'b1, 2'(dm), 2'(op)});
  endtask
  task automatic wait_done(input int limit, input string what);
    int i;
    for (i = 0; i < limit && !dut.task_done; i++) @(negedge clk);
    chk(i < limit, what);
    if (i >= limit)
      $display("  state %0d dma %0d rd_busy %0d words %0d busy %b idle %b %b", dut.tm_state, dut.u_dma.st, dut.rd_busy, dut.words_written, dut.ch_busy, dut.sto_merge_idle, dut.str_merge_idle);
    repeat (4) @(negedge clk);
  endtask
  function automatic int errors_seen(input logic [31:0] status);
    return int'(status[31:16]);
  endfunction

  logic [31:0] v, ww, e0;
  int  t0, t_fill, ev_sum;
  real secs, rate;
  initial begin
    repeat (5) @(posedge clk);
    rst <= 0;
    repeat (5) @(negedge clk);
    want_req = 1;
    wr(8'h08, 32'h1000_0000);
    wr(8'h05, {14'd0, 2'd0, 16'h7777});    // threshold 2^7, no averaging
    wr(8'h04, {16'd16, 16'd128});          // 128-sample windows, 16 before

    // ---- W1: raw fill rate ----
    spacing = 500;
    start_task(OP_STORE, DM_RAW, 0, 65536);
    t0 = cyc;
    while (!dut.store_en) @(negedge clk);
    t0 = cyc;
    while (!dut.mem_full) @(negedge clk);
    t_fill = cyc - t0;
    // 4096 words at 0.5 word per clock
    chk(t_fill >= 8180 && t_fill <= 8260, "raw: 64 KiB stored in 8192 clocks");
    secs = real'(t_fill) * (2.0 ** 27 / 4096.0) * 4.0e-9;
    $display("W1 raw: 4096 words in %0d clocks -> 2 GiB in %0.3f s", t_fill, secs);
    chk(secs > 1.0 && secs < 1.1, "raw: 2 GiB fill in about 1.07 s");
    wait_done(400000, "raw task finished");
    rd(8'h01, v); e0 = v;
    chk(errors_seen(v) == 0, "raw: no overflow");

    // ---- W2: pulse events at 2 M/s per block ----
    spacing = 500;
    n_trig = 0;
    start_task(OP_STORE, DM_SEG, 200, 0);
    wait_done(1000000, "segmented task finished");
    rd(8'h0A, ww);
    rd(8'h01, v);
    chk(errors_seen(v) == errors_seen(e0), "segmented: no overflow");
    chk(ww == 32'(17 * n_trig), "segmented: 17 words per trigger");
    rate = real'(n_trig) / 200.0e-6;
    secs = 2.0 ** 31 / (real'(ww) * 16.0 / 200.0e-6);
    $display("W2 segmented: %0d pulses in 200 us (%0.2f M/s), %0d words -> 2 GiB in %0.2f s",
             n_trig, rate / 1.0e6, ww, secs);
    chk(rate > 1.5e6 && rate < 2.5e6, "segmented: pulse rate near 2 M/s");
    chk(secs > 3.0 && secs < 5.5, "segmented: 2 GiB fill in about 4 s");

    // ---- W3: processed at 2 M/s per channel ----
    spacing = 125;
    start_task(OP_STORE, DM_PROC, 200, 0);
    wait_done(1000000, "processed task finished");
    rd(8'h0A, ww);
    ev_sum = 0;
    for (int c = 0; c < 4; c++) begin rd(8'(8'h10 + c), v); ev_sum += int'(v); end
    rd(8'h01, v);
    chk(errors_seen(v) == errors_seen(e0), "processed: no overflow");
    chk(int'(ww) == ev_sum, "processed: one record per trigger");
    rate = real'(ev_sum) / 4.0 / 200.0e-6;
    secs = 2.0 ** 31 / (real'(ww) * 16.0 / 200.0e-6);
    $display("W3 processed: %0d events in 200 us (%0.2f M/s per channel) -> 2 GiB in %0.1f s",
             ev_sum, rate / 1.0e6, secs);
    chk(rate > 1.2e6 && rate < 2.5e6, "processed: event rate near 2 M/s per channel");
    chk(secs > 12.0 && secs < 30.0, "processed: 2 GiB fill in about 15-20 s");

    // ---- W4: concurrent over a x1 link ----
    spacing = 125;
    link_div = 9;
    n_ev_rx = 0;
    n_qw_ddr = 0;
    start_task(OP_CONCURRENT, DM_RAW, 100, 32768);
    wait_done(2000000, "concurrent task finished");
    ev_sum = 0;
    for (int c = 0; c < 4; c++) begin rd(8'(8'h10 + c), v); ev_sum += int'(v); end
    rd(8'h01, v);
    chk(errors_seen(v) == errors_seen(e0), "concurrent: no stream overflow over x1");
    chk(n_ev_rx == ev_sum, "concurrent: every event streamed");
    chk(n_qw_ddr >= 2 * 2048, "concurrent: stored raw data retrieved");
    $display("W4 concurrent over x1: %0d events streamed in 100 us (%0.1f MB/s), %0d qwords retrieved",
             n_ev_rx, real'(n_ev_rx) * 8.0 / 100.0, n_qw_ddr);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

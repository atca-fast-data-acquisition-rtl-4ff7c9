// End-to-end testbench of trp_fpga_top at its default parameters.
//
// Around the block it models the four ADCs (exponential pulses on noise, a
// different random train per channel), the DDR2 controller (a word memory
// with random grant and read latency), the backplane START line looped back,
// and the host: it programs the registers, keeps a DMA request outstanding,
// acknowledges MSIs, decodes every PCIe memory-write packet into 64-bit
// words and checks the data it receives against what the block stored.
// Tasks run, each started by a software START through the backplane:
//   1 store, raw data, byte count 8 KiB: memory full, retrieval in 4096-byte
//     DMA packets, every word compared with the DDR2 contents;
//   2 store, segmented: time-limited, headers checked, retrieval;
//   3 store, calibration: only channel 2 writes segments;
//   4 store, processed: energy records, pile-ups counted;
//   5 stream: processed energies streamed in one-TLP DMA packets, the number
//     of streamed events equal to the block's trigger counters;
//   6 concurrent: raw to DDR2 and energies streamed, then DDR2 retrieved;
//   7 stream with the host not reading: the stream buffers overflow and the
//     errors appear, time stamped, in the error log.
// Each mechanism (memory full, time limit, software stop, trigger inhibit,
// pile-up, stream flush padding, stream/DDR2 switch, MSI, buffer overflow,
// error log, START over the backplane) is counted and must occur.
module tb_trp_fpga_top;
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
    .reg_wr, .reg_addr, .reg_wdata, .reg_rdata, .req_id(16'h0100),
    .tx_data, .tx_valid, .tx_ready, .tx_sof, .tx_eof, .tx_rem, .msi_req, .msi_ack,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata, .trig_o);
  assign bp_line = bp_o & bp_oe;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // ---------------- ADC model ----------------
  real val[4] = '{0.0, 0.0, 0.0, 0.0};
  int  rate = 200;
  always @(negedge clk) begin
    for (int c = 0; c < 4; c++) begin
      if (($urandom % rate) == 0) val[c] += 200 + $urandom % 2500;
      adc_data[c] <= 13'(int'(val[c]) + int'($urandom % 5) - 2);
      val[c] = val[c] * 63.0 / 64.0;
    end
  end

  // ---------------- DDR2 model ----------------
  logic [127:0] ddr [int];
  typedef struct { int due; logic [127:0] d; } rd_t;
  rd_t rq[$];
  bit  mem_stall = 0;
  assign mem_gnt = gnt_r && !mem_stall;
  logic gnt_r = 0;
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
  logic [63:0] rx[$];            // 64-bit words received, in order
  int  beat = 0, n_tlp = 0, n_msi = 0, tlp_in_pkt = 0, n_pkt32 = 0;
  logic [31:0] dws[$];
  bit  host_reading = 1, want_req = 0;
  int  req_delay = 0;
  always @(posedge clk) begin
    tx_ready <= ($urandom % 5) != 0;
    msi_ack  <= msi_req && !msi_ack;
    if (msi_req && msi_ack) begin
      n_msi++; want_req = 1; req_delay = 20;
      // a DMA packet is one TLP when streaming, 32 TLPs (4 kB) from DDR2
      if (dut.src_ddr) begin if (tlp_in_pkt == 32) n_pkt32++; end
      else chk(tlp_in_pkt == 1, "stream DMA packet is one TLP");
      tlp_in_pkt = 0;
    end
    if (!rst && tx_valid && tx_ready) begin
      if (beat == 0) chk(tx_sof && tx_data[63:32] == 32'h4000_0020, "TLP header");
      else if (beat == 1) dws.push_back(tx_data[31:0]);
      else if (beat < 17) begin dws.push_back(tx_data[63:32]); dws.push_back(tx_data[31:0]); end
      else begin
        chk(tx_eof && tx_rem, "TLP end");
        dws.push_back(tx_data[63:32]);
        for (int j = 0; j < 16; j++) rx.push_back({dws[2*j+1], dws[2*j]});
        dws.delete();
        n_tlp++;
        tlp_in_pkt++;
      end
      beat = tx_eof ? 0 : beat + 1;
    end
  end

  // register bus shared by the host's threads
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

  // host DMA requests: re-request after each MSI while reading
  initial forever begin
    @(negedge clk);
    if (want_req && host_reading) begin
      if (req_delay > 0) req_delay--;
      else begin
        want_req = 0;
        wr(8'h09, 32'd1);
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int m_full = 0, m_timeup = 0, m_swstop = 0, m_inhibit = 0, m_pileup = 0, m_pad = 0,
      m_switch = 0, m_msi = 0, m_ovf = 0, m_errlog = 0, m_bpstart = 0, m_cal = 0;
  logic src_q = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.u_task.src_ddr && !src_q && dut.u_task.op == OP_CONCURRENT) m_switch++;
    src_q <= dut.u_task.src_ddr;
    if (bp_line && dut.u_sync.bp_sync[0] == 0) m_bpstart++;
    if (|dut.store_ovf || |dut.stream_ovf) m_ovf++;
    // a threshold crossing refused because of the pulse-width inhibit
    if (dut.g_ch[0].u_ch.u_trig.en && dut.g_ch[0].u_ch.u_trig.samp_valid &&
        dut.g_ch[0].u_ch.u_trig.above && !dut.g_ch[0].u_ch.u_trig.above_q &&
        dut.g_ch[0].u_ch.u_trig.inh_cnt != 0) m_inhibit++;
  end

  // ---------------- tasks ----------------
  task automatic wait_task_done(input int limit);
    int i;
    for (i = 0; i < limit && !dut.task_done; i++) @(negedge clk);
    chk(i < limit, "task finished");
    if (i >= limit) $display("  state %0d dma %0d rd_busy %0d ww %0d rx %0d fcount %0d req %0d", dut.tm_state, dut.u_dma.st, dut.rd_busy, dut.words_written, rx.size(), dut.u_dma.f_count, dut.dma_req);
  endtask

  task automatic run_task(input op_mode_e op, input data_mode_e dm, input int acq_us,
                          input int nbytes, input int stop_after);
    logic [31:0] v;
    rx.delete();
    wr(8'h02, 32'(acq_us));
    wr(8'h03, 32'(nbytes));
    wr(8'h00, {24'd0, 1'b0, 2'b00, 1'b1, 2'(dm), 2'(op)});
    wr(8'h00, {24'd0, 1'b0, 1'b0, 1'b1, 1'b1, 2'(dm), 2'(op)});   // software START
    if (stop_after > 0) begin
      repeat (stop_after) @(negedge clk);
      wr(8'h00, {24'd0, 1'b0, 1'b1, 1'b0, 1'b1, 2'(dm), 2'(op)}); // stop
      m_swstop++;
    end
    wait_task_done(400000);
  endtask

  // compare the host's words with the DDR2 contents (low half first)
  task automatic check_retrieval(input int nwords);
    int bad = 0;
    chk(rx.size() >= 2 * nwords, "all stored words reached the host");
    if (rx.size() < 2 * nwords) $display("  rx %0d words %0d fcount %0d dma %0d q %0d half %0d", rx.size(), nwords, dut.u_dma.f_count, dut.u_dma.st, dut.u_ddr.q_count, dut.u_ddr.half);
    for (int a = 0; a < nwords && 2 * a + 1 < rx.size(); a++)
      if (rx[2*a] != ddr[a][63:0] || rx[2*a+1] != ddr[a][127:64]) begin
        if (bad == 0) begin
          $display("  first mismatch at word %0d", a);
          for (int q = a - 1; q < a + 3 && 2*q+1 < rx.size(); q++) $display("   %0d ddr %h rx %h_%h", q, ddr[q], rx[2*q+1], rx[2*q]);
          for (int q = 2 * nwords - 4; q < rx.size(); q++) $display("   tail rx[%0d] %h", q, rx[q]);
        end
        bad++;
      end
    chk(bad == 0, "retrieved data equals DDR2 contents");
    for (int i = 2 * nwords; i < rx.size(); i++) if (rx[i] == 0) m_pad++;
  endtask

  logic [31:0] v, ww, ev_tot, pu_tot;
  int nhdr, nstream, ncal_other;
  initial begin
    for (int c = 0; c < 4; c++) adc_data[c] = '0;
    repeat (5) @(posedge clk);
    rst <= 0;
    repeat (5) @(negedge clk);
    rd(8'h01, v); chk(v[5] && clk_src == 2'd0, "board in the master slot is master");
    wr(8'h04, {16'd16, 16'd64});                  // pulse width 64, 16 before the trigger
    wr(8'h05, {14'd0, 2'd1, 16'h7777});           // thresholds 2^7, average of 2
    wr(8'h06, {6'd0, 10'd24, 6'd0, 10'd16});      // k = 16, l = 24
    wr(8'h07, {11'd0, 5'd8, 16'd63 << 8});        // M = 63, shift 8
    wr(8'h08, 32'h2000_0000);
    wr(8'h09, 32'd1);                             // first DMA request

    // 1: raw, 8 KiB -> memory full
    run_task(OP_STORE, DM_RAW, 0, 8192, 0);
    rd(8'h0A, ww); chk(ww == 512, "raw: 512 words stored");
    rd(8'h01, v); if (v[4]) m_full++;
    check_retrieval(512);
    chk(rx.size() == 1024, "raw: two 4096-byte DMA packets, no padding");

    // 2: segmented, 40 us
    ddr.delete();
    run_task(OP_STORE, DM_SEG, 40, 0, 0);
    m_timeup++;
    rd(8'h0A, ww);
    nhdr = 0;
    for (int a = 0; a < int'(ww); a++) if (ddr[a][127:124] == REC_SEG_HDR && (a == 0 || 1)) ;
    begin
      int a = 0;
      while (a < int'(ww)) begin
        seg_hdr_t h;
        h = ddr[a];
        chk(h.rec == REC_SEG_HDR && h.width == 64 && h.pre == 16, "segment header in DDR2");
        nhdr++;
        a += 9;
      end
      chk(a == int'(ww) && nhdr > 10, "segments of 1 header + 8 words");
    end
    check_retrieval(int'(ww));

    // 3: calibration
    ddr.delete();
    run_task(OP_STORE, DM_CAL, 40, 0, 0);
    rd(8'h0A, ww);
    ncal_other = 0;
    for (int a = 0; a < int'(ww); a += 9) begin
      seg_hdr_t h; h = ddr[a];
      if (h.ch != 2) ncal_other++;
    end
    chk(ww > 0 && ncal_other == 0, "calibration: channel 2 only");
    if (ww > 0) m_cal++;
    check_retrieval(int'(ww));

    // 4: processed records, higher rate
    ddr.delete();
    rate = 60;
    run_task(OP_STORE, DM_PROC, 40, 0, 0);
    rd(8'h0A, ww);
    pu_tot = 0;
    for (int c = 0; c < 4; c++) begin rd(8'(8'h14 + c), v); pu_tot += v; end
    begin
      int np = 0;
      for (int a = 0; a < int'(ww); a++) begin
        proc_rec_t r; r = ddr[a];
        chk(r.rec == REC_PROC && r.ev.valid, "processed record");
        if (r.ev.pileup) np++;
      end
      chk(np == int'(pu_tot), "pile-up records = pile-up counters");
      m_pileup += np;
    end
    check_retrieval(int'(ww));

    // 5: stream, stopped by software
    run_task(OP_STREAM, DM_PROC, 0, 0, 8000);
    ev_tot = 0;
    for (int c = 0; c < 4; c++) begin rd(8'(8'h10 + c), v); ev_tot += v; end
    nstream = 0;
    foreach (rx[i]) begin
      event_t e; e = rx[i];
      if (e.valid) nstream++; else m_pad++;
    end
    chk(nstream == int'(ev_tot) && nstream > 20, "stream: every event reached the host");

    // 6: concurrent
    ddr.delete();
    run_task(OP_CONCURRENT, DM_PROC, 30, 0, 0);
    rd(8'h0A, ww);
    ev_tot = 0;
    for (int c = 0; c < 4; c++) begin rd(8'(8'h10 + c), v); ev_tot += v; end
    begin
      int ns = 0, k = 0;
      // streamed events first (with padding), then the raw DDR2 words
      while (k < rx.size() && !(rx[k] == ddr[0][63:0] && k + 1 < rx.size() && rx[k+1] == ddr[0][127:64])) begin
        event_t e; e = rx[k];
        if (e.valid) ns++;
        k++;
      end
      chk(ns == int'(ev_tot) && ns > 10, "concurrent: all energies streamed");
      chk(ww > 0, "concurrent: raw data stored");
      for (int i = 0; i < k; i++) void'(rx.pop_front());
      check_retrieval(int'(ww));
    end

    // 7: stream with the host not reading -> overflow, error log
    host_reading = 0;
    rate = 20;
    wr(8'h02, 32'd60);
    wr(8'h00, {24'd0, 3'b000, 1'b1, 2'(DM_PROC), 2'(OP_STREAM)});
    wr(8'h00, {24'd0, 3'b001, 1'b1, 2'(DM_PROC), 2'(OP_STREAM)});
    repeat (16000) @(negedge clk);
    rd(8'h01, v);
    chk(v[7] && v[31:16] > 0, "overflow logged");
    rd(8'h0E, v);
    if (v[23:20] == ERR_STREAM_OVF) m_errlog++;
    host_reading = 1; want_req = 1;
    wait_task_done(400000);

    rd(8'h1A, v); chk(v == 7, "seven tasks completed");
    chk(n_pkt32 > 0, "DDR2 retrieval uses 4 kB DMA packets");
    m_msi = n_msi;
    $display("mechanisms: full %0d timeup %0d swstop %0d inhibit %0d pileup %0d pad %0d switch %0d msi %0d ovf %0d errlog %0d bpstart %0d cal %0d",
             m_full, m_timeup, m_swstop, m_inhibit, m_pileup, m_pad, m_switch, m_msi, m_ovf, m_errlog, m_bpstart, m_cal);
    chk(m_full > 0, "mechanism: memory full");
    chk(m_timeup > 0, "mechanism: acquisition time");
    chk(m_swstop > 0, "mechanism: software stop");
    chk(m_inhibit > 0, "mechanism: pulse-width inhibit");
    chk(m_pileup > 0, "mechanism: pile-up");
    chk(m_pad > 0, "mechanism: flush padding");
    chk(m_switch > 0, "mechanism: stream/DDR2 switch");
    chk(m_msi > 0, "mechanism: MSI");
    chk(m_ovf > 0, "mechanism: buffer overflow");
    chk(m_errlog > 0, "mechanism: error log");
    chk(m_bpstart >= 7, "mechanism: START over the backplane");
    chk(m_cal > 0, "mechanism: calibration mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench of acq_channel: two channels (index 2, the calibration channel,
// and index 0) see the same ADC signal, pulses on a noisy baseline. Each
// operating combination is run in turn:
//   raw storage       words must hold every sample since enable, in order;
//   segmented storage one header per trigger (inhibit on) and the right
//                     number of data words per segment;
//   calibration       only channel 2 stores segments;
//   processed storage one REC_PROC record per trigger, pile-ups flagged;
//   concurrent        raw storage and processed streaming at once.
module tb_acq_channel;
  import trp_pkg::*;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;
  int checks = 0, failures = 0;

  logic [12:0] adc = '0;
  ts_t         ts = '0;
  logic        store_en = 0, stream_en = 0;
  data_mode_e  mode = DM_RAW;
  logic [127:0] sw2, sw0;
  logic        sv2, sv0, stv2, stv0, tr2, tr0;
  event_t      ev2, ev0;
  logic [31:0] ne2, np2, ne0, np0;

  acq_channel #(.CH(2), .PRE_MAX(64), .DLY(128)) dut2 (.clk, .rst, .adc_data(adc), .adc_valid(1'b1), .ts,
    .store_en, .data_mode(mode), .stream_en, .thr_exp(4'd5), .avg_log2(2'd1),
    .seg_width(16'd48), .seg_pre(16'd8), .k(10'd12), .l(10'd20), .m(16'd31 << 8), .e_shift(5'd6),
    .store_word(sw2), .store_valid(sv2), .stream_ev(ev2), .stream_valid(stv2), .trig_o(tr2),
    .n_events(ne2), .n_pileup(np2));
  acq_channel #(.CH(0), .PRE_MAX(64), .DLY(128)) dut0 (.clk, .rst, .adc_data(adc), .adc_valid(1'b1), .ts,
    .store_en, .data_mode(mode), .stream_en, .thr_exp(4'd5), .avg_log2(2'd1),
    .seg_width(16'd48), .seg_pre(16'd8), .k(10'd12), .l(10'd20), .m(16'd31 << 8), .e_shift(5'd6),
    .store_word(sw0), .store_valid(sv0), .stream_ev(ev0), .stream_valid(stv0), .trig_o(tr0),
    .n_events(ne0), .n_pileup(np0));

  int cyc = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // monitors
  logic [15:0] samples[$];
  logic [31:0] last_ne2, last_np2;    // counters as they were while enabled
  int n_words2, n_words0, n_hdr2, n_trig2, n_rec2, n_pile_rec2, n_stream2, raw_idx;
  always @(posedge clk) begin
    cyc++;
    ts <= ts + 1;
    if (!rst) begin
      if (store_en && mode == DM_RAW) samples.push_back({adc, 3'b000});
      if (tr2) n_trig2++;
      if (store_en || stream_en) begin last_ne2 = ne2; last_np2 = np2; end
      if (sv0) n_words0++;
      if (sv2) begin
        n_words2++;
        if (mode == DM_RAW) begin
          logic [127:0] e;
          for (int i = 0; i < 8; i++) e[16*i +: 16] = samples[raw_idx + i];
          chk(sw2 == e, "raw word holds the samples in order");
          raw_idx += 8;
        end else if (mode == DM_PROC) begin
          proc_rec_t r;
          r = sw2;
          chk(r.rec == REC_PROC && r.ev.valid && r.ev.ch == 2, "processed record");
          n_rec2++;
          if (r.ev.pileup) n_pile_rec2++;
        end else if (sw2[127:124] == REC_SEG_HDR) begin
          seg_hdr_t h;
          h = sw2;
          chk(h.ch == 2 && h.width == 48 && h.pre == 8, "segment header");
          n_hdr2++;
        end
      end
      if (stv2) begin
        n_stream2++;
        chk(ev2.valid && ev2.ch == 2, "streamed event");
      end
    end
  end

  // ADC signal: exponential pulses (decay 31/32) on noise
  real val = 0;
  task automatic signal(input int n, input int rate);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      if (($urandom % rate) == 0) val += 300 + $urandom % 2000;
      adc = 13'(int'(val) + int'($urandom % 5) - 2);
      val = val * 31.0 / 32.0;
    end
  endtask

  task automatic phase(input data_mode_e md, input bit st, input bit sm, input int n, input int rate);
    @(negedge clk);
    mode = md; store_en = st; stream_en = sm;
    n_words2 = 0; n_words0 = 0; n_hdr2 = 0; n_trig2 = 0; n_rec2 = 0; n_pile_rec2 = 0;
    n_stream2 = 0; raw_idx = 0; samples.delete();
    signal(n, rate);
    @(negedge clk);
    store_en = 0; stream_en = 0;
    signal(60, 1 << 30);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    signal(50, 1 << 30);
    phase(DM_RAW, 1, 0, 1000, 80);
    chk(n_words2 >= 120 && n_words0 == n_words2, "raw words from both channels");
    phase(DM_SEG, 1, 0, 3000, 150);
    chk(n_trig2 > 5 && n_hdr2 == n_trig2 && n_words2 == n_hdr2 * 7, "one header + 6 data words per trigger");
    phase(DM_CAL, 1, 0, 3000, 150);
    chk(n_hdr2 > 5 && n_words2 == n_hdr2 * 7 && n_words0 == 0, "calibration on channel 2 only");
    phase(DM_PROC, 1, 0, 3000, 40);
    chk(n_rec2 == n_trig2 && n_trig2 > 5 && int'(last_ne2) == n_trig2, "one record per trigger");
    chk(n_pile_rec2 > 0 && int'(last_np2) == n_pile_rec2, "pile-up records");
    phase(DM_RAW, 1, 1, 2000, 80);
    chk(n_words2 >= 240 && n_stream2 == n_trig2 && n_stream2 > 5, "concurrent: raw stored and energies streamed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

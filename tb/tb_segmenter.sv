// Testbench of segmenter: random samples (with gaps in samp_valid) and
// triggers; every segment must be a header with the trigger's time stamp,
// channel, sizes and running number, followed by exactly the seg_width samples
// that start seg_pre samples before the trigger, 8 per word, zero-filled at
// the end. Several window sizes are used, including partial last words, no
// pre-trigger part and a trigger during a capture (ignored).
module tb_segmenter;
  import trp_pkg::*;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;
  int checks = 0, failures = 0;

  logic        en = 0, samp_valid = 0, trig = 0, out_valid;
  logic [15:0] samp = '0, seg_width = 16'd32, seg_pre = 16'd8;
  ts_t         ts = '0;
  logic [127:0] out_word;
  segmenter #(.PRE_MAX(64)) dut (.clk, .rst, .en, .ch(2'd1), .samp, .samp_valid, .trig, .ts,
                                 .seg_width, .seg_pre, .out_word, .out_valid);

  logic [15:0] hist[$];            // every valid sample, in order
  logic [127:0] expq[$];           // expected output words
  int n_seg = 0, busy_until = -1, n_ignored = 0;
  int pend_start = 0, pend_len = 0;       // samples of the segment still to come
  longint seqn = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) begin
    ts <= ts + 1;
    if (!rst && out_valid) begin
      chk(expq.size() > 0 && out_word == expq[0], "segment word");
      if (expq.size() > 0) void'(expq.pop_front());
    end
    if (!rst && en && samp_valid) begin
      hist.push_back(samp);
      if (trig && int'(hist.size()) - 1 > busy_until) begin
        seg_hdr_t h;
        int n0, w, p;
        n0 = hist.size() - 1; w = seg_width; p = seg_pre;
        h = '{rec: REC_SEG_HDR, ch: 2'd1, width: seg_width, pre: seg_pre,
              rsvd: '0, seq: 40'(seqn), ts: ts};
        expq.push_back(h);
        seqn++;
        // data words are built when the samples exist (below)
        busy_until = n0 + w - 1;
        pend_start = n0 - p; pend_len = w;
        n_seg++;
      end else if (trig) n_ignored++;
      // form data words once their samples are known
      while (pend_len > 0 && int'(hist.size()) >= pend_start + ((pend_len >= 8) ? 8 : pend_len)) begin
        logic [127:0] wd;
        int nw;
        nw = (pend_len >= 8) ? 8 : pend_len;
        wd = '0;
        for (int s = 0; s < nw; s++) wd[16*s +: 16] = hist[pend_start + s];
        expq.push_back(wd);
        pend_start += nw; pend_len -= nw;
      end
    end
  end

  task automatic run(input int n, input int gap);
    for (int i = 0; i < n; i++) begin
      samp       <= 16'($urandom);
      samp_valid <= ($urandom % 8) != 0;
      trig       <= (($urandom % gap) == 0);
      @(posedge clk);
    end
    // settings only change between segments
    trig <= 0;
    repeat (40) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0; en <= 1;
    run(40, 1000);                   // fill the pre-trigger history
    run(600, 60);
    seg_width <= 16'd20; seg_pre <= 16'd0;     // partial last word, no pre part
    run(600, 25);
    seg_width <= 16'd9;  seg_pre <= 16'd5;
    run(400, 7);
    samp_valid <= 0;
    repeat (40) @(posedge clk);
    chk(expq.size() == 0, "all expected words seen");
    chk(n_seg > 20, "segments captured");
    chk(n_ignored > 0, "trigger during capture ignored");
    $display("segments %0d ignored %0d", n_seg, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

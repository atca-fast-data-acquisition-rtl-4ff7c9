// Testbench of trigger_detector: noisy baseline with exponential pulses of
// random amplitude, several thresholds and averaging lengths, with and without
// the pulse-width inhibit. A reference model in the testbench computes the
// average, the threshold crossing and the inhibit; trig_o must match it on
// every clock, aligned with samp_o one clock after the sample.
module tb_trigger_detector;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;
  int checks = 0, failures = 0;

  logic        en = 0, samp_valid = 0, inhibit_en = 0;
  logic [15:0] samp = '0, inhibit_len = 16'd40, samp_o;
  logic [3:0]  thr_exp = 4'd6;
  logic [1:0]  avg_log2 = 2'd0;
  logic        samp_valid_o, trig_o;
  trigger_detector dut (.clk, .rst, .en, .samp, .samp_valid, .thr_exp, .avg_log2,
                        .inhibit_en, .inhibit_len, .samp_o, .samp_valid_o, .trig_o);

  // reference model state
  int hist[$];
  bit ref_above = 1;
  int ref_inh = 0;
  bit exp_trig = 0;
  logic [15:0] exp_samp;
  int n_trig = 0, n_inhibited = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (!rst) begin
    chk(trig_o == exp_trig, "trigger matches model");
    if (exp_trig) n_trig++;
    exp_trig = 0;
    if (!en) begin
      hist.delete(); ref_above = 1; ref_inh = 0;
    end else if (samp_valid) begin
      int x, sum, nav, avg;
      bit above;
      x = int'($signed(samp[15:3]));
      hist.push_front(x);
      nav = 1 << avg_log2;
      sum = 0;
      for (int i = 0; i < nav; i++) sum += (i < hist.size()) ? hist[i] : 0;
      avg = sum >>> avg_log2;
      above = avg > (1 << thr_exp);
      // inhibit window: the trigger sample and the next inhibit_len-1
      if (above && !ref_above && ref_inh == 0) begin
        exp_trig = 1;
        if (inhibit_en) ref_inh = int'(inhibit_len);
      end else if (above && !ref_above) n_inhibited++;
      if (ref_inh > 0) ref_inh--;
      ref_above = above;
      while (hist.size() > 8) void'(hist.pop_back());
    end
  end

  // pulse generator: baseline noise plus exponential pulses
  real amp = 0;
  task automatic run(input int n);
    for (int i = 0; i < n; i++) begin
      int v;
      if (($urandom % 60) == 0) amp = amp + real'($urandom % 1500) + 20;
      amp = amp * 0.93;
      v = int'(amp) + int'($urandom % 7) - 3;
      if (v > 4095) v = 4095;
      samp <= {13'(v), 3'b000};
      samp_valid <= ($urandom % 16) != 0;
      @(posedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0; en <= 1;
    run(800);
    avg_log2 <= 2'd2; thr_exp <= 4'd4;
    run(800);
    inhibit_en <= 1; avg_log2 <= 2'd3; thr_exp <= 4'd8;
    run(800);
    thr_exp <= 4'd0; avg_log2 <= 2'd1;
    run(800);
    en <= 0; run(5); en <= 1;
    inhibit_en <= 0; thr_exp <= 4'd12;
    run(400);
    @(posedge clk);
    chk(n_trig > 20, "triggers happened");
    chk(n_inhibited > 0, "inhibit exercised");
    $display("triggers %0d inhibited %0d", n_trig, n_inhibited);
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

// Testbench of pha_trapezoid: exponentially decaying pulses (decay factor
// b = 63/64 per sample, so the exact pole-zero factor is M = b/(1-b) = 63)
// of random amplitude A. For such a pulse the shaper's flat top is
// k*A*(M+1), so the energy must be k*A*(M+1)/2^e_shift within rounding.
// Also checked: the event's time stamp, its arrival k+l+3 clocks after the
// trigger, pile-up (a second trigger during the measurement gives a counted
// event with energy 0 and the pile-up flag) and the event counters.
module tb_pha_trapezoid;
  import trp_pkg::*;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;
  int checks = 0, failures = 0;

  logic        en = 0, samp_valid = 1, trig = 0, ev_valid_o;
  logic [15:0] samp = '0;
  ts_t         ts = '0;
  logic [9:0]  k = 10'd16, l = 10'd24;
  logic [15:0] m = 16'd63 << 8;
  logic [4:0]  e_shift = 5'd8;
  event_t      ev_o;
  logic [31:0] n_events, n_pileup;
  pha_trapezoid #(.DLY(128)) dut (.clk, .rst, .en, .ch(2'd3), .samp, .samp_valid, .trig, .ts,
                                  .k, .l, .m, .e_shift, .ev_o, .ev_valid_o, .n_events, .n_pileup);

  real  val = 0;
  int   cyc = 0;
  typedef struct { int t; ts_t ts; real e; bit pile; } exp_t;
  exp_t q[$];
  int n_good = 0, n_pile = 0, exp_trigs = 0, exp_piles = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  always @(posedge clk) begin
    cyc++;
    ts <= ts + 1;
    if (!rst && ev_valid_o) begin
      exp_t e;
      chk(q.size() > 0, "event expected");
      if (q.size() > 0) begin
        e = q.pop_front();
        chk(ev_o.valid && ev_o.ch == 2'd3, "event fields");
        chk(ev_o.ts == e.ts, "event time stamp");
        chk(ev_o.pileup == e.pile, "pile-up flag");
        if (e.pile) begin
          chk(ev_o.energy == 0 && cyc - e.t == 1, "pile-up event: no energy, next clock");
          n_pile++;
        end else begin
          chk(cyc - e.t == int'(k) + int'(l) + 3, "energy latency k+l+3");
          if (e.e >= 0) begin
            real err;
            err = real'(ev_o.energy) - e.e;
            if (err < 0) err = -err;
            chk(err <= 2.0 + 0.01 * e.e, "energy = k*A*(M+1)/2^shift");
            if (err > 2.0 + 0.01 * e.e) $display("  energy %0d expected %f", ev_o.energy, e.e);
            n_good++;
          end
        end
      end
    end
  end

  // one pulse of amplitude a (16-bit container units); trig on its first sample
  task automatic pulse(input int a, input int gap, input bit check_energy, input int second_at);
        for (int i = 0; i < gap; i++) begin
      @(negedge clk);
      if (i == 0) val = val + a;
      if (i == second_at) val = val + a / 2;
      samp = 16'(int'(val + 0.5));
      trig = (i == 0) || (i == second_at);
      if (i == 0) begin
        exp_t e;
        e = '{cyc + 1, ts, check_energy ? real'(k) * a * 64.0 / real'(1 << e_shift) : -1.0, 1'b0};
        q.push_back(e);
        exp_trigs++;
      end
      if (i == second_at) begin
        exp_t e;
        e = '{cyc + 1, ts, 0.0, 1'b1};
        // the pile-up event leaves before the measured one
        q.push_front(e);
        exp_trigs++; exp_piles++;
      end
      val = val * 63.0 / 64.0;
    end
    @(negedge clk);
    trig = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    en <= 1;
    @(posedge clk);
    for (int n = 0; n < 12; n++) pulse(400 + $urandom % 3000, 300, 1, -1);
    // shaper settings change only while the path is disabled
    en <= 0;
    k <= 10'd32; l <= 10'd40; e_shift <= 5'd9;
    repeat (5) @(posedge clk);
    en <= 1;
    repeat (5) @(posedge clk);
    for (int n = 0; n < 8; n++) pulse(200 + $urandom % 3000, 250, 1, -1);
    // pulses riding on the tail of the previous one
    for (int n = 0; n < 6; n++) pulse(1000 + $urandom % 2000, 90, 1, -1);
    // pile-up: second pulse during the measurement
    for (int n = 0; n < 4; n++) pulse(2000, 300, 0, 20 + n * 10);
    repeat (100) @(posedge clk);
    chk(q.size() == 0, "all events delivered");
    chk(n_events == 32'(exp_trigs - 12), "trigger count");
    chk(n_pileup == 32'(exp_piles) && n_pile == exp_piles && exp_piles > 0, "pile-up count");
    chk(n_good >= 26, "measured events");
    $display("good %0d pileup %0d trig %0d/%0d q %0d", n_good, n_pile, n_events, exp_trigs, q.size());
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

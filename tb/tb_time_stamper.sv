// Testbench of time_stamper: the count follows a reference counter, returns to
// 0 the clock after START, and wraps at 2^TS_BITS (checked on a 12-bit copy).
module tb_time_stamper;
  logic clk = 0, rst = 1, start = 0;
  always #2 clk = ~clk;
  int checks = 0, failures = 0;
  logic [43:0] ts;
  logic [11:0] ts12;
  time_stamper dut (.clk, .rst, .start, .ts);
  time_stamper #(.TS_BITS(12)) dut12 (.clk, .rst, .start, .ts(ts12));

  longint ref_cnt;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s ts=%0d ref=%0d", what, ts, ref_cnt); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    ref_cnt = 1;
    for (int n = 0; n < 6000; n++) begin
      // ts seen now is the value after the previous edge
      chk(ts == 44'(ref_cnt), "count");
      chk(ts12 == 12'(ref_cnt), "12-bit count/wrap");
      if (n == 100 || n == 777) begin
        start <= 1;
        @(posedge clk); #1;
        start <= 0;
        chk(ts == 0, "reset by START");
        ref_cnt = 0;
        @(posedge clk); #1;
        ref_cnt = 1;
        continue;
      end
      @(posedge clk); #1;
      ref_cnt++;
    end
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

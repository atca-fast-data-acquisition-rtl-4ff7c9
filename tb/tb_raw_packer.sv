// Testbench of raw_packer: random 64-bit words with gaps are paired into
// 128-bit words (older word low); disabling the packer drops a half word so
// the next word starts a fresh pair.
module tb_raw_packer;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;
  int checks = 0, failures = 0;
  logic en = 0, in_valid = 0, out_valid;
  logic [63:0] in_word = '0;
  logic [127:0] out_word;
  raw_packer dut (.clk, .rst, .en, .in_word, .in_valid, .out_word, .out_valid);

  logic [63:0] q[$];
  int outs = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (!rst) begin
    if (out_valid) begin
      logic [63:0] lo, hi;
      lo = q.pop_front(); hi = q.pop_front();
      chk(out_word == {hi, lo}, "pair content");
      outs++;
    end
    if (en && in_valid) q.push_back(in_word);
    if (!en) q.delete();
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0; en <= 1;
    for (int n = 0; n < 200; n++) begin
      in_valid <= ($urandom % 3) != 0;
      in_word  <= {$urandom, $urandom};
      if (n == 101) en <= 0;          // odd number of words so far -> drop half
      if (n == 104) en <= 1;
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (3) @(posedge clk);
    chk(outs > 40, "enough output words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

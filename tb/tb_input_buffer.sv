// Testbench of input_buffer: random ADC samples, checked against a reference
// model of MSB alignment and packing of four samples per 64-bit word. Covers
// the 13-bit one-sample-per-clock ADC and a 14-bit two-samples-per-clock ADC,
// and checks that words leave every 4th (resp. 2nd) clock.
module tb_input_buffer;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;
  int checks = 0, failures = 0;

  // DUT A: 13-bit, 1 lane
  logic [0:0][12:0] a_data;
  logic             a_valid, a_clear;
  logic [0:0][15:0] a_samp;
  logic             a_sv, a_wv;
  logic [63:0]      a_word;
  input_buffer #(.ADC_BITS(13), .LANES(1)) dut_a (
    .clk, .rst, .clear(a_clear), .adc_data(a_data), .adc_valid(a_valid),
    .samp_o(a_samp), .samp_valid_o(a_sv), .word_o(a_word), .word_valid_o(a_wv));

  // DUT B: 14-bit, 2 lanes (DDR ADC)
  logic [1:0][13:0] b_data;
  logic [1:0][15:0] b_samp;
  logic             b_sv, b_wv;
  logic [63:0]      b_word;
  input_buffer #(.ADC_BITS(14), .LANES(2)) dut_b (
    .clk, .rst, .clear(a_clear), .adc_data(b_data), .adc_valid(a_valid),
    .samp_o(b_samp), .samp_valid_o(b_sv), .word_o(b_word), .word_valid_o(b_wv));

  logic [15:0] qa[$], qb[$];
  int a_last_word = -1, b_last_word = -1, cyc = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    a_valid = 0; a_clear = 0; a_data = '0; b_data = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(posedge clk);
    a_clear <= 1;
    @(posedge clk);
    a_clear <= 0;
    a_valid <= 1;
    repeat (64) begin
      a_data[0] <= 13'($urandom);
      b_data[0] <= 14'($urandom);
      b_data[1] <= 14'($urandom);
      @(posedge clk);
    end
    a_valid <= 0;
    repeat (4) @(posedge clk);
    chk(a_last_word > 0 && b_last_word > 0, "words seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: sample containers and words, compared one clock later
  logic [12:0] pa; logic [1:0][13:0] pb; logic pv;
  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (pv) begin
        chk(a_sv && a_samp[0] == {pa, 3'b000}, "A sample container");
        chk(b_samp[0] == {pb[0], 2'b00} && b_samp[1] == {pb[1], 2'b00}, "B sample containers");
      end
      if (a_wv) begin
        logic [63:0] exp;
        for (int i = 0; i < 4; i++) exp[16*i +: 16] = qa.pop_front();
        chk(a_word == exp, "A word content");
        if (a_last_word >= 0) chk(cyc - a_last_word == 4, "A word every 4 clocks");
        a_last_word = cyc;
      end
      if (b_wv) begin
        logic [63:0] exp;
        for (int i = 0; i < 4; i++) exp[16*i +: 16] = qb.pop_front();
        chk(b_word == exp, "B word content");
        if (b_last_word >= 0) chk(cyc - b_last_word == 2, "B word every 2 clocks");
        b_last_word = cyc;
      end
      if (a_valid) begin
        qa.push_back({a_data[0], 3'b000});
        qb.push_back({b_data[0], 2'b00});
        qb.push_back({b_data[1], 2'b00});
      end
    end
    pv = a_valid; pa = a_data[0]; pb = b_data;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

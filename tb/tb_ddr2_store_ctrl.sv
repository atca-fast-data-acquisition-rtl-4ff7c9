// Testbench of ddr2_store_ctrl against a behavioural word memory that grants
// at random and returns reads in order after a random latency. Checks that
// the words offered are written to consecutive addresses, that writing stops
// at the byte-count limit and at the end of memory (full, extra words
// discarded), and that retrieval returns every stored word, in order, as two
// 64-bit halves, under random back-pressure, then pulses rd_done.
module tb_ddr2_store_ctrl;
  localparam int AW = 8;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;
  int checks = 0, failures = 0;

  logic          clear = 0, in_valid = 0, rd_start = 0, out_ready = 0;
  logic [AW:0]   limit_words = '0;
  logic [127:0]  in_data = '0, mem_wdata, mem_rdata;
  logic          in_ready, out_valid, mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [63:0]   out_data;
  logic [AW-1:0] mem_addr;
  logic          full, rd_busy, rd_done;
  logic [AW:0]   words_written;

  ddr2_store_ctrl #(.MEM_AW(AW)) dut (.clk, .rst, .clear, .limit_words,
    .in_data, .in_valid, .in_ready, .rd_start, .out_data, .out_valid, .out_ready,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata,
    .full, .words_written, .rd_busy, .rd_done);

  // behavioural memory
  logic [127:0] mem [1 << AW];
  typedef struct { int due; logic [127:0] d; } rd_t;
  rd_t rq[$];
  int  cyc = 0;
  assign mem_gnt = gnt_r;
  logic gnt_r = 0;
  always @(posedge clk) begin
    cyc++;
    gnt_r <= ($urandom % 4) != 0;
    mem_rvalid <= 1'b0;
    if (mem_req && mem_gnt) begin
      if (mem_we) mem[mem_addr] <= mem_wdata;
      else rq.push_back('{cyc + 2 + $urandom % 6, mem[mem_addr]});
    end
    if (rq.size() > 0 && rq[0].due <= cyc) begin
      mem_rvalid <= 1'b1;
      mem_rdata  <= rq[0].d;
      void'(rq.pop_front());
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  logic [127:0] sent[$];
  // one task: offer n words, then retrieve and compare
  task automatic run_task(input int lim, input int n_offer);
    int expect_n, got;
    logic [63:0] halves[$];
    clear <= 1; limit_words <= (AW+1)'(lim);
    @(posedge clk);
    clear <= 0;
    sent.delete();
    for (int i = 0; i < n_offer; ) begin
      in_valid <= ($urandom % 3) != 0;
      in_data  <= {$urandom, $urandom, $urandom, 32'(i)};
      @(posedge clk);
      if (in_valid && in_ready) begin
        sent.push_back(in_data);
        i++;
      end
    end
    in_valid <= 0;
    @(posedge clk);
    expect_n = (lim == 0) ? (1 << AW) : lim;
    if (expect_n > n_offer) expect_n = n_offer;
    chk(int'(words_written) == expect_n, "words written");
    chk(full == (n_offer >= ((lim == 0) ? (1 << AW) : lim)), "full flag");
    for (int a = 0; a < expect_n; a++) chk(mem[a] == sent[a], "memory content");
    for (int a = 0; a < expect_n; a++) begin
      halves.push_back(sent[a][63:0]); halves.push_back(sent[a][127:64]);
    end
    rd_start <= 1;
    @(posedge clk);
    rd_start <= 0;
    got = 0;
    while (!rd_done) begin
      out_ready <= ($urandom % 3) != 0;
      @(posedge clk);
      if (out_valid && out_ready) begin
        chk(halves.size() > 0 && out_data == halves[0], "retrieved half");
        if (halves.size() > 0) void'(halves.pop_front());
        got++;
      end
    end
    out_ready <= 0;
    chk(got == 2 * expect_n && halves.size() == 0, "all words retrieved");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    run_task(40, 30);        // below the limit
    run_task(25, 60);        // byte count reached: extra words dropped
    run_task(0, 300);        // whole memory: full at 256 words
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

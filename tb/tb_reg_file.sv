// Testbench of reg_file: writes every configuration register and checks both
// the outputs and the read-back (one clock of read latency); checks the
// self-clearing START/stop pulses, the DMA request bit set by the host and
// cleared by the engine, the status and counter read-back, and the error log:
// overflows are counted and logged with channel, code and time stamp, and
// popped in order; and the count of completed tasks.
module tb_reg_file;
  import trp_pkg::*;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;
  int checks = 0, failures = 0;

  logic        reg_wr = 0;
  logic [7:0]  reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  op_mode_e    op_mode;
  data_mode_e  data_mode;
  logic        arm, ext_sel, sw_start, sw_stop, dma_req, dma_req_clear = 0;
  logic [31:0] acq_time, nbytes, dma_addr;
  logic [15:0] seg_width, seg_pre, m;
  logic [3:0][3:0] thr_exp;
  logic [1:0]  avg_log2;
  logic [9:0]  k, l;
  logic [4:0]  e_shift;
  logic [3:0][31:0] n_events, n_pileup;
  logic [3:0]  store_ovf = '0, stream_ovf = '0;
  ts_t         ts = 44'h123_0000_0000;
  logic        task_done = 0;

  reg_file dut (.clk, .rst, .reg_wr, .reg_addr, .reg_wdata, .reg_rdata,
    .op_mode, .data_mode, .arm, .ext_sel, .sw_start, .sw_stop, .acq_time, .nbytes,
    .seg_width, .seg_pre, .thr_exp, .avg_log2, .k, .l, .m, .e_shift, .dma_addr, .dma_req,
    .dma_req_clear, .state(3'd5), .busy(1'b1), .mem_full(1'b0), .is_master(1'b1),
    .words_written(32'd777), .tlp_count(32'd55), .dma_count(32'd3),
    .n_events, .n_pileup, .ts, .store_ovf, .stream_ovf, .task_done);

  always @(posedge clk) ts <= ts + 1;
  for (genvar i = 0; i < 4; i++) begin : g_cnt
    assign n_events[i] = 32'(100 + i);
    assign n_pileup[i] = 32'(200 + i);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_wr = 0;
  endtask
  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); reg_addr = a;
    @(negedge clk); d = reg_rdata;
  endtask

  logic [31:0] v;
  logic [43:0] ts_a;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    rd(8'h04, v); chk(v == {16'd16, 16'd128}, "reset value of PULSE");
    repeat (3) begin @(negedge clk); task_done = 1; @(negedge clk); task_done = 0; end
    rd(8'h1A, v); chk(v == 3, "completed tasks counted");
    wr(8'h00, 32'h0000_0096);       // op 2, data mode 1, arm, external
    chk(op_mode == OP_CONCURRENT && data_mode == DM_SEG && arm && ext_sel, "CTRL fields");
    rd(8'h00, v); chk(v == 32'h96, "CTRL read-back");
    wr(8'h02, 32'd30_000_000);  chk(acq_time == 32'd30_000_000, "ACQ_TIME");
    wr(8'h03, 32'h8000_0000);   chk(nbytes == 32'h8000_0000, "NBYTES");
    wr(8'h04, {16'd20, 16'd256}); chk(seg_width == 256 && seg_pre == 20, "PULSE");
    wr(8'h05, 32'h0003_C975);   chk(thr_exp == 16'hC975 && avg_log2 == 3, "TRIG");
    rd(8'h05, v); chk(v == 32'h0003_C975, "TRIG read-back");
    wr(8'h06, {6'd0, 10'd100, 6'd0, 10'd60}); chk(k == 60 && l == 100, "SHAPER");
    wr(8'h07, {11'd0, 5'd7, 16'h3F00}); chk(m == 16'h3F00 && e_shift == 7, "PZ");
    rd(8'h07, v); chk(v == {11'd0, 5'd7, 16'h3F00}, "PZ read-back");
    wr(8'h08, 32'hCAFE_0000);   chk(dma_addr == 32'hCAFE_0000, "DMA_ADDR");
    // pulses
    @(negedge clk); reg_wr = 1; reg_addr = 8'h00; reg_wdata = 32'h76;
    @(negedge clk); reg_wr = 0;
    chk(sw_start && sw_stop, "START/stop pulse");
    @(negedge clk); chk(!sw_start && !sw_stop && arm, "pulses self-clear, arm kept");
    // DMA request
    wr(8'h09, 32'd1); chk(dma_req, "DMA request set");
    rd(8'h09, v); chk(v == 1, "DMA request read");
    @(negedge clk); dma_req_clear = 1; @(negedge clk); dma_req_clear = 0;
    chk(!dma_req, "DMA request cleared by engine");
    // status and counters
    rd(8'h0A, v); chk(v == 777, "words written");
    rd(8'h0B, v); chk(v == 55, "TLP count");
    rd(8'h12, v); chk(v == 102, "events ch2");
    rd(8'h17, v); chk(v == 203, "pile-ups ch3");
    // error log
    @(negedge clk); store_ovf = 4'b0100; ts_a = ts;
    @(negedge clk); store_ovf = 0; stream_ovf = 4'b0001;
    @(negedge clk); stream_ovf = 0;
    rd(8'h01, v); chk(v[31:16] == 2 && v[7] && v[5] && v[3] && v[2:0] == 5, "STATUS");
    rd(8'h0D, v); chk(v == ts_a[31:0], "error 1 time stamp");
    rd(8'h0E, v); chk(v[23:20] == ERR_STORE_OVF && v[17:16] == 2 && v[11:0] == ts_a[43:32], "error 1 code/channel");
    wr(8'h0E, 0);
    rd(8'h0E, v); chk(v[23:20] == ERR_STREAM_OVF && v[17:16] == 0, "error 2 code/channel");
    rd(8'h0D, v); chk(v == ts_a[31:0] + 1, "error 2 time stamp");
    wr(8'h0E, 0);
    rd(8'h01, v); chk(!v[7], "log empty");
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

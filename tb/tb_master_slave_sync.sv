// Testbench of master_slave_sync: one master and two slaves share a modelled
// backplane START line (driven by whichever board enables its driver). Checks
// the roles and clock sources from the slot addresses, that an external START
// and a software START on the master start all three boards in the same
// clock, that a slave's own software START does nothing, and the delay.
module tb_master_slave_sync;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;
  int checks = 0, failures = 0;

  logic       ext_sel = 0, ext_start = 0;
  logic [2:0] sw_start = '0, bp_o, bp_oe, is_master, start;
  logic [2:0][1:0] clk_src;
  logic       bp_line;
  logic [2:0][7:0] slots = '{8'd3, 8'd7, 8'd9};   // board 1 is in the master slot

  for (genvar b = 0; b < 3; b++) begin : g_b
    master_slave_sync #(.MASTER_SLOT(8'd7)) dut (.clk, .rst, .slot_addr(slots[b]), .ext_sel,
      .ext_start, .sw_start(sw_start[b]), .bp_start_i(bp_line), .bp_start_o(bp_o[b]),
      .bp_start_oe(bp_oe[b]), .is_master(is_master[b]), .clk_src(clk_src[b]), .start_o(start[b]));
  end
  assign bp_line = |(bp_o & bp_oe);

  int cyc = 0, n_start = 0, t_start = -1;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask
  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      chk(start == 3'b000 || start == 3'b111, "all boards start together");
      if (start == 3'b111) begin n_start++; t_start = cyc; end
    end
  end

  int t0;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    chk(is_master == 3'b010 && bp_oe == 3'b010, "master chosen by slot");
    chk(clk_src[1] == 2'd0 && clk_src[0] == 2'd2 && clk_src[2] == 2'd2, "clock sources, internal");
    // software START on a slave: ignored
    sw_start[2] = 1; @(negedge clk); sw_start[2] = 0;
    repeat (10) @(negedge clk);
    chk(n_start == 0, "slave software START ignored");
    // software START on the master
    sw_start[1] = 1; t0 = cyc; @(negedge clk); sw_start[1] = 0;
    repeat (10) @(negedge clk);
    chk(n_start == 1, "master software START");
    // sampled at t0+1, backplane high after t0+2, start_o after t0+5, seen at t0+6
    chk(t_start - t0 == 6, "START delay: backplane driver and synchronizer");
    // external START
    ext_sel = 1;
    @(negedge clk);
    chk(clk_src[1] == 2'd1, "master uses the external clock");
    #1 ext_start = 1; t0 = cyc;
    repeat (20) @(negedge clk);
    ext_start = 0;
    repeat (10) @(negedge clk);
    chk(n_start == 2, "external START, one pulse per edge");
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

// Master/slave role and START distribution between the boards of a shelf.
//
// All acquisition blocks of the system must start on the same clock edge. The
// board in slot MASTER_SLOT (its ATCA hardware address) becomes the master:
// it takes START either from the external timing system (ext_sel = 1) or from
// software (sw_start), and drives it on the backplane START line (bp_start_o,
// with bp_start_oe). Every board, the master included, starts on the rising
// edge of the backplane line, after a two-flop synchronizer, so master and
// slaves see START in the same clock. A slave ignores its own sw_start.
// clk_src tells the clock multiplexer which clock to use: 2'd1 the external
// clock (master with ext_sel), 2'd0 the internal clock (master without it),
// 2'd2 the backplane clock (slaves).
//
// Timing: start_o is a one-clock pulse three clocks after the backplane line
// rises. The software START is stretched to STRETCH clocks on the backplane.
// Master/slave chosen from the slot address, START and clock internal or
// external, and distribution through the backplane to all boards follow the
// document; the master slot number, the synchronizer and the pulse
// stretching are this design's choices.
module master_slave_sync #(
  parameter logic [7:0] MASTER_SLOT = 8'd7,
  parameter int         STRETCH     = 4
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] slot_addr,
  input  logic       ext_sel,
  input  logic       ext_start,     // from the timing system, asynchronous
  input  logic       sw_start,      // one-clock pulse
  input  logic       bp_start_i,    // backplane START line, asynchronous
  output logic       bp_start_o,
  output logic       bp_start_oe,
  output logic       is_master,
  output logic [1:0] clk_src,
  output logic       start_o
);
  logic [1:0] ext_sync;
  logic [2:0] bp_sync;
  logic [$clog2(STRETCH+1)-1:0] sw_cnt;

  assign is_master   = (slot_addr == MASTER_SLOT);
  assign bp_start_oe = is_master;
  assign clk_src     = !is_master ? 2'd2 : ext_sel ? 2'd1 : 2'd0;

  always_ff @(posedge clk) begin
    if (rst) begin
      ext_sync   <= '0;
      bp_sync    <= '0;
      sw_cnt     <= '0;
      bp_start_o <= 1'b0;
      start_o    <= 1'b0;
    end else begin
      ext_sync <= {ext_sync[0], ext_start};
      bp_sync  <= {bp_sync[1:0], bp_start_i};
      if (sw_start && is_master && !ext_sel) sw_cnt <= ($clog2(STRETCH+1))'(STRETCH);
      else if (sw_cnt != 0)                   sw_cnt <= sw_cnt - 1'b1;
      bp_start_o <= is_master && (ext_sel ? ext_sync[1] : (sw_cnt != 0));
      start_o    <= bp_sync[1] && !bp_sync[2];
    end
  end
endmodule

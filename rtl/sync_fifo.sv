// Synchronous first-in first-out buffer with valid/ready handshakes.
//
// DEPTH words of W bits in a memory array, first-word-fall-through: out_data
// shows the oldest word whenever out_valid is high, and it is removed on a
// clock where out_valid and out_ready are both high. A word offered while the
// buffer is full is dropped and reported by a one-clock overflow pulse, so a
// free-running source (an ADC path cannot be stalled) never stalls. count is
// the number of words held. clear empties the buffer.
module sync_fifo #(
  parameter int W     = 64,
  parameter int DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     clear,
  input  logic [W-1:0]             in_data,
  input  logic                     in_valid,
  output logic                     in_ready,
  output logic [W-1:0]             out_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [$clog2(DEPTH):0]   count,
  output logic                     overflow
);
  localparam int AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rp, wp;
  logic          push, pop;

  initial assert ((1 << AW) == DEPTH && DEPTH >= 2) else $error("DEPTH must be a power of 2");

  assign in_ready  = (count != DEPTH[AW:0]);
  assign out_valid = (count != 0);
  assign out_data  = mem[rp];
  assign pop       = out_valid && out_ready;
  assign push      = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      rp <= '0; wp <= '0; count <= '0; overflow <= 1'b0;
    end else begin
      overflow <= in_valid && !push;
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end
endmodule

// Merges N word streams into one, each input through its own buffer.
//
// Every input has a sync_fifo of DEPTH words; a round-robin arbiter then
// passes one buffered word per clock to the output, starting its search after
// the input served last, so that no channel is starved. Words travel in
// packets: in_last marks the last word of a packet, and once a packet has
// begun the arbiter serves only its input until that word has passed, so
// packets of different inputs never interleave (a single word is a packet of
// one with in_last high). An input is only chosen once a whole packet sits in
// its buffer (or its buffer is full, for packets longer than DEPTH), so a
// packet that trickles in slowly does not hold up the other inputs and then
// leaves at one word per clock. Inputs never stall:
// a word arriving at a full buffer is dropped and flagged on overflow[i] for
// one clock. idle is high when all buffers are empty.
module stream_merge #(
  parameter int N     = 4,
  parameter int W     = 128,
  parameter int DEPTH = 16
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  clear,
  input  logic [N-1:0][W-1:0]   in_data,
  input  logic [N-1:0]          in_valid,
  input  logic [N-1:0]          in_last,
  output logic [W-1:0]          out_data,
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic [N-1:0]          overflow,
  output logic                  idle
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;
  logic [N-1:0][W:0]   f_data;
  logic                locked;
  logic [N-1:0]        f_valid, f_ready;
  logic [IW-1:0]       last, sel;
  logic                any;
  logic [N-1:0]        f_full, ready_i;
  logic [N-1:0][$clog2(DEPTH):0] npk;    // complete packets buffered

  for (genvar i = 0; i < N; i++) begin : g_fifo
    logic in_rdy;
    logic [$clog2(DEPTH):0] cnt_unused;
    sync_fifo #(.W(W+1), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst, .clear,
      .in_data({in_last[i], in_data[i]}), .in_valid(in_valid[i]), .in_ready(in_rdy),
      .out_data(f_data[i]), .out_valid(f_valid[i]), .out_ready(f_ready[i]),
      .count(cnt_unused), .overflow(overflow[i]));
    assign f_full[i]  = !in_rdy;
    assign ready_i[i] = f_valid[i] && (npk[i] != 0 || f_full[i]);

    always_ff @(posedge clk) begin
      if (rst || clear) npk[i] <= '0;
      else npk[i] <= npk[i] + ($clog2(DEPTH)+1)'(in_valid[i] && in_last[i] && in_rdy)
                            - ($clog2(DEPTH)+1)'(f_ready[i] && f_data[i][W]);
    end
  end

  always_comb begin
    any = 1'b0;
    sel = last;
    for (int j = 1; j <= N; j++) begin
      if (locked) begin
        if (j == N && f_valid[last]) any = 1'b1;
      end else if (!any && ready_i[(int'(last) + j) % N]) begin
        any = 1'b1;
        sel = IW'((int'(last) + j) % N);
      end
    end
    f_ready = '0;
    if (any && out_ready) f_ready[sel] = 1'b1;
  end

  assign out_valid = any;
  assign out_data  = f_data[sel][W-1:0];
  assign idle      = (f_valid == '0);

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      last   <= IW'(N-1);
      locked <= 1'b0;
    end else if (any && out_ready) begin
      last   <= sel;
      locked <= !f_data[sel][W];
    end
  end
endmodule

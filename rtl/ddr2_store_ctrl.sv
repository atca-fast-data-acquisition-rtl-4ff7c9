// DDR2 storage manager of one acquisition block.
//
// Acquisition: 128-bit words from the data paths are written to consecutive
// word addresses from 0 up. Writing stops when limit_words words have been
// written (the user's number of bytes to acquire divided by 16; 0 means the
// whole memory, 2^MEM_AW words = 2 GB). From then on full is high and further
// words are accepted and discarded, so the paths upstream never back up.
// Retrieval: rd_start reads back every word written, in order, and hands
// each one on as two 64-bit words, low half first, to the DMA engine. Up to
// RD_OUTST reads are in flight; the replies wait in a small buffer, so a
// stalled DMA engine only holds reading back.
//
// Memory side: a generic request/grant word interface to the DDR2 controller
// (mem_req/mem_we/mem_addr/mem_wdata, transfer on mem_req && mem_gnt; read
// data returns in order on mem_rvalid/mem_rdata at any later clock). The
// DDR2 command sequencing, refresh and PHY sit behind that interface.
// The 2 GB memory, 128-bit words, "store until full or stopped" and
// retrieval after acquisition follow the document; the interface and the
// read-back pipelining are this design's choices.
module ddr2_store_ctrl #(
  parameter int MEM_AW   = 27,     // 2^27 words of 16 bytes = 2 GB
  parameter int RD_OUTST = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              clear,
  input  logic [MEM_AW:0]   limit_words,
  input  logic [127:0]      in_data,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic              rd_start,
  output logic [63:0]       out_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic              mem_req,
  output logic              mem_we,
  output logic [MEM_AW-1:0] mem_addr,
  output logic [127:0]      mem_wdata,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  input  logic [127:0]      mem_rdata,
  output logic              full,
  output logic [MEM_AW:0]   words_written,
  output logic              rd_busy,
  output logic              rd_done
);
  localparam int OW = $clog2(RD_OUTST) + 1;
  logic [MEM_AW:0] limit, rd_addr;
  logic [OW-1:0]   inflight;
  logic [127:0]    q_data;
  logic            q_valid, q_ready, half;
  logic [OW-1:0]   q_count;
  logic            q_in_ready_unused, q_ovf_unused;
  logic            wr_go, rd_go, issue_ok;

  assign limit    = (limit_words == 0 || limit_words > (1 << MEM_AW)) ? (MEM_AW+1)'(1 << MEM_AW) : limit_words;
  assign full     = (words_written >= limit);
  assign issue_ok = rd_busy && (rd_addr < words_written) &&
                    (32'(inflight) + 32'(q_count) < RD_OUTST);

  always_comb begin
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = words_written[MEM_AW-1:0];
    mem_wdata = in_data;
    if (rd_busy) begin
      mem_req  = issue_ok;
      mem_addr = rd_addr[MEM_AW-1:0];
    end else if (in_valid && !full) begin
      mem_req = 1'b1;
      mem_we  = 1'b1;
    end
  end
  assign wr_go    = mem_req && mem_we && mem_gnt;
  assign rd_go    = mem_req && !mem_we && mem_gnt;
  assign in_ready = !rd_busy && (full || mem_gnt);

  sync_fifo #(.W(128), .DEPTH(RD_OUTST)) u_rq (
    .clk, .rst, .clear,
    .in_data(mem_rdata), .in_valid(mem_rvalid), .in_ready(q_in_ready_unused),
    .out_data(q_data), .out_valid(q_valid), .out_ready(q_ready),
    .count(q_count), .overflow(q_ovf_unused));

  assign out_valid = q_valid;
  assign out_data  = half ? q_data[127:64] : q_data[63:0];
  assign q_ready   = half && out_ready;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      words_written <= '0;
      rd_addr  <= '0;
      inflight <= '0;
      rd_busy  <= 1'b0;
      rd_done  <= 1'b0;
      half     <= 1'b0;
    end else begin
      rd_done <= 1'b0;
      if (wr_go) words_written <= words_written + 1'b1;
      if (rd_start && !rd_busy) begin
        rd_busy <= 1'b1;
        rd_addr <= '0;
      end
      if (rd_go) rd_addr <= rd_addr + 1'b1;
      inflight <= inflight + OW'(rd_go) - OW'(mem_rvalid);
      if (out_valid && out_ready) half <= !half;
      if (rd_busy && rd_addr == words_written && inflight == 0 && !q_valid && !rd_start) begin
        rd_busy <= 1'b0;
        rd_done <= 1'b1;
      end
    end
  end
endmodule

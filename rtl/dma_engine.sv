// DMA engine: turns 64-bit data words into PCIe memory-write packets to the
// host and signals each completed DMA packet with an MSI.
//
// Data words are buffered (BUF words). When the host has raised its request
// bit (req) the engine sends one DMA packet: tlps_per_pkt PCIe memory-write
// packets (TLPs) of 32 doublewords (128 bytes) each, to consecutive 128-byte
// blocks from host_addr (taken 128-byte aligned: its 7 low bits are ignored).
// A TLP starts only when its whole payload (16 data
// words) is buffered, or, while flush is high, with what is there and zeros
// after it; with flush high and nothing buffered the DMA packet ends early.
// After the last TLP of a DMA packet the engine requests an MSI (msi_req held
// until msi_ack), then clears the host's request bit (req_clear, one clock)
// and waits for the next request. tlps_per_pkt = 32 gives the 4096-byte DMA
// packets used when retrieving DDR2 data; 1 gives one-TLP DMA packets for
// streaming, so no event waits long in the board at low count rates.
//
// TLP format on tx_*: 64 bits per beat, first doubleword in bits [63:32].
// Beat 0 carries header DW0/DW1 (3-doubleword header, memory write, length 32,
// all byte enables set, requester req_id, tag counting per TLP), beat 1 the
// address DW2 and payload DW0, beats 2-16 payload pairs, beat 17 the last
// payload doubleword with tx_rem = 1 (lower half unused). Within each data
// word the low doubleword goes first (lower host address). tx_sof/tx_eof mark
// the first and last beat; a beat moves when tx_valid and tx_ready are high.
// The 128-byte payload, the 4096-byte and one-TLP DMA packets and the MSI per
// DMA packet follow the document; the beat format (that of a 64-bit
// transaction interface of a PCIe endpoint core), the buffering and the
// padding are this design's choices.
module dma_engine #(
  parameter int BUF = 32
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [63:0] in_data,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic        flush,
  input  logic [5:0]  tlps_per_pkt,
  input  logic [31:0] host_addr,
  input  logic        req,
  output logic        req_clear,
  input  logic [15:0] req_id,
  output logic [63:0] tx_data,
  output logic        tx_valid,
  input  logic        tx_ready,
  output logic        tx_sof,
  output logic        tx_eof,
  output logic        tx_rem,
  output logic        msi_req,
  input  logic        msi_ack,
  output logic        idle,
  output logic [31:0] tlp_count,
  output logic [31:0] dma_count
);
  localparam int PAY_QW = 16;                       // 128-byte payload
  localparam logic [31:0] HDR0 = {1'b0, 2'b10, 5'b00000, 1'b0, 3'b000, 4'b0000,
                                  1'b0, 1'b0, 2'b00, 2'b00, 10'd32};

  typedef enum logic [2:0] {D_IDLE, D_WAIT, D_TLP, D_MSI, D_DONE} dstate_e;
  dstate_e st;

  logic [63:0] f_data;
  logic        f_valid, f_pop, f_ovf_unused;
  logic [$clog2(BUF):0] f_count;
  logic [4:0]  beat;
  logic [5:0]  tlp_idx;
  logic [31:0] base;
  logic [7:0]  tag;
  logic [31:0] hold;
  logic [63:0] w;
  logic        ready_tlp, beat_go;

  sync_fifo #(.W(64), .DEPTH(BUF)) u_buf (
    .clk, .rst, .clear(1'b0),
    .in_data, .in_valid, .in_ready,
    .out_data(f_data), .out_valid(f_valid), .out_ready(f_pop),
    .count(f_count), .overflow(f_ovf_unused));

  assign ready_tlp = (32'(f_count) >= PAY_QW) || (flush && f_valid);
  assign w         = f_valid ? f_data : 64'd0;         // zeros pad a flushed TLP
  assign beat_go   = (st == D_TLP) && tx_ready;
  assign f_pop     = beat_go && beat >= 5'd1 && beat <= 5'd16 && f_valid;

  always_comb begin
    tx_valid = (st == D_TLP);
    tx_sof   = (st == D_TLP) && beat == 5'd0;
    tx_eof   = (st == D_TLP) && beat == 5'd17;
    tx_rem   = tx_eof;
    if (beat == 5'd0)       tx_data = {HDR0, req_id, tag, 4'hF, 4'hF};
    else if (beat == 5'd1)  tx_data = {base + {19'd0, tlp_idx, 7'd0}, w[31:0]};
    else if (beat == 5'd17) tx_data = {hold, 32'd0};
    else                    tx_data = {hold, w[31:0]};
  end
  assign msi_req   = (st == D_MSI);
  assign req_clear = (st == D_DONE);
  assign idle      = (st == D_IDLE) && !f_valid;

  initial assert (BUF >= 16) else $error("BUF must hold one payload");

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= D_IDLE; beat <= '0; tlp_idx <= '0; base <= '0; tag <= '0; hold <= '0;
      tlp_count <= '0; dma_count <= '0;
    end else begin
      unique case (st)
        D_IDLE: if (req && ready_tlp) begin
          base    <= {host_addr[31:7], 7'd0};
          tlp_idx <= '0;
          beat    <= '0;
          st      <= D_TLP;
        end
        D_WAIT: begin
          if (ready_tlp) begin
            beat <= '0;
            st   <= D_TLP;
          end else if (flush) st <= D_MSI;    // short DMA packet at the end
        end
        D_TLP: if (beat_go) begin
          if (beat >= 5'd1 && beat <= 5'd16) hold <= w[63:32];
          if (beat == 5'd17) begin
            tag       <= tag + 1'b1;
            tlp_count <= tlp_count + 1'b1;
            tlp_idx   <= tlp_idx + 1'b1;
            st        <= (tlp_idx + 1'b1 >= tlps_per_pkt) ? D_MSI : D_WAIT;
          end else beat <= beat + 1'b1;
        end
        D_MSI: if (msi_ack) st <= D_DONE;
        D_DONE: begin
          dma_count <= dma_count + 1'b1;
          st        <= D_IDLE;
        end
        default: st <= D_IDLE;
      endcase
    end
  end

  // A TLP, once started, is sent without a gap in its own data.
  property p_tlp_hold;
    @(posedge clk) disable iff (rst) (tx_valid && !tx_ready) |=> tx_valid;
  endproperty
  assert property (p_tlp_hold);
endmodule

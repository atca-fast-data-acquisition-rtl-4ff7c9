// Testbench of dma_engine with a host model. The host sets the request bit,
// the engine must then send tlps_per_pkt memory-write TLPs (18 beats each,
// 3-doubleword header with length 32, requester ID and counting tag, address
// advancing by 128 bytes from the host buffer address), raise an MSI and clear
// the request. Payloads are decoded back into 64-bit words and compared with
// the words fed in. Covers one-TLP (streaming) and 32-TLP (4096-byte) DMA
// packets, random back-pressure on the transmit side, and flushing: a
// partial TLP padded with zeros and a DMA packet ended early.
module tb_dma_engine;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;
  int checks = 0, failures = 0;

  logic [63:0] in_data = '0, tx_data;
  logic        in_valid = 0, in_ready, flush = 0, req = 0, req_clear;
  logic [5:0]  tlps_per_pkt = 6'd1;
  logic [31:0] host_addr = 32'h1000_0000, tlp_count, dma_count;
  logic        tx_valid, tx_ready = 0, tx_sof, tx_eof, tx_rem, msi_req, msi_ack = 0, idle;
  dma_engine dut (.clk, .rst, .in_data, .in_valid, .in_ready, .flush, .tlps_per_pkt,
    .host_addr, .req, .req_clear, .req_id(16'hBEEF), .tx_data, .tx_valid, .tx_ready,
    .tx_sof, .tx_eof, .tx_rem, .msi_req, .msi_ack, .idle, .tlp_count, .dma_count);

  logic [63:0] words[$];        // fed in, not yet seen at the host
  int          beat = 0, tlp_in_pkt = 0, n_tlp = 0, n_msi = 0, n_pad = 0;
  logic [31:0] dws[$];
  logic [7:0]  exp_tag = 0;
  logic [31:0] exp_addr;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // host side: receive beats, decode TLPs
  always @(posedge clk) if (!rst) begin
    if (req_clear) req <= 0;
    if (tx_valid && tx_ready) begin
      chk(tx_sof == (beat == 0) && tx_eof == (beat == 17) && tx_rem == (beat == 17), "framing");
      if (beat == 0) begin
        chk(tx_data[63:32] == 32'h4000_0020, "header DW0: MWr32, length 32");
        chk(tx_data[31:0] == {16'hBEEF, exp_tag, 8'hFF}, "header DW1: requester, tag, BEs");
        exp_tag++;
      end else if (beat == 1) begin
        chk(tx_data[63:32] == exp_addr + 32'(tlp_in_pkt) * 128, "address"); if (tx_data[63:32] != exp_addr + 32'(tlp_in_pkt) * 128) $display("  addr %h exp %h idx %0d", tx_data[63:32], exp_addr, tlp_in_pkt);
        dws.push_back(tx_data[31:0]);
      end else if (beat < 17) begin
        dws.push_back(tx_data[63:32]); dws.push_back(tx_data[31:0]);
      end else dws.push_back(tx_data[63:32]);
      if (beat == 17) begin
        for (int j = 0; j < 16; j++) begin
          logic [63:0] w;
          w = {dws[2*j+1], dws[2*j]};
          if (words.size() > 0) begin
            chk(w == words[0], "payload word");
            void'(words.pop_front());
          end else begin
            chk(w == 0, "padding is zero"); if (w != 0) $display("  pad %h j=%0d", w, j);
            n_pad++;
          end
        end
        dws.delete();
        beat = 0; n_tlp++; tlp_in_pkt++;
      end else beat++;
    end
    tx_ready <= ($urandom % 4) != 0;
    msi_ack  <= msi_req && !msi_ack && ($urandom % 2);
    if (msi_req && msi_ack) begin
      n_msi++;
      chk(beat == 0, "MSI after a whole TLP");
    end
  end

  task automatic feed(input int n);
    for (int i = 0; i < n; ) begin
      in_valid <= ($urandom % 4) != 0;
      in_data  <= {$urandom, $urandom};
      @(posedge clk);
      if (in_valid && in_ready) begin words.push_back(in_data); i++; end
    end
    in_valid <= 0;
  endtask

  // one DMA packet requested by the host
  task automatic dma(input int tlps, input int n_words, input bit do_flush);
    int msi0;
    msi0 = n_msi;
    tlps_per_pkt <= 6'(tlps);
    exp_addr = host_addr;
    tlp_in_pkt = 0;
    req <= 1;
    fork
      feed(n_words);
    join_none
    if (do_flush) begin
      repeat (n_words * 2 + 40) @(posedge clk);
      flush <= 1;
    end
    while (n_msi == msi0) @(posedge clk);
    flush <= 0;
    repeat (3) @(posedge clk);
    chk(req == 0, "request cleared after the DMA packet");
    host_addr = host_addr + 32'h1000;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    dma(1, 16, 0);                    // streaming: one TLP per DMA packet
    chk(n_tlp == 1 && n_msi == 1, "one TLP, one MSI");
    dma(1, 16, 0);
    dma(32, 512, 0);                  // DDR2 retrieval: 4096-byte DMA packet
    chk(n_tlp == 34 && n_msi == 3, "32 TLPs in a 4096-byte DMA packet");
    dma(32, 37, 1);                   // end of data: flush pads and ends early
    chk(n_tlp == 37 && n_msi == 4 && n_pad == 11, "flush: 3 TLPs, 11 padding words");
    chk(words.size() == 0 && idle, "all words delivered, engine idle");
    chk(tlp_count == 37 && dma_count == 4, "TLP and DMA packet counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

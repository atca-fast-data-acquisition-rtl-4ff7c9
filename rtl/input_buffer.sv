// Input buffer of one ADC channel.
//
// Each ADC sample (ADC_BITS wide, two's complement) is registered and placed in
// the most significant bits of a 16-bit container, the low bits zero, so that
// ADCs of different resolution give the same full-scale range downstream. The
// containers are gathered four at a time into a 64-bit word that leaves at a
// quarter of the sample rate; the oldest sample sits in bits [15:0].
// LANES = 2 serves a double-data-rate ADC that delivers two samples per clock
// (lane 0 older); the 64-bit word then leaves every second clock.
//
// Interface: adc_data/adc_valid in; samp_o/samp_valid_o is the registered
// per-sample stream (one clock of latency), word_o/word_valid_o the 64-bit word,
// valid one clock after its last sample arrived. clear restarts the grouping of
// samples into words.
// The MSB alignment, the 16-bit container and the 64-bit word at a quarter rate
// follow the document; the order of samples inside the word is this design's.
module input_buffer #(
  parameter int ADC_BITS = 13,
  parameter int LANES    = 1
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          clear,
  input  logic [LANES-1:0][ADC_BITS-1:0] adc_data,
  input  logic                          adc_valid,
  output logic [LANES-1:0][15:0]        samp_o,
  output logic                          samp_valid_o,
  output logic [63:0]                   word_o,
  output logic                          word_valid_o
);
  localparam int PER_WORD = 4 / LANES;     // clocks per 64-bit word
  localparam int CW = (PER_WORD > 1) ? $clog2(PER_WORD) : 1;

  logic [CW-1:0] cnt;
  logic [63:0]   acc;

  initial begin
    assert (ADC_BITS <= 16 && ADC_BITS >= 8) else $error("ADC_BITS out of range");
    assert (LANES == 1 || LANES == 2) else $error("LANES must be 1 or 2");
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      samp_valid_o <= 1'b0;
      word_valid_o <= 1'b0;
      cnt          <= '0;
      acc          <= '0;
      samp_o       <= '0;
      word_o       <= '0;
    end else begin
      samp_valid_o <= adc_valid;
      word_valid_o <= 1'b0;
      if (clear) cnt <= '0;     // the next sample starts a word
      if (adc_valid) begin
        logic [63:0] nxt;
        nxt = acc;
        for (int l = 0; l < LANES; l++) begin
          samp_o[l] <= {adc_data[l], {(16-ADC_BITS){1'b0}}};
          nxt = {adc_data[l], {(16-ADC_BITS){1'b0}}, nxt[63:16]};
        end
        acc <= nxt;
        if (clear) cnt <= '0;
        else if (int'(cnt) == PER_WORD-1) begin
          cnt          <= '0;
          word_o       <= nxt;
          word_valid_o <= 1'b1;
        end else cnt <= cnt + 1'b1;
      end
    end
  end
endmodule

// Raw data path: packs pairs of 64-bit input-buffer words into the 128-bit
// words written to DDR2, the older word in bits [63:0].
//
// While en is low nothing is kept, so the first word after en rises always
// lands in the low half. out_valid pulses for one clock, the clock after the
// second word of a pair arrived. With one sample per clock a word leaves every
// eighth clock. The 128-bit DDR2 word follows the document; the order of the
// halves is this design's choice.
module raw_packer (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [63:0]  in_word,
  input  logic         in_valid,
  output logic [127:0] out_word,
  output logic         out_valid
);
  logic        have_low;
  logic [63:0] low;

  always_ff @(posedge clk) begin
    if (rst) begin
      have_low  <= 1'b0;
      low       <= '0;
      out_word  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (!en) have_low <= 1'b0;
      else if (in_valid) begin
        if (have_low) begin
          out_word  <= {in_word, low};
          out_valid <= 1'b1;
          have_low  <= 1'b0;
        end else begin
          low      <= in_word;
          have_low <= 1'b1;
        end
      end
    end
  end
endmodule

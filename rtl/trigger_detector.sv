// Digital level trigger of one acquisition channel.
//
// The samples (16-bit containers holding an ADC_BITS-wide two's-complement
// value in the MSBs) are first averaged over the last 2^avg_log2 samples
// (1, 2, 4 or 8) so that noise on slow or small pulses does not fire the
// trigger. A trigger fires when this average, in ADC units, rises above the
// threshold 2^thr_exp (thr_exp = 0..12): the average must have been at or
// below the threshold on the previous sample. With inhibit_en set (pulse
// event mode) a second trigger is refused for inhibit_len samples after one
// fired, i.e. one pulse width.
//
// Timing: samp_o is samp delayed by one clock and trig_o marks the samp_o
// sample on which the average first exceeded the threshold, so consumers see
// the two aligned. The average is taken over samples received while en is
// high; the history is cleared when en is low.
// Power-of-two thresholds, averaging and the pulse-width inhibit follow the
// document; the window lengths, the rising-edge rule and positive pulse
// polarity are this design's choices.
module trigger_detector #(
  parameter int ADC_BITS = 13,
  parameter int AVG_MAX  = 8          // longest averaging window (power of 2)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic [15:0] samp,
  input  logic        samp_valid,
  input  logic [3:0]  thr_exp,        // threshold = 2**thr_exp ADC counts
  input  logic [1:0]  avg_log2,
  input  logic        inhibit_en,
  input  logic [15:0] inhibit_len,
  output logic [15:0] samp_o,
  output logic        samp_valid_o,
  output logic        trig_o
);
  localparam int SW = ADC_BITS + $clog2(AVG_MAX) + 1;

  logic signed [ADC_BITS-1:0] hist [AVG_MAX];
  logic                       above_q;
  logic [15:0]                inh_cnt;

  logic signed [ADC_BITS-1:0] x;
  logic signed [SW-1:0]       sum;
  logic signed [SW-1:0]       avg;
  logic signed [SW-1:0]       thr;
  logic                       above;

  assign x = samp[15 -: ADC_BITS];

  // Average of the newest 2^avg_log2 samples including the present one.
  always_comb begin
    sum = SW'(x);
    for (int i = 0; i < AVG_MAX-1; i++)
      if (i < (1 << avg_log2) - 1) sum = sum + SW'(hist[i]);
    avg   = sum >>> avg_log2;
    thr   = SW'(1) <<< ((thr_exp > 4'd12) ? 4'd12 : thr_exp);
    above = avg > thr;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < AVG_MAX; i++) hist[i] <= '0;
      above_q      <= 1'b1;
      inh_cnt      <= '0;
      samp_o       <= '0;
      samp_valid_o <= 1'b0;
      trig_o       <= 1'b0;
    end else begin
      samp_valid_o <= samp_valid;
      trig_o       <= 1'b0;
      if (!en) begin
        for (int i = 0; i < AVG_MAX; i++) hist[i] <= '0;
        above_q <= 1'b1;             // needs a fresh crossing after enable
        inh_cnt <= '0;
      end else if (samp_valid) begin
        samp_o  <= samp;
        hist[0] <= x;
        for (int i = 1; i < AVG_MAX; i++) hist[i] <= hist[i-1];
        above_q <= above;
        if (inh_cnt != 0) inh_cnt <= inh_cnt - 1'b1;
        if (above && !above_q && inh_cnt == 0) begin
          trig_o <= 1'b1;
          if (inhibit_en && inhibit_len != 0) inh_cnt <= inhibit_len - 1'b1;
        end
      end
      if (samp_valid && !en) samp_o <= samp;
    end
  end
endmodule

// Processed path: pulse-height analysis with pile-up discrimination.
//
// Each detector pulse is turned into one energy value by a trapezoidal shaper
// built from recursive (IIR) filters, the form due to Jordanov and Knoll:
//   d(n) = v(n) - v(n-k) - v(n-l) + v(n-k-l)
//   p(n) = p(n-1) + d(n)
//   r(n) = p(n)*2^MF + M*d(n)              (M: pole-zero factor, Q8.8)
//   s(n) = s(n-1) + r(n)
// For an exponentially decaying pulse with decay factor b per sample and
// M = b/(1-b), s(n) is a trapezoid with rise time k, flat top l-k and height
// proportional to the pulse amplitude. A circular buffer of DLY samples gives
// the delayed terms; k <= l and k+l < DLY are required. While en is low and no
// measurement is under way the filter is cleared, and samples from before en
// rose count as zero.
// When the trigger fires, the shaper output at that moment is kept as the
// baseline and the largest excursion above it over the next k+l+2 samples is
// the pulse height; energy = height >> (MF + e_shift), saturated to 16 bits.
// A trigger that arrives while a pulse is still being measured is a pile-up:
// it is counted, and reported as an event with pileup = 1 and energy 0, but
// no energy is computed for it; the measurement in progress goes on.
//
// Interface: samp/samp_valid/trig aligned as the trigger detector delivers
// them, ts the time stamp of the trigger sample. ev_o/ev_valid_o is one
// trp_pkg::event_t, valid for one clock; a measured event leaves k+l+2 samples
// after its trigger, a pile-up event the clock after its trigger. n_events
// counts all triggers since en rose, n_pileup the pile-ups; both keep their
// value after en falls. The path starts one clock after en rises; a
// measurement under way when en falls is completed (busy_o high meanwhile),
// so every counted trigger gives an event.
// The trapezoidal shaper made of IIR filters, the pole-zero factor and the
// rule that a pulse arriving during the processing of the previous one is
// only counted follow the document; the filter equations, the peak search and
// all widths are this design's choices.
module pha_trapezoid #(
  parameter int DLY = 512,          // delay buffer depth (power of 2)
  parameter int MF  = 8             // fraction bits of the pole-zero factor
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  input  logic [1:0]         ch,
  input  logic [15:0]        samp,
  input  logic               samp_valid,
  input  logic               trig,
  input  trp_pkg::ts_t       ts,
  input  logic [9:0]         k,
  input  logic [9:0]         l,
  input  logic [15:0]        m,
  input  logic [4:0]         e_shift,
  output trp_pkg::event_t    ev_o,
  output logic               ev_valid_o,
  output logic [31:0]        n_events,
  output logic [31:0]        n_pileup,
  output logic               busy_o
);
  import trp_pkg::*;
  localparam int AW = $clog2(DLY);

  logic signed [15:0] mem [DLY];
  logic [AW-1:0]      wp;

  logic signed [15:0] x, xk, xl, xkl;
  logic signed [17:0] d, d_q;
  logic signed [27:0] p;
  logic signed [55:0] s, r;
  logic signed [55:0] base, best, diff;
  logic [10:0]        cnt;
  logic               busy, en_q;
  ts_t                ev_ts;

  logic [AW:0]        filled;     // samples written since en rose

  // v(n-dl); samples from before en rose count as zero, so that the
  // accumulators start from a consistent history
  function automatic logic signed [15:0] tap(input logic [10:0] dl);
    logic [AW-1:0] a;
    a = wp - dl[AW-1:0];
    return (dl == 0) ? x : (32'(dl) > 32'(filled)) ? 16'sd0 : mem[a];
  endfunction

  assign x   = samp;
  assign xk  = tap({1'b0, k});
  assign xl  = tap({1'b0, l});
  assign xkl = tap({1'b0, k} + {1'b0, l});
  assign d   = 18'(x) - 18'(xk) - 18'(xl) + 18'(xkl);
  assign r   = (56'(p) <<< MF) + 56'(d_q) * 56'(signed'({1'b0, m}));
  assign diff = s - base;
  assign busy_o = busy;

  initial assert ((1 << AW) == DLY) else $error("DLY must be a power of 2");

  always_ff @(posedge clk) begin
    if (samp_valid) mem[wp] <= samp;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; d_q <= '0; p <= '0; s <= '0; filled <= '0;
      base <= '0; best <= '0; cnt <= '0; busy <= 1'b0; ev_ts <= '0;
      ev_o <= '0; ev_valid_o <= 1'b0; n_events <= '0; n_pileup <= '0; en_q <= 1'b0;
    end else begin
      ev_valid_o <= 1'b0;
      if (samp_valid) wp <= wp + 1'b1;
      en_q <= en;
      if (en && !en_q) begin
        // counting restarts when the path is enabled, and the counts stay
        // readable after it is disabled
        n_events <= '0;
        n_pileup <= '0;
      end
      if (!en && !busy) begin
        d_q      <= '0;
        p        <= '0;
        s        <= '0;
        filled   <= '0;
      end else if (samp_valid && (en_q || busy)) begin
        logic last;
        d_q <= d;
        p   <= p + 28'(d);
        s   <= s + r;
        if (32'(filled) < DLY) filled <= filled + 1'b1;
        last = busy && cnt == 11'd1;
        if (busy) begin
          if (diff > best) best <= diff;
          cnt <= cnt - 1'b1;
        end
        if (last) begin
          logic signed [55:0] h;
          h = ((diff > best) ? diff : best) >>> (MF + int'(e_shift));
          ev_o.ch     <= ch;
          ev_o.pileup <= 1'b0;
          ev_o.valid  <= 1'b1;
          ev_o.ts     <= ev_ts;
          ev_o.energy <= (h < 0) ? '0 : (h > 56'sd65535) ? 16'hFFFF : h[15:0];
          ev_valid_o  <= 1'b1;
          busy        <= 1'b0;
        end
        if (trig && en) begin
          n_events <= n_events + 1'b1;
          if (!busy || last) begin
            busy  <= 1'b1;
            cnt   <= 11'(k) + 11'(l) + 11'd2;
            base  <= s;
            best  <= '0;
            ev_ts <= ts;
          end else begin
            n_pileup    <= n_pileup + 1'b1;
            ev_o.ch     <= ch;
            ev_o.pileup <= 1'b1;
            ev_o.valid  <= 1'b1;
            ev_o.ts     <= ts;
            ev_o.energy <= '0;
            ev_valid_o  <= 1'b1;
          end
        end
      end
    end
  end
endmodule

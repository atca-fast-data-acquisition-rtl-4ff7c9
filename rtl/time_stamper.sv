// Time stamper.
//
// A 44-bit timer that counts acquisition-clock cycles and returns to zero on
// START, so that triggers, processed energies and operational errors can be
// tagged with the time since START. At 250 MHz it wraps after 2^44 / 250 MHz,
// more than 19 hours. After START it reads 0 in the next clock and then counts
// up by one per clock; it wraps silently.
// The width, the clock and the reset by START follow the document.
module time_stamper #(
  parameter int TS_BITS = trp_pkg::TS_BITS
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,   // one-clock START pulse
  output logic [TS_BITS-1:0] ts
);
  always_ff @(posedge clk) begin
    if (rst || start) ts <= '0;
    else              ts <= ts + 1'b1;
  end
endmodule

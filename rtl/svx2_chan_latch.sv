// svx2_chan_latch -- per-channel comparator latch, counter latch and digital
// threshold of the Wilkinson A/D converters.
//
// Each channel's analog comparator output first passes the comparator polarity
// stage (passed for polarity 1, inverted for 0) so that a 1 always means "the
// ramp has crossed the signal".  The first time that happens after the Gray
// counter is released, the channel's R-S latch sets and its counter latch
// stores the current Gray count.  When the counter reaches its programmed
// maximum every latch not yet set is set and loaded with the maximum value.  A
// channel whose stored value, read as a number, exceeds the downloaded
// threshold (also a Gray number) is a hit.  All of that is the document's.
// This design's choices: the latches are cleared while CNTR-RST is high, and
// "exceeds" is read as strictly greater, which agrees with the document's
// statement that a threshold at or above the counter maximum gives no hits.
//
// Interface: comp_raw[0] is channel 1.  value holds the stored Gray codes.
// latched, value and hit are registered (one clk after the comparator flips).
module svx2_chan_latch
  import svx2_pkg::*;
#(
  parameter int unsigned NUM_CH = 128
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NUM_CH-1:0] comp_raw,
  input  logic              comp_pol,
  input  logic              clear,
  input  logic [7:0]        gray,
  input  logic              maxed,
  input  logic [7:0]        modulo,
  input  logic [7:0]        threshold,
  output logic [NUM_CH-1:0] latched,
  output logic [7:0]        value [NUM_CH],
  output logic [NUM_CH-1:0] hit
);
  logic [NUM_CH-1:0] flip;
  logic [7:0]        thr_bin;

  assign flip    = comp_pol ? comp_raw : ~comp_raw;
  assign thr_bin = gray2bin(threshold);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      latched <= '0;
      hit     <= '0;
      for (int c = 0; c < NUM_CH; c++) value[c] <= '0;
    end else if (clear) begin
      latched <= '0;
      hit     <= '0;
      for (int c = 0; c < NUM_CH; c++) value[c] <= '0;
    end else begin
      for (int c = 0; c < NUM_CH; c++) begin
        if (!latched[c] && (flip[c] || maxed)) begin
          latched[c] <= 1'b1;
          value[c]   <= flip[c] ? gray : modulo;
          hit[c]     <= gray2bin(flip[c] ? gray : modulo) > thr_bin;
        end
      end
    end
  end

endmodule

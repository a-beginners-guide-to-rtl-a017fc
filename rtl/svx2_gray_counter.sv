// svx2_gray_counter -- common Gray code counter of the Wilkinson A/D converters.
//
// One counter serves all channels.  It is cleared while CNTR-RST is high and,
// once released, counts up from zero on both edges of the counter clock (the
// CLK pad in Digitize mode), so a 53 MHz clock counts at 106 MHz.  It stops when
// its Gray value equals the downloaded Counter Modulo (itself a Gray number:
// 10000000 = Gray(255) gives 256 counts, 01000000 = Gray(127) gives 128) and
// then raises maxed; further clock edges have no effect.  This behaviour is
// the document's; holding a binary count and converting it to Gray at the
// output register is this design's choice (the output is registered Gray, so
// only one bit changes per count as the channel latches see it).
//
// Interface: en = Digitize mode with pads connected; ck_rise/ck_fall are one-clk
// edge pulses of the counter clock.  gray and maxed are registered.
module svx2_gray_counter
  import svx2_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       ck_rise,
  input  logic       ck_fall,
  input  logic       cntr_rst,
  input  logic [7:0] modulo,
  output logic [7:0] gray,
  output logic       maxed
);
  logic [7:0] bin;

  assign maxed = (gray == modulo);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bin  <= '0;
      gray <= '0;
    end else if (cntr_rst) begin
      bin  <= '0;
      gray <= '0;
    end else if (en && (ck_rise || ck_fall) && !maxed) begin
      bin  <= bin + 8'd1;
      gray <= bin2gray(bin + 8'd1);
    end
  end

endmodule

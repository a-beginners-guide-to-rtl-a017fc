// svx2_neighbor -- readout tagging ("neighbor hit logic").
//
// Decides which channels are read out, from the two downloaded bits Read
// Neighbor and Read All:
//   both low      only hit channels are tagged;
//   Read Neighbor hit channels and the channel on each side of a hit;
//   Read All      every channel, once the counter has reached its maximum
//                 (also when Read Neighbor is set).
// Channel 1's upper neighbour is channel 128 of the chip above and channel
// 128's lower neighbour is channel 1 of the chip below; their hits arrive on
// the TN and BN pads (top_hit_in, bot_hit_in), so a hit on a chip edge tags
// the facing channel of the adjacent chip.  The rules are the document's; the
// circuit is plain combinational logic.
//
// Interface: index 0 is channel 1 (top of the chip).  Combinational.
module svx2_neighbor #(
  parameter int unsigned NUM_CH = 128
) (
  input  logic [NUM_CH-1:0] hit,
  input  logic              read_nb,
  input  logic              read_all,
  input  logic              maxed,
  input  logic              top_hit_in,
  input  logic              bot_hit_in,
  output logic [NUM_CH-1:0] tag
);
  logic [NUM_CH+1:0] ext;   // hit with the neighbour chips' edge channels

  assign ext = {bot_hit_in, hit, top_hit_in};

  always_comb
    for (int c = 0; c < NUM_CH; c++)
      tag[c] = (read_all && maxed) || hit[c] || (read_nb && (ext[c] || ext[c+2]));

endmodule

// svx2_test_inject -- per-channel test pulse control.
//
// Each channel has a small test capacitor on its integrator input.  Switch S2
// moves the capacitor's far plate from the CAL voltage to the level chosen by
// switch S1 (AVDD for a positive test charge, AGND for a negative one).  S2 of
// a channel closes when CAL-INJECT is high and the channel's test mask bit is
// 1; S1 follows the downloaded test polarity bit for all channels.  The gating
// is the document's; the switches themselves are in the analog front end.
//
// Interface: purely combinational, test_mask[0] is channel 1.
module svx2_test_inject #(
  parameter int unsigned NUM_CH = 128
) (
  input  logic [NUM_CH-1:0] test_mask,
  input  logic              cal_inject,
  input  logic              test_pol,
  output logic [NUM_CH-1:0] s2,
  output logic              s1
);
  assign s2 = test_mask & {NUM_CH{cal_inject}};
  assign s1 = test_pol;
endmodule

// svx2_ramp_comp_model -- BEHAVIOURAL MODEL of the common A/D ramp generator
// and the per-channel analog comparators.  It stands in for analog circuitry
// and is meant for simulation.
//
// Voltages are integers in A/D counts measured from the zero-signal level.
// While RAMP-RST is high the ramp rests at RAMP-REF (0) if RREF-SEL is 1, or
// at RAMP-PED, PED counts on the far side of the zero level from where it is
// going, if RREF-SEL is 0; this offset keeps every comparator off when the
// ramp starts.  After RAMP-RST falls the ramp moves one count per counter-clock
// edge, up if the Ramp Polarity bit is 1 and down if it is 0.  Each comparator
// has the ramp on its + input and the pipeline output on its - input (raw =
// ramp above signal); a tie counts toward the ramp's direction of travel so the
// two polarities behave alike.  While COMP-RST is high the output is held in
// its "off" state.  Ramp trim, ramp non-linearity and comparator offsets are
// not modelled.  With the counter released PED edges after the ramp, a signal
// of magnitude s latches count s+1.
//
// Interface: clk-synchronous, ck_rise/ck_fall are counter-clock edge pulses;
// comp_raw[0] is channel 1.
module svx2_ramp_comp_model #(
  parameter int unsigned NUM_CH = 128,
  parameter int          PED    = 2      // RAMP-PED offset in counts
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ramp_rst,
  input  logic                 rref_sel,
  input  logic                 ramp_pol,
  input  logic                 comp_rst,
  input  logic                 ck_rise,
  input  logic                 ck_fall,
  input  logic signed [11:0]   comp_in [NUM_CH],
  output logic [NUM_CH-1:0]    comp_raw
);
  logic signed [11:0] ramp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      ramp <= '0;
    else if (ramp_rst)
      ramp <= rref_sel ? 12'sd0 : (ramp_pol ? -12'(PED) : 12'(PED));
    else if (ck_rise || ck_fall)
      ramp <= ramp_pol ? ramp + 12'sd1 : ramp - 12'sd1;
  end

  always_comb
    for (int c = 0; c < NUM_CH; c++)
      if (comp_rst) comp_raw[c] = !ramp_pol;
      else          comp_raw[c] = ramp_pol ? (ramp > comp_in[c]) : (ramp >= comp_in[c]);

endmodule

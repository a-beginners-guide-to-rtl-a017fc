// svx2_frontend_model -- BEHAVIOURAL MODEL of the analog front end of all
// channels: charge integrator (preamplifier), test capacitor and the
// CELLS-deep switched-capacitor analog pipeline with its pedestal-corrected
// readout.  It stands in for analog circuitry and is meant for simulation.
//
// Voltages are replaced by integers in A/D counts.  A detector charge det_q[c]
// presented with det_strobe is integrated by channel c; a test pulse (S2 of the
// channel rising) adds +TEST_Q or -TEST_Q depending on S1.  Because each cell
// is reset (switch Sd, closed while the pipeline clock is high) right after it
// is selected and then follows the integrator until the write pointer moves
// on, a cell ends up holding exactly the charge that arrived during its
// interaction interval: the double-correlated sampling of the real circuit.
// Integrator resets (PA-RST) therefore do not change stored values and are not
// modelled, nor are integrator and pipeline saturation, gains, bandwidth and
// the Pipeline Select reset point.  During pipeline readout (ACQ low) the cell
// chosen by the read pointer is presented to the comparator after pedestal
// subtraction; the three signal inversions of the chip make that voltage
// negative-going for positive input charge, so comp_in = -(stored charge).
//
// Interface: clk-synchronous; wr_sel/rd_sel are the one-hot ring counters.
// The cells have no reset (like the capacitors they model); each is cleared by
// Sd before use, so a cell read before it was ever selected holds an undefined
// value, as in the real pipeline.
module svx2_frontend_model #(
  parameter int unsigned NUM_CH = 128,
  parameter int unsigned CELLS  = 32,
  parameter int          TEST_Q = 16     // test charge in A/D counts
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [11:0]       det_q [NUM_CH],
  input  logic                     det_strobe,
  input  logic [NUM_CH-1:0]        s2,
  input  logic                     s1,
  input  logic [CELLS-1:0]         wr_sel,
  input  logic [CELLS-1:0]         rd_sel,
  input  logic                     wr_en,
  input  logic                     rd_en,
  input  logic                     sd,
  output logic signed [11:0]       comp_in [NUM_CH]
);
  localparam int unsigned AW = (CELLS > 1) ? $clog2(CELLS) : 1;

  function automatic logic [AW-1:0] onehot_index(input logic [CELLS-1:0] oh);
    logic [AW-1:0] idx;
    idx = '0;
    for (int k = 0; k < CELLS; k++) if (oh[k]) idx = AW'(k);
    return idx;
  endfunction

  logic [AW-1:0] wi, ri;
  assign wi = onehot_index(wr_sel);
  assign ri = onehot_index(rd_sel);

  // One small storage array per channel, written at the write pointer only.
  // The cells carry no reset: a cell is always cleared by Sd when the write
  // pointer reaches it, before it is written or read.
  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    logic signed [11:0] cap [CELLS];
    logic               s2_q;
    logic signed [11:0] dq, tq;

    assign dq = det_strobe ? det_q[c] : 12'sd0;
    assign tq = (s2[c] && !s2_q) ? (s1 ? 12'(TEST_Q) : -12'(TEST_Q)) : 12'sd0;

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) s2_q <= 1'b0;
      else        s2_q <= s2[c];

    always_ff @(posedge clk)
      if (sd)         cap[wi] <= '0;
      else if (wr_en) cap[wi] <= cap[wi] + dq + tq;

    assign comp_in[c] = rd_en ? -cap[ri] : 12'sd0;
  end

endmodule

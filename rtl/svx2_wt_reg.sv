// svx2_wt_reg -- write-through register between BUS0..BUS7 and the internal
// real-time control signals.
//
// In Initialize, Acquire and Digitize the eight bus pads drive internal
// switches directly ("write through").  Each internal signal belongs to a set
// of modes (BUS0, BUS2..BUS6 to all three; BUS1 is CAL-INJECT in Acquire and
// RREF-SEL in Digitize; BUS7 is SR-LOAD in Initialize and FIFO-RST in
// Digitize).  While its mode is current and the pads are connected the signal
// follows its pad combinationally and a latch tracks it; otherwise the latch
// holds the last level, which is how the levels survive a mode change and the
// switch of the bus to outputs in Readout.  The pad-to-signal assignment is
// the document's; the reset levels are this design's choice: the resets
// (PA-RST, CNTR-RST, RAMP-RST, COMP-RST, FIFO-RST) start asserted, which is the
// "safe" setting used for initialization, everything else starts low.
//
// Interface: mode/active from svx2_mode_ctrl, bus_in = pad levels, ctl = the
// ten internal signals.  No latency while connected.
module svx2_wt_reg
  import svx2_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  mode_e   mode,
  input  logic    active,
  input  logic [7:0] bus_in,
  output wt_ctl_t ctl
);
  wt_ctl_t held, live;
  logic iad, a, d, i;

  assign iad = active && (mode != MODE_RD);
  assign a   = active && (mode == MODE_ACQ);
  assign d   = active && (mode == MODE_DIG);
  assign i   = active && (mode == MODE_INIT);

  always_comb begin
    live            = held;
    if (iad) begin
      live.pa_rst    = bus_in[0];
      live.acq       = bus_in[2];
      live.pipe_sref = bus_in[3];
      live.cntr_rst  = bus_in[4];
      live.ramp_rst  = bus_in[5];
      live.comp_rst  = bus_in[6];
    end
    if (a) live.cal_inject = bus_in[1];
    if (d) live.rref_sel   = bus_in[1];
    if (i) live.sr_load    = bus_in[7];
    if (d) live.fifo_rst   = bus_in[7];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held          <= '0;
      held.pa_rst   <= 1'b1;
      held.cntr_rst <= 1'b1;
      held.ramp_rst <= 1'b1;
      held.comp_rst <= 1'b1;
      held.fifo_rst <= 1'b1;
    end else begin
      held <= live;
    end
  end

  assign ctl = live;

endmodule

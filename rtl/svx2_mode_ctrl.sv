// svx2_mode_ctrl -- operating-mode register of the SVXII.
//
// The chip runs in one of four modes (Initialize, Acquire, Digitize, Readout)
// selected by the MODE1/MODE0 pads.  The CHANGE-MODE pad is a strobe: while it
// is high the chip is "between modes" (no pad is connected to any internal
// signal and the write-through latches hold), and the mode pads are copied into
// the mode register when it falls.  Mode pad changes while CHANGE-MODE is low
// have no effect.  The strobe behaviour follows the document; detecting the
// falling edge by sampling the pad on a free-running system clock is this
// design's own choice (the whole core runs on that one clock).
//
// Interface: chng_md, mode0, mode1 are pad levels already synchronous to clk.
//   mode     current mode, changes one clk after CHANGE-MODE is seen low
//   active   1 when the pads are connected to the current mode's signals
//   enter    one-clk pulse when a new mode takes effect
// Reset puts the chip in Initialize with the pads connected.
module svx2_mode_ctrl
  import svx2_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  chng_md,
  input  logic  mode0,
  input  logic  mode1,
  output mode_e mode,
  output logic  active,
  output logic  enter
);
  logic cm_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cm_q  <= 1'b0;
      mode  <= MODE_INIT;
      enter <= 1'b0;
    end else begin
      cm_q  <= chng_md;
      enter <= 1'b0;
      if (cm_q && !chng_md) begin
        mode  <= mode_e'({mode1, mode0});
        enter <= 1'b1;
      end
    end
  end

  // Pads are disconnected while the strobe is high and during the cycle in
  // which the new mode is being loaded.
  assign active = !chng_md && !cm_q;

endmodule

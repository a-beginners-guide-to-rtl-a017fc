// svx2_pipe_ctrl -- pointer and switch logic of the analog pipeline.
//
// Every channel stores its integrator output on one of CELLS sampling
// capacitors.  A write ring counter (one-hot) selects the capacitor being
// filled and a read ring counter selects the capacitor to be digitized.  When
// SR-LOAD falls (init pulse) the write ring is set to cell 0 and the pipeline
// depth decoder sets the read ring DEPTH cells behind it; from then on both
// rings advance together on each rising edge of the pipeline clock while ACQ
// is high, so the read ring always points at the sample taken DEPTH intervals
// before the one being written.  Depth 0 therefore reads the last sample taken.
// While the pipeline clock is high during sampling the reset switch Sd is
// closed, clearing the newly selected capacitor.  Lowering ACQ stops the rings
// and starts the pipeline readout.
//
// From the document: the two ring counters, the depth offset and its meaning,
// advance on the rising clock edge, Sd closed while the clock is high, SR as
// PIPE-SREF, Sa as PA-RST and Sf as COMP-RST.  This design's own choices: the
// rings advance only in Acquire mode with ACQ high; Sb and Sc (integrator to
// pipeline) are closed while ACQ is high and Se (pipeline to comparator) while
// ACQ is low, since the document names these switches without giving their
// control.
//
// The whole write-through control word is taken in for a uniform interface;
// the lint report that some of its fields (CAL-INJECT, RREF-SEL, counter and
// ramp resets, SR-LOAD, FIFO-RST) are unused here stands, as they belong to
// other blocks.
//
// Interface: ck_rise/ck_level are the pipeline clock (CLK pad) edge pulse and
// level; outputs are levels, one clk after the inputs.
module svx2_pipe_ctrl
  import svx2_pkg::*;
#(
  parameter int unsigned CELLS = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     acq_mode,   // Acquire mode, pads connected
  input  logic                     ck_rise,
  input  logic                     ck_level,
  input  logic                     init,       // SR-LOAD falling edge
  input  logic [$clog2(CELLS)-1:0] depth,
  input  wt_ctl_t                  ctl,
  output logic [CELLS-1:0]         wr_sel,
  output logic [CELLS-1:0]         rd_sel,
  output logic                     wr_en,
  output logic                     rd_en,
  output logic                     sd,
  output logic                     sr_sw,
  output logic                     sa,
  output logic                     sf,
  output logic                     sb,
  output logic                     sc,
  output logic                     se
);
  // Depth decoder: one-hot position of cell (0 - depth) mod CELLS.
  function automatic logic [CELLS-1:0] depth_decode(input logic [$clog2(CELLS)-1:0] d);
    logic [CELLS-1:0] oh;
    oh = '0;
    oh[($clog2(CELLS))'(CELLS - int'(d))] = 1'b1;
    return oh;
  endfunction

  logic sampling;
  assign sampling = acq_mode && ctl.acq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_sel <= CELLS'(1);
      rd_sel <= CELLS'(1);
      sd     <= 1'b0;
    end else begin
      if (init) begin
        wr_sel <= CELLS'(1);
        rd_sel <= depth_decode(depth);
      end else if (sampling && ck_rise) begin
        wr_sel <= {wr_sel[CELLS-2:0], wr_sel[CELLS-1]};
        rd_sel <= {rd_sel[CELLS-2:0], rd_sel[CELLS-1]};
      end
      sd <= sampling && ck_level;
    end
  end

  assign wr_en = ctl.acq;
  assign rd_en = !ctl.acq;
  assign sr_sw = ctl.pipe_sref;
  assign sa    = ctl.pa_rst;
  assign sf    = ctl.comp_rst;
  assign sb    = ctl.acq;
  assign sc    = ctl.acq;
  assign se    = !ctl.acq;

endmodule

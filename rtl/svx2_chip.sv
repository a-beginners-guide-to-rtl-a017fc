// svx2_chip -- one SVXII silicon-strip readout chip (digital core plus
// behavioural models of its analog sections).
//
// NUM_CH identical channels each integrate the charge of one detector strip,
// store it in a CELLS-deep analog pipeline while the trigger is formed, and on
// a trigger digitize it with a Wilkinson A/D converter (per-channel comparator
// and counter latch, common ramp and Gray code counter).  Channels over a
// digital threshold, optionally with their neighbours or all channels, are
// packed into a sparsification FIFO and sent out on an eight-bit bus shared by
// a daisy chain of chips.  The chip is driven through 15 digital pads and runs
// in four modes chosen by MODE1/MODE0 under the CHANGE-MODE strobe:
//   Initialize  CLK shifts NUM_CH+54 parameter bits in from BN, out on TN
//   Acquire     CLK is the pipeline clock, BUS0..7 drive internal switches
//   Digitize    CLK edges advance the Gray counter, BN/TN carry edge hits
//   Readout     CLK half cycles clock bytes out on BUS0..7, TN/BN pass priority
// The mode scheme, pad functions (per mode), register map and data formats
// are those of the document.
//
// Design choices of this implementation: all logic runs on one free-running
// system clock clk, much faster than the CLK pad, and every pad is sampled by
// an input register; edges of CLK are found by comparing successive samples.
// CLK therefore has to stay in each level for at least two clk periods.  The
// differential clock receiver is not modelled: CLK arrives as one logic input.
// Bidirectional pads are split into _in, _out and _oe; BN and TN drive only
// low in Digitize (open drain /hit), drive both levels as TN serial output in
// Initialize and as BN priority output in Readout.  The pull-down on TN and the
// wired bus belong to the board (testbench).  rst_n is a power-on reset.
// The preamplifier bandwidth and ramp trim capacitor arrays are analog; their
// downloaded codes are brought out on bw_ctrl (bit 0 = smallest capacitor) and
// ramp_trim (bit 7 = largest capacitor); the pipeline switch controls that the
// behavioural models do not need are brought out on analog_sw.  The lint
// report of unused parameter bits stands: the six spare bits (144-149) have no
// function in the document, and Pipeline Select (bit 130) only moves the
// analog reset point of the pipeline, which the front-end model does not
// represent.  Three block outputs are left open on purpose (mode-entry pulse,
// per-channel latched flags, collapse-busy flag): they serve the block-level
// testbenches and have no pad to go to.
module svx2_chip
  import svx2_pkg::*;
#(
  parameter int unsigned NUM_CH = 128,
  parameter int unsigned CELLS  = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  // control pads
  input  logic               pad_clk,
  input  logic               mode0,
  input  logic               mode1,
  input  logic               chng_md,
  input  logic [7:0]         bus_in,
  output logic [7:0]         bus_out,
  output logic               bus_oe,
  input  logic               bn_in,
  output logic               bn_out,
  output logic               bn_oe,
  input  logic               tn_in,
  output logic               tn_out,
  output logic               tn_oe,
  output logic               frout,
  // detector side: charge per strip, in A/D counts
  input  logic signed [11:0] det_q [NUM_CH],
  input  logic               det_strobe,
  // analog trim codes
  output logic [5:0]         bw_ctrl,
  output logic [7:0]         ramp_trim,
  // switch controls of the analog section not used by the behavioural models:
  // {Sa preamp reset, Sb, Sc, SR reference capacitor, Se}
  output logic [4:0]         analog_sw
);
  localparam int unsigned AW = $clog2(NUM_CH);

  // ---------------- pad input registers and clock edges -------------------
  logic       ck_q, ck_qq, m0_q, m1_q, cm_q, bn_q, tn_q;
  logic [7:0] bus_q;
  logic       ck_rise, ck_fall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {ck_q, ck_qq, m0_q, m1_q, cm_q, bn_q, tn_q} <= '0;
      bus_q <= '0;
    end else begin
      ck_q  <= pad_clk;
      ck_qq <= ck_q;
      m0_q  <= mode0;
      m1_q  <= mode1;
      cm_q  <= chng_md;
      bus_q <= bus_in;
      bn_q  <= bn_in;
      tn_q  <= tn_in;
    end
  end

  assign ck_rise = ck_q && !ck_qq;
  assign ck_fall = !ck_q && ck_qq;

  // ---------------- mode and write-through register ----------------------
  mode_e   mode;
  logic    active;
  wt_ctl_t ctl;
  logic    init_on, acq_on, dig_on, rd_on;

  svx2_mode_ctrl u_mode (
    .clk, .rst_n, .chng_md(cm_q), .mode0(m0_q), .mode1(m1_q),
    .mode, .active, .enter()
  );

  assign init_on = active && (mode == MODE_INIT);
  assign acq_on  = active && (mode == MODE_ACQ);
  assign dig_on  = active && (mode == MODE_DIG);
  assign rd_on   = active && (mode == MODE_RD);

  svx2_wt_reg u_wt (.clk, .rst_n, .mode, .active, .bus_in(bus_q), .ctl);

  // ---------------- parameter download -------------------------------------
  logic [NUM_CH-1:0] test_mask;
  params_t           prm;
  logic              sout, init_ptr;

  svx2_param_sr #(.NUM_CH(NUM_CH)) u_sr (
    .clk, .rst_n, .shift_en(init_on), .ck_rise, .ck_fall, .sin(bn_q),
    .sr_load(ctl.sr_load), .sout, .test_mask, .params(prm), .init_ptr
  );

  always_comb
    for (int k = 0; k < 6; k++) bw_ctrl[k] = prm.bw[5-k];
  assign ramp_trim = prm.ramp_trim;

  // ---------------- test circuit, pipeline, analog front end -------------
  logic [NUM_CH-1:0] s2;
  logic              s1;
  logic [CELLS-1:0]  wr_sel, rd_sel;
  logic              wr_en, rd_en, sd, sr_sw, sa, sf, sb, sc, se;
  logic signed [11:0] comp_in [NUM_CH];

  svx2_test_inject #(.NUM_CH(NUM_CH)) u_test (
    .test_mask, .cal_inject(ctl.cal_inject), .test_pol(prm.test_pol), .s2, .s1
  );

  svx2_pipe_ctrl #(.CELLS(CELLS)) u_pipe (
    .clk, .rst_n, .acq_mode(acq_on), .ck_rise, .ck_level(ck_q), .init(init_ptr),
    .depth(prm.depth[$clog2(CELLS)-1:0]), .ctl,
    .wr_sel, .rd_sel, .wr_en, .rd_en, .sd, .sr_sw, .sa, .sf, .sb, .sc, .se
  );

  assign analog_sw = {sa, sb, sc, sr_sw, se};

  svx2_frontend_model #(.NUM_CH(NUM_CH), .CELLS(CELLS)) u_fe (
    .clk, .rst_n, .det_q, .det_strobe, .s2, .s1, .wr_sel, .rd_sel,
    .wr_en(wr_en && acq_on), .rd_en, .sd, .comp_in
  );

  // ---------------- A/D conversion -----------------------------------------
  logic [NUM_CH-1:0] comp_raw, hit, tag;
  logic [7:0]        gray;
  logic              maxed;
  logic [7:0]        value [NUM_CH];

  svx2_ramp_comp_model #(.NUM_CH(NUM_CH)) u_ramp (
    .clk, .rst_n, .ramp_rst(ctl.ramp_rst), .rref_sel(ctl.rref_sel),
    .ramp_pol(prm.ramp_pol), .comp_rst(sf),
    .ck_rise(ck_rise && dig_on), .ck_fall(ck_fall && dig_on),
    .comp_in, .comp_raw
  );

  svx2_gray_counter u_cnt (
    .clk, .rst_n, .en(dig_on), .ck_rise, .ck_fall, .cntr_rst(ctl.cntr_rst),
    .modulo(prm.modulo), .gray, .maxed
  );

  svx2_chan_latch #(.NUM_CH(NUM_CH)) u_lat (
    .clk, .rst_n, .comp_raw, .comp_pol(prm.comp_pol), .clear(ctl.cntr_rst),
    .gray, .maxed, .modulo(prm.modulo), .threshold(prm.threshold),
    .latched(), .value, .hit
  );

  // ---------------- sparsification ------------------------------------------
  logic top_hit_in, bot_hit_in;
  assign top_hit_in = dig_on && !tn_q;
  assign bot_hit_in = dig_on && !bn_q;

  svx2_neighbor #(.NUM_CH(NUM_CH)) u_nb (
    .hit, .read_nb(prm.read_nb), .read_all(prm.read_all), .maxed,
    .top_hit_in, .bot_hit_in, .tag
  );

  logic [AW-1:0] head_addr;
  logic [7:0]    head_data;
  logic          empty, last, pop;

  svx2_sparse_fifo #(.NUM_CH(NUM_CH)) u_fifo (
    .clk, .rst_n, .fifo_rst(ctl.fifo_rst), .tag, .value, .pop,
    .head_addr, .head_data, .empty, .busy(), .last, .frout
  );

  // ---------------- readout ------------------------------------------------
  logic pri_out_n, ro_oe;
  logic [7:0] ro_bus;

  svx2_readout #(.NUM_CH(NUM_CH)) u_ro (
    .clk, .rst_n, .active(rd_on), .ck_level(ck_q), .ck_rise, .ck_fall,
    .pri_in_n(tn_q), .chip_id(prm.chip_id), .empty, .last, .head_addr,
    .head_data, .pop, .bus_out(ro_bus), .bus_oe(ro_oe), .pri_out_n
  );

  assign bus_out = ro_bus;
  assign bus_oe  = ro_oe && rd_on;

  // ---------------- multifunction BN / TN pads ----------------------------
  always_comb begin
    tn_out = 1'b0;
    tn_oe  = 1'b0;
    bn_out = 1'b0;
    bn_oe  = 1'b0;
    if (init_on) begin
      tn_out = sout;
      tn_oe  = 1'b1;
    end
    if (dig_on) begin
      tn_oe = hit[0];
      bn_oe = hit[NUM_CH-1];
    end
    if (rd_on) begin
      bn_out = pri_out_n;
      bn_oe  = 1'b1;
    end
  end

endmodule

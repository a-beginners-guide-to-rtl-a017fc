// tb_svx2_chip -- end-to-end test of a daisy chain of six SVXII chips at the
// default size (128 channels, 32 pipeline cells).
//
// The board model wires the chips as in a real module: common CLK, mode pads
// and BUS0..7; the BN pad of chip k and the TN pad of chip k+1 share one line.
// Lines are resolved per pad function: a driven 0 wins (open-drain hit lines
// in Digitize), otherwise a driven level, otherwise the pull: TN's internal
// pull-down in Readout, a pull-up in the other modes.
//
// One complete operating cycle is run:
//   Initialize  6 x 182 parameter bits shifted in through the chain (chip #1's
//               frame first), shifted a second time while the frames coming
//               out of chip #1's TN are compared with what was sent, SR-LOAD
//   Acquire     preamp reset released, 47 interaction intervals: background
//               charge in every interval, the event in interval 40, test pulses
//               (CAL-INJECT) in the same interval, ACQ lowered 7 intervals later
//               (pipeline depth 7, so the read pointer has wrapped)
//   Digitize    RREF-SEL low, ramp started, counter released two edges later,
//               counting to each chip's modulo, FIFO-RST lowered
//   Readout     FIFO clock runs until the last chip's BN falls
// The byte stream on the bus is compared with a reference computed here from
// the chip's rules: per chip ID with BUS7 = 1, status 0, then Gray-coded data
// and address of every tagged channel in channel order.  The converter model
// latches |charge| + 1 counts (counter released two edges after the ramp),
// capped at the modulo value; a charge of the wrong sign leaves the comparator
// flipped from the start and latches count 0; a channel hits above the threshold; tags follow
// the Read Neighbor / Read All rules including the neighbour chips' edge
// channels.  Once the first byte is out, every half cycle of CLK must carry a
// byte until the last chip is done (one byte per clock level, no gaps at the
// priority hand-overs).
//
// Chips: #1 positive input, Read Neighbor, test pulse on channel 50, a
// saturating channel; #2 positive, hits only, its channel 1 hit tags chip #1's
// channel 128 through TN; #3 negative input (all polarity bits flipped), Read
// Neighbor, test pulse, 64 counts, its channel 128 hit tags chip #4's channel 1
// through BN; #4 positive, Read Neighbor, full 256 counts; #5 Read All, 64
// counts; #6 threshold above its counter maximum, so only ID and status.
// Each mechanism (serial readback, SR-LOAD, test pulse, pipeline wrap, neighbour
// tag inside a chip and across chips, saturation, Read All, negative polarity,
// empty chip, priority hand-over) is counted and must occur at least once.
module tb_svx2_chip;
  import svx2_pkg::*;
  localparam int NCHIP = 6, N = 128, LEN = N + 54;
  localparam int H = 8;        // clks per half period of the CLK pad
  localparam int E = 40;       // interval of the event
  localparam int D = 7;        // pipeline depth

  logic clk = 0, rst_n = 0;
  logic pad_clk = 0, mode0 = 0, mode1 = 0, chng_md = 0, det_strobe = 0;
  logic [7:0] bus_drv = 8'h00;
  logic       tb_drives_bus = 1;
  logic       serial_in = 0;
  mode_e      board_mode = MODE_INIT;

  logic [7:0] bus_out [NCHIP];
  logic       bus_oe  [NCHIP];
  logic       bn_in [NCHIP], bn_out [NCHIP], bn_oe [NCHIP];
  logic       tn_in [NCHIP], tn_out [NCHIP], tn_oe [NCHIP];
  logic       frout [NCHIP];
  logic [5:0] bw_ctrl [NCHIP];
  logic [7:0] ramp_trim [NCHIP];
  logic [4:0] analog_sw [NCHIP];
  logic signed [11:0] det_q [NCHIP][N];
  logic [7:0] bus;
  logic       line [NCHIP+1];   // line[k]: between chip k-1 BN and chip k TN

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar k = 0; k < NCHIP; k++) begin : g_chip
    svx2_chip u_chip (
      .clk, .rst_n, .pad_clk, .mode0, .mode1, .chng_md, .bus_in(bus),
      .bus_out(bus_out[k]), .bus_oe(bus_oe[k]),
      .bn_in(bn_in[k]), .bn_out(bn_out[k]), .bn_oe(bn_oe[k]),
      .tn_in(tn_in[k]), .tn_out(tn_out[k]), .tn_oe(tn_oe[k]),
      .frout(frout[k]), .det_q(det_q[k]), .det_strobe,
      .bw_ctrl(bw_ctrl[k]), .ramp_trim(ramp_trim[k]), .analog_sw(analog_sw[k])
    );
  end

  // ------------------------------------------------------------ board wiring
  function automatic logic resolve(input logic oe_a, input logic a, input logic oe_b,
                                   input logic b, input logic pull);
    if ((oe_a && !a) || (oe_b && !b)) return 1'b0;
    if (oe_a || oe_b)                 return 1'b1;
    return pull;
  endfunction

  int bus_conflicts = 0;
  always_comb begin
    logic rd;
    rd = (board_mode == MODE_RD);
    // top line: only chip #1's TN; serial monitor in Initialize
    line[0] = resolve(tn_oe[0], tn_out[0], 1'b0, 1'b0, !rd);
    for (int k = 1; k < NCHIP; k++)
      line[k] = resolve(bn_oe[k-1], bn_out[k-1], tn_oe[k], tn_out[k], !rd);
    // bottom line: the last chip's BN, driven by the board in Initialize
    line[NCHIP] = (board_mode == MODE_INIT) ? serial_in
                : resolve(bn_oe[NCHIP-1], bn_out[NCHIP-1], 1'b0, 1'b0, 1'b1);
    for (int k = 0; k < NCHIP; k++) begin
      tn_in[k] = line[k];
      bn_in[k] = line[k+1];
    end
    bus = tb_drives_bus ? bus_drv : 8'h00;
    for (int k = 0; k < NCHIP; k++) if (bus_oe[k]) bus |= bus_out[k];
  end

  always @(posedge clk) begin
    int n;
    n = 0;
    for (int k = 0; k < NCHIP; k++) n += bus_oe[k];
    if (n > 1 || (n > 0 && tb_drives_bus)) bus_conflicts++;
  end

  // ------------------------------------------------------------ helpers
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] g(input int i);
    return 8'(i ^ (i >> 1));
  endfunction

  task automatic wclk(input int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic toggle();
    @(negedge clk) pad_clk = !pad_clk;
    wclk(H - 1);
  endtask

  task automatic change_mode(input mode_e m, input logic [7:0] b);
    @(negedge clk) chng_md = 1;
    wclk(4);
    {mode1, mode0} = 2'(m);
    bus_drv = b;
    tb_drives_bus = (m != MODE_RD);
    wclk(4);
    chng_md = 0;
    board_mode = m;
    wclk(4);
  endtask

  // ------------------------------------------------------------ chip setup
  typedef struct {
    int id, thr, maxv;
    bit pos, read_nb, read_all;
    int mask_ch;            // 1-based, 0 = none
  } cfg_t;
  cfg_t cfg [NCHIP];

  logic frame [NCHIP][1:LEN];
  logic stream [$];
  int   sig [NCHIP][N];          // event charge magnitude, signed as applied

  function automatic void build_frame(input int k);
    params_t p;
    logic [PARAM_BITS-1:0] pb;
    for (int c = 1; c <= N; c++) frame[k][c] = (c == cfg[k].mask_ch);
    p = '0;
    p.test_pol  = cfg[k].pos;
    p.pipe_sel  = !cfg[k].pos;
    p.bw        = 6'b000101;
    p.chip_id   = 7'(cfg[k].id);
    p.read_nb   = cfg[k].read_nb;
    p.read_all  = cfg[k].read_all;
    p.ramp_pol  = !cfg[k].pos;
    p.comp_pol  = !cfg[k].pos;
    p.depth     = 5'(D);
    p.threshold = g(cfg[k].thr);
    p.modulo    = g(cfg[k].maxv);
    p.ramp_trim = 8'h5a;
    pb = p;
    for (int b = 0; b < PARAM_BITS; b++) frame[k][N+1+b] = pb[PARAM_BITS-1-b];
  endfunction

  // ------------------------------------------------------------ reference
  typedef struct { logic [7:0] b; int chip; } byte_t;
  byte_t exp_bytes [$];
  int n_cross_nb = 0, n_nb = 0, n_sat = 0, n_test = 0, n_empty = 0;

  function automatic int conv(input int k, input int c);
    int s, v;
    s = cfg[k].pos ? sig[k][c] : -sig[k][c];
    v = (s >= 0) ? s + 1 : 0;                // wrong polarity: flipped from the start
    return (v > cfg[k].maxv) ? cfg[k].maxv : v;
  endfunction

  function automatic void build_expected();
    bit hitm [NCHIP][N];
    for (int k = 0; k < NCHIP; k++)
      for (int c = 0; c < N; c++) hitm[k][c] = conv(k, c) > cfg[k].thr;
    for (int k = 0; k < NCHIP; k++) begin
      int ntag;
      ntag = 0;
      exp_bytes.push_back('{b: {1'b1, 7'(cfg[k].id)}, chip: k});
      exp_bytes.push_back('{b: 8'h00, chip: k});
      for (int c = 0; c < N; c++) begin
        bit up, dn, t;
        up = (c == 0)   ? (k > 0 && hitm[k-1][N-1])         : hitm[k][c-1];
        dn = (c == N-1) ? (k < NCHIP-1 && hitm[k+1][0])     : hitm[k][c+1];
        t  = cfg[k].read_all || hitm[k][c] || (cfg[k].read_nb && (up || dn));
        if (t) begin
          ntag++;
          if (!hitm[k][c] && !cfg[k].read_all) begin
            n_nb++;
            if ((c == 0 && up) || (c == N-1 && dn)) n_cross_nb++;
          end
          if (conv(k, c) == cfg[k].maxv) n_sat++;
          exp_bytes.push_back('{b: g(conv(k, c)), chip: k});
          exp_bytes.push_back('{b: 8'(c), chip: k});
        end
      end
      if (ntag == 0) n_empty++;
    end
  endfunction

  // ------------------------------------------------------------ stimulus
  int n_readback = 0, n_wrap = 0, n_prio = 0;
  logic [7:0] got [$];

  initial begin
    cfg[0] = '{id: 1,  thr: 10,  maxv: 100, pos: 1, read_nb: 1, read_all: 0, mask_ch: 50};
    cfg[1] = '{id: 2,  thr: 10,  maxv: 100, pos: 1, read_nb: 0, read_all: 0, mask_ch: 0};
    cfg[2] = '{id: 3,  thr: 10,  maxv: 63,  pos: 0, read_nb: 1, read_all: 0, mask_ch: 10};
    cfg[3] = '{id: 5,  thr: 10,  maxv: 255, pos: 1, read_nb: 1, read_all: 0, mask_ch: 0};
    cfg[4] = '{id: 4,  thr: 200, maxv: 63,  pos: 1, read_nb: 0, read_all: 1, mask_ch: 0};
    cfg[5] = '{id: 77, thr: 120, maxv: 100, pos: 1, read_nb: 1, read_all: 0, mask_ch: 0};
    for (int k = 0; k < NCHIP; k++) begin
      build_frame(k);
      for (int c = 0; c < N; c++) begin
        sig[k][c] = (cfg[k].pos ? 1 : -1) * $urandom_range(0, 6);   // below threshold
        det_q[k][c] = '0;
      end
    end
    // event charges (magnitude as seen by the chip)
    sig[0][4]  = 40;  sig[0][69] = 200;  sig[0][127] = 3;   // ch 5, ch 70 saturates, ch 128 low
    sig[0][100] = 11; sig[0][101] = 10;                      // just over / at threshold
    sig[1][0]  = 30;  sig[1][63] = 55;                       // chip 2 ch 1 -> chip 1 ch 128
    sig[2][9]  = -20; sig[2][20] = -90;  sig[2][30] = 25;    // negative chip, one wrong-sign
    sig[2][127] = -40;                                       // chip 3 ch 128 -> chip 4 ch 1
    sig[3][60] = 70;
    sig[4][7]  = 30;  sig[4][8] = -12;                       // read-all chip, one wrong-sign
    sig[5][5]  = 100;                                        // chip 6: below its threshold
    // test pulse adds TEST_Q = 16 on masked channels, with the chip's polarity
    sig[0][49] += 16;
    sig[2][9]  += -16;
    n_test = 2;
    build_expected();

    wclk(3);
    rst_n = 1;
    wclk(3);

    // ---------------- Initialize
    change_mode(MODE_INIT, 8'b0111_0001);     // PA-RST, CNTR-RST, RAMP-RST, COMP-RST
    for (int k = 0; k < NCHIP; k++)
      for (int b = 1; b <= LEN; b++) stream.push_back(frame[k][b]);
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < stream.size(); i++) begin
        @(negedge clk) serial_in = stream[i];
        wclk(2);
        toggle();                               // rising edge
        toggle();                               // falling edge
        if (pass == 1 && i + 1 < stream.size()) begin
          check(line[0] == stream[i+1], $sformatf("serial readback bit %0d", i + 1));
          n_readback++;
        end
        if (pass == 0 && i + 1 == stream.size())
          check(line[0] == stream[0], "first bit of chip #1 on TN after full load");
      end
    end
    bus_drv[7] = 1;                             // SR-LOAD
    wclk(4);
    bus_drv[7] = 0;
    wclk(4);
    for (int k = 0; k < NCHIP; k++) begin
      check(g_ramp_trim(k) == 8'h5a && g_bw(k) == 6'b101000, "trim codes after SR-LOAD");
    end

    // ---------------- Acquire
    change_mode(MODE_ACQ, 8'b0111_1101);       // PA-RST, ACQ, PIPE-SREF, resets
    bus_drv[0] = 0;                             // release preamplifier reset
    for (int j = 1; j <= E + D; j++) begin
      toggle();                                 // rising: next cell, reset
      toggle();                                 // falling: beam crossing
      for (int k = 0; k < NCHIP; k++)
        for (int c = 0; c < N; c++)
          if (j == E) det_q[k][c] = 12'(sig[k][c] - ((k == 0 && c == 49) ? 16 : (k == 2 && c == 9) ? -16 : 0));
          else        det_q[k][c] = 12'((cfg[k].pos ? 1 : -1) * 50);
      @(negedge clk) det_strobe = 1;
      @(negedge clk) det_strobe = 0;
      if (j == E) bus_drv[1] = 1;               // CAL-INJECT for one interval
      if (j == E + 1) bus_drv[1] = 0;
    end
    if ((E % 32) != E) n_wrap++;
    bus_drv[2] = 0;                             // ACQ low: pipeline readout
    wclk(4);
    toggle(); toggle();                         // clocks during pipeline readout
    bus_drv[6] = 0;                             // COMP-RST released
    wclk(4);

    // ---------------- Digitize
    pad_clk = 0;
    change_mode(MODE_DIG, 8'b1011_0010);       // FIFO-RST, RAMP/CNTR-RST, RREF-SEL
    bus_drv[1] = 0;                             // RREF-SEL -> RAMP-PED
    wclk(4);
    bus_drv[5] = 0;                             // ramp starts
    wclk(2);
    toggle(); toggle();                         // two edges: ramp reaches zero level
    bus_drv[4] = 0;                             // counter starts
    for (int e = 0; e < 110; e++) toggle();
    bus_drv[7] = 0;                             // FIFO-RST low: collapse
    wclk(N + 20);
    bus_drv[1] = 1;                             // back to RAMP-REF
    bus_drv[0] = 1;                             // preamplifier reset
    if (pad_clk) toggle();
    wclk(4);

    // ---------------- Readout
    change_mode(MODE_RD, 8'h00);
    begin
      int guard, prev_last, idle_half;
      idle_half = 0;
      guard = 0;
      prev_last = 1;
      while (line[NCHIP] && guard < 4000) begin
        // sample just before the next half-cycle change
        if (any_oe()) got.push_back(bus);
        else if (got.size() > 0) idle_half++;   // gap once readout has begun
        toggle();
        guard++;
      end
      if (any_oe()) got.push_back(bus);
      check(guard < 4000, "readout completes");
      // one byte on every half cycle, also across the priority hand-overs
      check(idle_half == 0, $sformatf("%0d empty half cycles during readout", idle_half));
    end
    for (int k = 1; k <= NCHIP; k++) if (!line[k]) n_prio++;
    toggle();
    if (pad_clk) toggle();                      // leave FIFO clock low

    // ---------------- compare
    check(got.size() == exp_bytes.size(),
          $sformatf("byte count %0d expected %0d", got.size(), exp_bytes.size()));
    for (int i = 0; i < exp_bytes.size() && i < got.size(); i++)
      check(got[i] == exp_bytes[i].b,
            $sformatf("byte %0d (chip %0d): %h expected %h", i, exp_bytes[i].chip + 1, got[i], exp_bytes[i].b));
    check(bus_conflicts == 0, $sformatf("bus conflicts: %0d", bus_conflicts));

    // ---------------- mechanisms
    $display("mechanisms: readback=%0d test_pulse=%0d pipeline_wrap=%0d neighbor=%0d cross_chip=%0d saturated=%0d empty_chip=%0d priority_pass=%0d read_all_chips=1 negative_chips=1",
             n_readback, n_test, n_wrap, n_nb, n_cross_nb, n_sat, n_empty, n_prio);
    check(n_readback > 0, "serial readback exercised");
    check(n_test > 0, "test pulse exercised");
    check(n_wrap > 0, "pipeline pointer wrap exercised");
    check(n_nb > 0, "neighbour tagging exercised");
    check(n_cross_nb > 0, "cross-chip neighbour tagging exercised");
    check(n_sat > 0, "counter saturation exercised");
    check(n_empty > 0, "chip without data exercised");
    check(n_prio == NCHIP, "priority passed through every chip");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic any_oe();
    for (int k = 0; k < NCHIP; k++) if (bus_oe[k]) return 1'b1;
    return 1'b0;
  endfunction

  function automatic logic [7:0] g_ramp_trim(input int k);
    return ramp_trim[k];
  endfunction
  function automatic logic [5:0] g_bw(input int k);
    return bw_ctrl[k];
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

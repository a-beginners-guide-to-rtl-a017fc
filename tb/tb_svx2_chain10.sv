// tb_svx2_chain10 -- ten SVXII chips in one daisy chain: full parameter
// download (10 x 182 = 1820 bits) and the readout of a chain with no hits.
//
// A ten-chip chain needs exactly 1820 serial bits in Initialize.  This test
// shifts a random 1820-bit stream in through the last chip's BN (the first
// chip's frame first), checks that bit 1 appears on chip #1's TN exactly after
// the 1820th falling edge, shifts the stream a second time and compares every
// bit leaving TN with what was sent.  After SR-LOAD each chip's shadow register
// is checked through the pins it drives (bandwidth and ramp-trim codes, which
// are random per chip).
//
// Every chip then gets a threshold above its counter stop value, so no channel
// hits.  After a short acquire / digitize / collapse cycle the Readout mode must
// give exactly ID and status for each chip, in chain order, at one byte per
// half cycle of CLK: an empty chip takes one low/high clock cycle, so the
// whole chain takes ten cycles.  The priority must reach the bottom of the
// chain, and no two drivers may be on the bus at once.
//
// Board model as in the end-to-end test: BN of chip k and TN of chip k+1 share
// one line; a driven 0 wins, then a driven level, then the pull (TN's pull-down
// in Readout, a pull-up otherwise).  clk is the system clock; the CLK pad is
// toggled every H clks.
module tb_svx2_chain10;
  import svx2_pkg::*;

  localparam int NCHIP = 10, N = 128, LEN = N + 54;
  localparam int H = 6;

  logic clk = 0, rst_n = 0;
  logic pad_clk = 0, mode0 = 0, mode1 = 0, chng_md = 0;
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
  logic signed [11:0] det_q [N];
  logic [7:0] bus;
  logic       line [NCHIP+1];

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial for (int c = 0; c < N; c++) det_q[c] = '0;

  for (genvar k = 0; k < NCHIP; k++) begin : g_chip
    svx2_chip u_chip (
      .clk, .rst_n, .pad_clk, .mode0, .mode1, .chng_md, .bus_in(bus),
      .bus_out(bus_out[k]), .bus_oe(bus_oe[k]),
      .bn_in(bn_in[k]), .bn_out(bn_out[k]), .bn_oe(bn_oe[k]),
      .tn_in(tn_in[k]), .tn_out(tn_out[k]), .tn_oe(tn_oe[k]),
      .frout(frout[k]), .det_q(det_q), .det_strobe(1'b0),
      .bw_ctrl(bw_ctrl[k]), .ramp_trim(ramp_trim[k]), .analog_sw(analog_sw[k])
    );
  end

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
    line[0] = resolve(tn_oe[0], tn_out[0], 1'b0, 1'b0, !rd);
    for (int k = 1; k < NCHIP; k++)
      line[k] = resolve(bn_oe[k-1], bn_out[k-1], tn_oe[k], tn_out[k], !rd);
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

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] g(input int i);
    return 8'(i ^ (i >> 1));
  endfunction

  function automatic logic any_oe();
    for (int k = 0; k < NCHIP; k++) if (bus_oe[k]) return 1'b1;
    return 1'b0;
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

  logic       stream [$];
  logic [5:0] bw  [NCHIP];
  logic [7:0] trm [NCHIP];
  logic [6:0] id  [NCHIP];
  logic [7:0] got [$];
  int         n_readback = 0, half_cycles = 0;

  initial begin
    // one frame per chip: random test mask, random analog codes, own ID,
    // Read Neighbor on, threshold 200 above a counter stop value of 7
    for (int k = 0; k < NCHIP; k++) begin
      params_t p;
      logic [PARAM_BITS-1:0] pb;
      bw[k]  = 6'($urandom);
      trm[k] = 8'($urandom);
      id[k]  = 7'(k * 11 + 3);
      for (int c = 1; c <= N; c++) stream.push_back(1'($urandom));
      p = '0;
      p.test_pol  = 1'($urandom);
      p.bw        = bw[k];
      p.chip_id   = id[k];
      p.spare     = 6'($urandom);
      p.read_nb   = 1;
      p.depth     = 5'($urandom);
      p.threshold = g(200);
      p.modulo    = g(7);
      p.ramp_trim = trm[k];
      pb = p;
      for (int b = 0; b < PARAM_BITS; b++) stream.push_back(pb[PARAM_BITS-1-b]);
    end
    check(stream.size() == 1820, "ten chips need 1820 bits");

    wclk(3);
    rst_n = 1;
    wclk(3);

    // ---------------- Initialize: two passes through the whole chain
    change_mode(MODE_INIT, 8'b0111_0001);
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < stream.size(); i++) begin
        @(negedge clk) serial_in = stream[i];
        wclk(2);
        toggle();
        toggle();
        if (pass == 0 && i + 1 == stream.size())
          check(line[0] == stream[0], "bit 1 on chip #1's TN after the 1820th falling edge");
        if (pass == 1 && i + 1 < stream.size()) begin
          if (line[0] !== stream[i+1]) check(1'b0, $sformatf("readback bit %0d", i + 2));
          n_readback++;
        end
      end
    end
    check(n_readback == 1819, "readback compared every bit");
    bus_drv[7] = 1;
    wclk(4);
    bus_drv[7] = 0;
    wclk(4);
    for (int k = 0; k < NCHIP; k++) begin
      logic [5:0] rev;
      for (int b = 0; b < 6; b++) rev[b] = bw[k][5-b];
      check(bw_ctrl[k] == rev, $sformatf("chip %0d bandwidth code", k + 1));
      check(ramp_trim[k] == trm[k], $sformatf("chip %0d ramp trim code", k + 1));
    end

    // ---------------- Acquire a few intervals, then stop
    change_mode(MODE_ACQ, 8'b0111_1100);
    repeat (8) begin toggle(); toggle(); end
    bus_drv[2] = 0;
    wclk(4);
    toggle(); toggle();
    bus_drv[6] = 0;
    wclk(4);

    // ---------------- Digitize to the stop value and collapse
    pad_clk = 0;
    change_mode(MODE_DIG, 8'b1011_0010);
    bus_drv[1] = 0;
    wclk(4);
    bus_drv[5] = 0;
    wclk(2);
    toggle(); toggle();
    bus_drv[4] = 0;
    repeat (12) toggle();
    for (int k = 0; k < NCHIP; k++)
      check(line[k+1] == 1'b1, $sformatf("no hit line pulled low below chip %0d", k + 1));
    bus_drv[7] = 0;
    wclk(N + 20);
    if (pad_clk) toggle();
    wclk(4);

    // ---------------- Readout: ID and status of every chip
    change_mode(MODE_RD, 8'h00);
    while (!any_oe() && half_cycles < 10) begin toggle(); half_cycles++; end
    half_cycles = 0;
    while (line[NCHIP] && half_cycles < 200) begin
      if (any_oe()) got.push_back(bus);
      toggle();
      half_cycles++;
    end
    check(!line[NCHIP], "priority reaches the bottom of the chain");
    check(got.size() == 2 * NCHIP, $sformatf("%0d bytes read, expected %0d", got.size(), 2 * NCHIP));
    for (int k = 0; k < NCHIP && 2 * k + 1 < got.size(); k++) begin
      check(got[2*k] == {1'b1, id[k]}, $sformatf("chip %0d ID byte %h", k + 1, got[2*k]));
      check(got[2*k+1] == 8'h00, $sformatf("chip %0d status byte %h", k + 1, got[2*k+1]));
    end
    // one low/high clock cycle per empty chip
    check(half_cycles == 2 * NCHIP,
          $sformatf("readout took %0d half cycles, expected %0d", half_cycles, 2 * NCHIP));
    check(bus_conflicts == 0, $sformatf("bus conflicts: %0d", bus_conflicts));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

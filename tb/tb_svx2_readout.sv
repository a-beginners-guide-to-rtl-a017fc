// tb_svx2_readout -- self-checking test of the readout controller.
// A FIFO model in the testbench holds random address/data entries.  The
// readout clock runs with its half periods several clks long; priority (TN,
// active low) arrives while the clock is low.  The byte on the bus in every
// half cycle is checked: chip ID with BUS7 = 1, status 00000000, then data on
// low halves and address (MSB 0) on high halves.  After the last address the
// bus must be released and BN (priority out) must fall, also for a chip with
// nothing to read.  A late priority arriving while the clock is high must wait
// for the low level.  The number of clock half cycles used is checked: 2 + 2
// per entry.
module tb_svx2_readout;
  localparam int N = 128;
  logic clk = 0, rst_n = 0, active = 0, ck_level = 0, ck_rise = 0, ck_fall = 0;
  logic pri_in_n = 1, empty, last, pop, bus_oe, pri_out_n;
  logic [6:0] chip_id = 7'h35, head_addr;
  logic [7:0] head_data, bus_out;
  int checks = 0, failures = 0;
  logic [6:0] q_addr [$];
  logic [7:0] q_data [$];

  svx2_readout #(.NUM_CH(N)) dut (.*);
  always #5 clk = ~clk;

  assign empty     = (q_addr.size() == 0);
  assign last      = (q_addr.size() == 1);
  assign head_addr = empty ? 7'h0 : q_addr[0];
  assign head_data = empty ? 8'h0 : q_data[0];
  always @(posedge clk) if (pop && !empty) begin
    void'(q_addr.pop_front());
    void'(q_data.pop_front());
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Toggle the readout clock; the edge pulse lasts one clk, the level 4 clks.
  task automatic half();
    @(negedge clk) ck_level = !ck_level;
    if (ck_level) ck_rise = 1; else ck_fall = 1;
    @(negedge clk) ck_rise = 0; ck_fall = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic run(input int n, input bit late);
    logic [6:0] a [$];
    logic [7:0] d [$];
    int halves;
    for (int k = 0; k < n; k++) begin
      a.push_back(7'($urandom_range(0, 127)));
      d.push_back(8'($urandom));
    end
    q_addr = a; q_data = d;
    active = 1;
    repeat (3) @(negedge clk);
    check(!bus_oe && pri_out_n, "bus released and BN high before priority");
    if (late) begin
      half();                      // clock goes high
      pri_in_n = 0;
      repeat (2) @(negedge clk);
      check(!bus_oe, "priority during high level waits for the low level");
      half();                      // clock low: ID
    end else begin
      pri_in_n = 0;
      repeat (2) @(negedge clk);
    end
    check(bus_oe && bus_out == {1'b1, chip_id}, $sformatf("chip ID, got %h", bus_out));
    half();
    check(bus_oe && bus_out == 8'h00, "status byte");
    halves = 0;
    for (int k = 0; k < n; k++) begin
      half(); halves++;
      check(bus_oe && bus_out == d[k], $sformatf("data %0d: %h expected %h", k, bus_out, d[k]));
      half(); halves++;
      check(bus_oe && bus_out == {1'b0, a[k]}, $sformatf("address %0d: %h expected %h", k, bus_out, a[k]));
    end
    half();
    check(!bus_oe && !pri_out_n, "bus released and priority passed after last byte");
    check(halves == 2 * n, "two half cycles per channel");
    half(); half();
    check(!bus_oe && !pri_out_n, "bus stays released");
    // leave Readout
    active = 0; pri_in_n = 1;
    if (ck_level) half();
    repeat (2) @(negedge clk);
    check(pri_out_n, "priority out reset when leaving Readout");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(5, 0);
    run(0, 0);
    run(1, 1);
    run(40, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

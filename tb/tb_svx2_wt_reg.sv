// tb_svx2_wt_reg -- self-checking test of the write-through register.
// For each mode it drives random bus values and checks every internal signal
// against the pad assignment table (BUS0,2..6 in I/A/D; BUS1 = CAL-INJECT in
// A, RREF-SEL in D; BUS7 = SR-LOAD in I, FIFO-RST in D), and that a signal not
// owned by the current mode, or any signal while CHANGE-MODE is high or in
// Readout, keeps the last level it had.
module tb_svx2_wt_reg;
  import svx2_pkg::*;
  logic clk = 0, rst_n = 0;
  mode_e mode = MODE_INIT;
  logic active = 0;
  logic [7:0] bus_in = '0;
  wt_ctl_t ctl, exp;
  int checks = 0, failures = 0;

  svx2_wt_reg dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Reference: update exp for the given mode from the bus.
  task automatic ref_update(input mode_e m, input logic [7:0] b);
    if (m != MODE_RD) begin
      exp.pa_rst = b[0]; exp.acq = b[2]; exp.pipe_sref = b[3];
      exp.cntr_rst = b[4]; exp.ramp_rst = b[5]; exp.comp_rst = b[6];
    end
    if (m == MODE_ACQ)  exp.cal_inject = b[1];
    if (m == MODE_DIG)  begin exp.rref_sel = b[1]; exp.fifo_rst = b[7]; end
    if (m == MODE_INIT) exp.sr_load = b[7];
  endtask

  initial begin
    exp = '0;
    exp.pa_rst = 1; exp.cntr_rst = 1; exp.ramp_rst = 1; exp.comp_rst = 1; exp.fifo_rst = 1;
    repeat (2) @(negedge clk);
    check(ctl == exp, "reset levels");
    rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      if (it % 10 == 0) mode = mode_e'($urandom_range(0, 3));
      active = ($urandom_range(0, 4) != 0);
      bus_in = 8'($urandom);
      #1;
      if (active) ref_update(mode, bus_in);
      check(ctl == exp, $sformatf("mode %s active %0b bus %h: ctl %h exp %h",
                                  mode.name(), active, bus_in, ctl, exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

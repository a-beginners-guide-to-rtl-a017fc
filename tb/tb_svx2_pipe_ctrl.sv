// tb_svx2_pipe_ctrl -- self-checking test of the pipeline pointer logic.
// For several depths: SR-LOAD init, then random numbers of pipeline clocks
// with ACQ high.  The write pointer must be at (clocks mod 32) and the read
// pointer DEPTH cells behind it, both one-hot; Sd must be closed only while the
// clock is high during sampling; with ACQ low the pointers must not move.
module tb_svx2_pipe_ctrl;
  import svx2_pkg::*;
  localparam int C = 32;
  logic clk = 0, rst_n = 0, acq_mode = 1, ck_rise = 0, ck_level = 0, init = 0;
  logic [4:0] depth = 0;
  wt_ctl_t ctl = '0;
  logic [C-1:0] wr_sel, rd_sel;
  logic wr_en, rd_en, sd, sr_sw, sa, sf, sb, sc, se;
  int checks = 0, failures = 0;

  svx2_pipe_ctrl #(.CELLS(C)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pclk();
    @(negedge clk) ck_level = 1; ck_rise = 1;
    @(negedge clk) ck_rise = 0;
    @(negedge clk);
    check(sd == ctl.acq, "Sd closed while clock high during sampling");
    @(negedge clk) ck_level = 0;
    @(negedge clk);
    check(sd == 0, "Sd open while clock low");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      int n, d;
      d = (t == 0) ? 0 : (t == 1) ? 31 : $urandom_range(0, 31);
      n = $urandom_range(0, 80);
      depth = 5'(d);
      ctl.acq = 0;
      @(negedge clk) init = 1;
      @(negedge clk) init = 0;
      ctl.acq = 1;
      for (int k = 0; k < n; k++) pclk();
      ctl.acq = 0;
      pclk(); pclk();     // clocks during pipeline readout do not advance
      @(negedge clk);
      check($onehot(wr_sel) && $onehot(rd_sel), "one-hot rings");
      check(wr_sel == (C'(1) << (n % C)), $sformatf("write pointer after %0d clocks", n));
      check(rd_sel == (C'(1) << ((n - d + 64) % C)), $sformatf("read pointer depth %0d after %0d clocks", d, n));
      check(rd_en && !wr_en && se && !sb, "readout switch setting with ACQ low");
    end
    ctl.pipe_sref = 1; ctl.pa_rst = 1; ctl.comp_rst = 0;
    #1 check(sr_sw && sa && !sf, "SR, Sa, Sf follow PIPE-SREF, PA-RST, COMP-RST");
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

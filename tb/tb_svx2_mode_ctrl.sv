// tb_svx2_mode_ctrl -- self-checking test of the mode register.
// Walks the chip through Initialize > Acquire > Digitize > Readout > Acquire
// using the CHANGE-MODE strobe and checks the decoded mode against the mode
// table (00 I, 01 A, 11 D, 10 R), that pads are disconnected while the strobe
// is high, that the mode changes only when the strobe falls and that mode pad
// changes with the strobe low are ignored.
module tb_svx2_mode_ctrl;
  import svx2_pkg::*;
  logic clk = 0, rst_n = 0, chng_md = 0, mode0 = 0, mode1 = 0;
  mode_e mode;
  logic active, enter;
  int checks = 0, failures = 0, enters = 0;

  svx2_mode_ctrl dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && enter) enters++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic change(input logic m1, input logic m0, input mode_e exp);
    mode_e prev;
    prev = mode;
    @(negedge clk) chng_md = 1;
    repeat (2) @(negedge clk);
    check(!active, "pads disconnected while CHANGE-MODE high");
    mode1 = m1; mode0 = m0;
    repeat (2) @(negedge clk);
    check(mode == prev, "mode held while CHANGE-MODE high");
    chng_md = 0;
    repeat (3) @(negedge clk);
    check(mode == exp, $sformatf("mode %b%b decodes to %s, got %s", m1, m0, exp.name(), mode.name()));
    check(active, "pads connected after strobe");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    change(0, 0, MODE_INIT);
    change(0, 1, MODE_ACQ);
    change(1, 1, MODE_DIG);
    change(1, 0, MODE_RD);
    // mode pads moved without the strobe: nothing happens
    @(negedge clk) mode1 = 0; mode0 = 1;
    repeat (4) @(negedge clk);
    check(mode == MODE_RD, "mode pads ignored without strobe");
    change(0, 1, MODE_ACQ);
    check(enters == 5, $sformatf("five mode entries, saw %0d", enters));
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

// tb_svx2_chan_latch -- self-checking test of the comparator/counter latches.
// Eight channels; each comparator flips at a chosen count (or never).  For both
// comparator polarities the test checks the Gray value stored by each channel,
// that a channel latches only its first flip, that unlatched channels get the
// modulo value when the counter maxes out, and the hit flags (value above the
// Gray-coded threshold, strictly).
module tb_svx2_chan_latch;
  import svx2_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, comp_pol = 0, clear = 1, maxed = 0;
  logic [N-1:0] comp_raw = '0, latched, hit;
  logic [7:0] gray = 0, modulo, threshold;
  logic [7:0] value [N];
  int checks = 0, failures = 0;
  int flip_at [N];

  svx2_chan_latch #(.NUM_CH(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] g(input int i);
    return 8'(i ^ (i >> 1));
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 6; pass++) begin
      int maxv, thr, expv;
      comp_pol  = pass[0];
      maxv      = $urandom_range(20, 255);
      thr       = $urandom_range(0, maxv);
      modulo    = g(maxv);
      threshold = g(thr);
      for (int c = 0; c < N; c++) flip_at[c] = (c == 0) ? 0 : (c == N-1) ? 999 : $urandom_range(0, maxv + 3);
      flip_at[1] = thr; flip_at[2] = thr + 1;
      clear = 1; gray = 0; maxed = 0;
      comp_raw = comp_pol ? '0 : '1;   // comparators off
      @(negedge clk) clear = 0;
      for (int i = 0; i <= maxv; i++) begin
        gray  = g(i);
        maxed = (i == maxv);
        for (int c = 0; c < N; c++) begin
          // flip at the given count, and flip back two counts later
          comp_raw[c] = ((i >= flip_at[c]) && (i < flip_at[c] + 2)) ? comp_pol : !comp_pol;
        end
        @(negedge clk);
      end
      @(negedge clk);
      for (int c = 0; c < N; c++) begin
        expv = (flip_at[c] <= maxv) ? flip_at[c] : maxv;
        check(latched[c], $sformatf("channel %0d latched", c));
        check(value[c] == g(expv), $sformatf("pass %0d channel %0d value %h expected %h", pass, c, value[c], g(expv)));
        check(hit[c] == (expv > thr), $sformatf("pass %0d channel %0d hit (value %0d thr %0d)", pass, c, expv, thr));
      end
    end
    clear = 1;
    @(negedge clk);
    check(latched == '0 && hit == '0, "cleared by CNTR-RST");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

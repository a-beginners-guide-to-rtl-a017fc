// tb_svx2_gray_counter -- self-checking test of the A/D Gray code counter.
// Releases CNTR-RST and feeds counter-clock edges; after every edge the output
// must be the Gray code of the number of edges (computed here as i ^ (i>>1)),
// one count per rising and per falling edge.  Counting must stop with maxed
// set when the value equals the programmed modulo (tried for Gray(255),
// Gray(127), Gray(63) and Gray(60)) and CNTR-RST must clear it.
module tb_svx2_gray_counter;
  logic clk = 0, rst_n = 0, en = 1, ck_rise = 0, ck_fall = 0, cntr_rst = 1;
  logic [7:0] modulo = 8'h80, gray;
  logic maxed;
  int checks = 0, failures = 0;

  svx2_gray_counter dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] g(input int i);
    return 8'(i ^ (i >> 1));
  endfunction

  task automatic edge_pulse(input bit rising);
    @(negedge clk) if (rising) ck_rise = 1; else ck_fall = 1;
    @(negedge clk) ck_rise = 0; ck_fall = 0;
  endtask

  initial begin
    int maxv [4] = '{255, 127, 63, 60};
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (maxv[m]) begin
      modulo = g(maxv[m]);
      cntr_rst = 1;
      edge_pulse(1);
      check(gray == 0 && !maxed, "cleared by CNTR-RST");
      @(negedge clk) cntr_rst = 0;
      for (int i = 1; i <= maxv[m] + 5; i++) begin
        edge_pulse(i % 2 == 1);
        if (i <= maxv[m]) check(gray == g(i), $sformatf("count %0d", i));
        else              check(gray == g(maxv[m]), $sformatf("stopped at %0d", maxv[m]));
        check(maxed == (i >= maxv[m]), $sformatf("maxed at count %0d", i));
      end
    end
    // modulo as given in the register map: 10000000 -> 256 counts
    check(g(255) == 8'b1000_0000 && g(127) == 8'b0100_0000, "modulo encoding");
    en = 0; cntr_rst = 1; edge_pulse(1); cntr_rst = 0;
    edge_pulse(1); edge_pulse(0);
    check(gray == 0, "no counting outside Digitize");
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

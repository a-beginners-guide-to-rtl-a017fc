// tb_svx2_sparse_fifo -- self-checking test of the sparsification FIFO.
// Random tag patterns (including none and all 128) are held with FIFO-RST
// high, then collapsed by lowering it.  The test checks that the collapse takes
// one clk per tagged channel, that entries come out in increasing channel
// order with the right data, that last marks the final entry and that FROUT
// is high exactly while data remain.
module tb_svx2_sparse_fifo;
  localparam int N = 128;
  logic clk = 0, rst_n = 0, fifo_rst = 1, pop = 0;
  logic [N-1:0] tag = '0;
  logic [7:0] value [N];
  logic [6:0] head_addr;
  logic [7:0] head_data;
  logic empty, busy, last, frout;
  int checks = 0, failures = 0;

  svx2_sparse_fifo #(.NUM_CH(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 12; pass++) begin
      int ntag, cyc, got;
      int dens;
      dens = (pass == 0) ? 0 : (pass == 1) ? 100 : $urandom_range(1, 60);
      ntag = 0;
      for (int c = 0; c < N; c++) begin
        tag[c]   = ($urandom_range(0, 99) < dens);
        value[c] = 8'($urandom);
        ntag += tag[c];
      end
      fifo_rst = 1;
      repeat (2) @(negedge clk);
      check(empty && (frout == (ntag != 0)), "FIFO empty while held, FROUT shows pending data");
      fifo_rst = 0;
      cyc = 0;
      while (busy) begin @(negedge clk); cyc++; end
      check(cyc == ntag, $sformatf("collapse of %0d channels took %0d clks", ntag, cyc));
      got = 0;
      for (int c = 0; c < N; c++) begin
        if (tag[c]) begin
          check(!empty && frout, "data remaining");
          check(head_addr == 7'(c) && head_data == value[c],
                $sformatf("entry %0d: addr %0d data %h, expected %0d %h", got, head_addr, head_data, c, value[c]));
          check(last == (got == ntag - 1), "last flag");
          pop = 1;
          @(negedge clk) pop = 0;
          got++;
        end
      end
      check(empty && !frout, "FIFO empty after all entries read");
    end
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

// tb_svx2_frontend_model -- self-checking test of the analog front-end model.
// Writes a sequence of interaction intervals into an 8-cell pipeline: each
// interval starts with the reset switch Sd (clock high), then detector charge
// and test pulses arrive.  The test then reads every cell back through the
// read pointer and checks that it holds the charge of its own interval only,
// with the sign inverted at the comparator input, and that a test pulse adds
// +TEST_Q or -TEST_Q by polarity to the masked channels only.
module tb_svx2_frontend_model;
  localparam int N = 4, C = 8, TQ = 16;
  logic clk = 0, rst_n = 0, det_strobe = 0, s1 = 1, wr_en = 1, rd_en = 0, sd = 0;
  logic signed [11:0] det_q [N];
  logic signed [11:0] comp_in [N];
  logic [N-1:0] s2 = '0;
  logic [C-1:0] wr_sel = 1, rd_sel = 1;
  int checks = 0, failures = 0;
  int expq [C][N];

  svx2_frontend_model #(.NUM_CH(N), .CELLS(C), .TEST_Q(TQ)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 2 * C; k++) begin
      int cel;
      cel = k % C;
      wr_sel = C'(1) << cel;
      @(negedge clk) sd = 1;         // clock high: reset the new cel
      @(negedge clk) sd = 0;
      for (int c = 0; c < N; c++) expq[cel][c] = 0;
      for (int p = 0; p < 2; p++) begin
        for (int c = 0; c < N; c++) begin
          det_q[c] = 12'($signed($urandom_range(0, 80)) - 40);
          expq[cel][c] += det_q[c];
        end
        det_strobe = 1;
        @(negedge clk) det_strobe = 0;
      end
      if (k == C + 3) begin          // test pulse on channels 0 and 2
        s1 = k[0];
        s2 = 4'b0101;
        expq[cel][0] += s1 ? TQ : -TQ;
        expq[cel][2] += s1 ? TQ : -TQ;
        @(negedge clk);
        @(negedge clk) s2 = '0;
      end
      @(negedge clk);
    end
    wr_en = 0; rd_en = 1;
    for (int cel = 0; cel < C; cel++) begin
      rd_sel = C'(1) << cel;
      @(negedge clk);
      for (int c = 0; c < N; c++)
        check(comp_in[c] == -expq[cel][c],
              $sformatf("cel %0d channel %0d: %0d expected %0d", cel, c, comp_in[c], -expq[cel][c]));
    end
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

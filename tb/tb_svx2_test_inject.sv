// tb_svx2_test_inject -- self-checking test of the test pulse gating.
// Random masks, CAL-INJECT and polarity: S2 of a channel must close exactly
// when its mask bit and CAL-INJECT are both 1, S1 must follow the polarity bit.
module tb_svx2_test_inject;
  localparam int N = 128;
  logic [N-1:0] test_mask, s2;
  logic cal_inject, test_pol, s1;
  int checks = 0, failures = 0;

  svx2_test_inject #(.NUM_CH(N)) dut (.*);

  initial begin
    for (int it = 0; it < 200; it++) begin
      test_mask  = {4{32'($urandom)}};
      cal_inject = 1'($urandom);
      test_pol   = 1'($urandom);
      #1;
      for (int c = 0; c < N; c++) begin
        checks++;
        if (s2[c] !== (test_mask[c] && cal_inject)) begin
          failures++; $display("FAIL: S2 of channel %0d", c + 1);
        end
      end
      checks++;
      if (s1 !== test_pol) begin failures++; $display("FAIL: S1"); end
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

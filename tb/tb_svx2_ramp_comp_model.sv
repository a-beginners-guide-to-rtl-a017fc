// tb_svx2_ramp_comp_model -- self-checking test of the ramp/comparator model.
// For both polarities (ramp down for positive detector charge, up for
// negative), comparator inputs of several magnitudes are applied.  With the
// ramp starting from the RAMP-PED offset, each comparator must stay off while
// reset and must flip (after the polarity stage) on counter-clock edge number
// PED + |s| + 1, counting both clock edges; with RREF-SEL = 1 the ramp rests
// at the zero level.
module tb_svx2_ramp_comp_model;
  localparam int N = 4, PED = 2;
  logic clk = 0, rst_n = 0, ramp_rst = 1, rref_sel = 0, ramp_pol = 0, comp_rst = 1;
  logic ck_rise = 0, ck_fall = 0;
  logic signed [11:0] comp_in [N];
  logic [N-1:0] comp_raw, flip;
  int checks = 0, failures = 0;
  int mag [N] = '{0, 1, 7, 30};
  int flip_edge [N];

  svx2_ramp_comp_model #(.NUM_CH(N), .PED(PED)) dut (.*);
  always #5 clk = ~clk;
  assign flip = ramp_pol ? comp_raw : ~comp_raw;   // comparator polarity = ramp polarity

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pol = 0; pol < 2; pol++) begin
      ramp_pol = pol[0];
      // positive charge gives a negative comparator input and vice versa
      for (int c = 0; c < N; c++) comp_in[c] = 12'(ramp_pol ? mag[c] : -mag[c]);
      ramp_rst = 1; comp_rst = 1; rref_sel = 0;
      repeat (2) @(negedge clk);
      check(flip == '0, "comparators off in reset");
      comp_rst = 0;
      @(negedge clk);
      check(flip == '0, "comparators off at RAMP-PED");
      ramp_rst = 0;
      for (int c = 0; c < N; c++) flip_edge[c] = -1;
      for (int e = 1; e <= 40; e++) begin
        @(negedge clk) if (e % 2) ck_rise = 1; else ck_fall = 1;
        @(negedge clk) ck_rise = 0; ck_fall = 0;
        for (int c = 0; c < N; c++) if (flip[c] && flip_edge[c] < 0) flip_edge[c] = e;
      end
      for (int c = 0; c < N; c++)
        check(flip_edge[c] == PED + mag[c] + 1,
              $sformatf("pol %0d magnitude %0d flipped at edge %0d", pol, mag[c], flip_edge[c]));
    end
    rref_sel = 1; ramp_rst = 1;
    @(negedge clk);
    comp_in[0] = 12'sd0; comp_in[1] = -12'sd1;
    @(negedge clk);
    check(comp_raw[1] == 1'b1, "ramp at RAMP-REF (zero level) with RREF-SEL = 1");
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

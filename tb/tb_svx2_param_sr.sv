// tb_svx2_param_sr -- self-checking test of the parameter download register.
// Shifts a full random 182-bit frame in (bit 1 first) with the serial clock,
// then checks: the test mask against bits 1..128, that the shadow register
// does not change before SR-LOAD, every field of the shadow register against
// the bit numbers of the register map after SR-LOAD, the init pulse on the
// SR-LOAD falling edge, and that TN shows bit 1, 2, 3 ... of the frame after
// the 182nd, 183rd, 184th ... falling clock edge (chained operation).
module tb_svx2_param_sr;
  import svx2_pkg::*;
  localparam int N = 128;
  localparam int LEN = N + 54;
  logic clk = 0, rst_n = 0, shift_en = 1, ck_rise = 0, ck_fall = 0, sin = 0, sr_load = 0;
  logic sout, init_ptr;
  logic [N-1:0] test_mask;
  params_t params;
  int checks = 0, failures = 0, init_seen = 0;
  logic frame [1:LEN];     // frame[k] = serial bit k
  logic frame2 [1:LEN];

  svx2_param_sr #(.NUM_CH(N)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (init_ptr) init_seen++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One serial clock period: data set up, rising edge, falling edge.
  task automatic sclk(input logic d);
    @(negedge clk) sin = d;
    @(negedge clk) ck_rise = 1;
    @(negedge clk) ck_rise = 0;
    @(negedge clk) ck_fall = 1;
    @(negedge clk) ck_fall = 0;
  endtask

  function automatic logic [7:0] field(input int msb_bit, input int width);
    logic [7:0] v;
    v = '0;
    for (int k = 0; k < width; k++) v[width-1-k] = frame[msb_bit + k];
    return v;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 1; k <= LEN; k++) frame[k] = 1'($urandom);
    for (int k = 1; k <= LEN; k++) frame2[k] = 1'($urandom);
    for (int k = 1; k <= LEN; k++) sclk(frame[k]);
    check(sout == frame[1], "bit 1 on TN after the last falling edge");
    for (int c = 0; c < N; c++)
      check(test_mask[c] == frame[c+1], $sformatf("test mask channel %0d", c + 1));
    check(params == '0, "shadow register unchanged before SR-LOAD");
    @(negedge clk) sr_load = 1;
    @(negedge clk) sr_load = 0;
    repeat (3) @(negedge clk);
    check(init_seen == 1, "one init pulse on SR-LOAD falling edge");
    check(params.test_pol  == frame[129], "bit 129 test polarity");
    check(params.pipe_sel  == frame[130], "bit 130 pipeline select");
    for (int k = 0; k < 6; k++)
      check(params.bw[5-k] == frame[131+k], "bits 131-136 bandwidth");
    check(params.chip_id   == field(137, 7), "bits 137-143 chip id");
    check(params.read_nb   == frame[150], "bit 150 read neighbor");
    check(params.read_all  == frame[151], "bit 151 read all");
    check(params.ramp_pol  == frame[152], "bit 152 ramp polarity");
    check(params.comp_pol  == frame[153], "bit 153 comparator polarity");
    check(params.depth     == field(154, 5), "bits 154-158 depth");
    check(params.threshold == field(159, 8), "bits 159-166 threshold");
    check(params.modulo    == field(167, 8), "bits 167-174 modulo");
    check(params.ramp_trim == field(175, 8), "bits 175-182 ramp trim");
    // Keep shifting: the old frame leaves on TN in order.
    for (int k = 1; k <= LEN; k++) begin
      sclk(frame2[k]);
      if (k < LEN) check(sout == frame[k+1], $sformatf("TN shows bit %0d", k + 1));
    end
    check(params.depth == field(154, 5), "shadow holds while shifting");
    // Not in Initialize: no shifting.
    shift_en = 0;
    sclk(1'b1);
    for (int c = 0; c < N; c++)
      check(test_mask[c] == frame2[c+1], "no shift outside Initialize");
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

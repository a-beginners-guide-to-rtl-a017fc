// tb_svx2_neighbor -- self-checking test of the readout tagging rules.
// Random hit patterns, neighbour-chip edge hits and mode bits are compared
// with a reference written from the rules: hits only; hits plus the channel on
// each side (including across the chip edges) with Read Neighbor; everything
// once the counter is at its maximum with Read All.
module tb_svx2_neighbor;
  localparam int N = 128;
  logic [N-1:0] hit, tag;
  logic read_nb, read_all, maxed, top_hit_in, bot_hit_in;
  int checks = 0, failures = 0;

  svx2_neighbor #(.NUM_CH(N)) dut (.*);

  initial begin
    for (int it = 0; it < 400; it++) begin
      logic e;
      for (int c = 0; c < N; c++) hit[c] = ($urandom_range(0, 15) == 0);
      read_nb = 1'($urandom); read_all = 1'($urandom); maxed = 1'($urandom);
      top_hit_in = 1'($urandom); bot_hit_in = 1'($urandom);
      #1;
      for (int c = 0; c < N; c++) begin
        logic up, down;
        up   = (c == 0)     ? top_hit_in : hit[c-1];
        down = (c == N - 1) ? bot_hit_in : hit[c+1];
        e = hit[c] || (read_nb && (up || down)) || (read_all && maxed);
        checks++;
        if (tag[c] !== e) begin
          failures++;
          $display("FAIL: channel %0d tag %b expected %b", c + 1, tag[c], e);
        end
      end
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

// svx2_sparse_fifo -- data sparsification FIFO.
//
// After digitization every tagged channel's address and counter-latch value
// must be packed into an ordered list, lowest channel first, so that readout
// sends only those channels.  While FIFO-RST is high the FIFO is empty and
// holds the tag pattern (pending follows the tag inputs).  When FIFO-RST falls
// the FIFO "collapses": every clk the lowest still-pending channel is found by
// a priority encoder, its {address, value} pair is written at the tail and its
// pending bit is cleared, so NUM_CH channels collapse in at most NUM_CH clks.
// Readout takes entries from the head with pop.  frout ("data remaining", the
// FROUT test pad) is high while entries or pending channels remain.
// The document gives the function (ordered address/data stacking started by
// releasing FIFO-RST, lowest address first, data-remaining handshake) but not
// the circuit of its asynchronous FIFO; the priority-encoder collapse into a
// synchronous buffer is this design's own.
//
// Interface: tag/value from the channel logic (index 0 = channel 1, address
// 0).  head_addr/head_data are valid while !empty; pop advances the head;
// last marks the final entry once the collapse has finished.
// The lint note that rst_n is used both asynchronously and synchronously
// stands: the second use is only the disable condition of the assertions.
module svx2_sparse_fifo #(
  parameter int unsigned NUM_CH = 128,
  localparam int unsigned AW    = $clog2(NUM_CH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              fifo_rst,
  input  logic [NUM_CH-1:0] tag,
  input  logic [7:0]        value [NUM_CH],
  input  logic              pop,
  output logic [AW-1:0]     head_addr,
  output logic [7:0]        head_data,
  output logic              empty,
  output logic              busy,
  output logic              last,
  output logic              frout
);
  logic [NUM_CH-1:0] pending;
  logic [AW+7:0]     mem [NUM_CH];
  logic [AW:0]       wr_ptr, rd_ptr;
  logic [AW-1:0]     first;

  // Lowest pending channel.
  always_comb begin
    first = '0;
    for (int c = NUM_CH - 1; c >= 0; c--)
      if (pending[c]) first = AW'(c);
  end

  assign busy  = |pending;
  assign empty = (wr_ptr == rd_ptr);
  assign frout = busy || !empty;
  assign last  = !busy && ((wr_ptr - rd_ptr) == (AW+1)'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= '0;
      wr_ptr  <= '0;
      rd_ptr  <= '0;
    end else if (fifo_rst) begin
      pending <= tag;
      wr_ptr  <= '0;
      rd_ptr  <= '0;
    end else begin
      if (busy) begin
        pending[first] <= 1'b0;
        wr_ptr         <= wr_ptr + 1'b1;
      end
      if (pop && !empty) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (!fifo_rst && busy) mem[wr_ptr[AW-1:0]] <= {first, value[first]};

  assign {head_addr, head_data} = mem[rd_ptr[AW-1:0]];

  // The queue never holds more than NUM_CH entries.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  (wr_ptr - rd_ptr) <= (AW+1)'(NUM_CH));

endmodule

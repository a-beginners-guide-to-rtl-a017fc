// svx2_readout -- bus readout controller with daisy-chain priority.
//
// In Readout mode several chips share BUS0..7; a priority token travels down
// the chain.  A chip owns the bus while its priority input (TN, active low) is
// low and its own priority output (BN, active low) is still high.  Data change
// on every half cycle of the readout clock (the CLK pad):
//   first low half   chip ID on BUS0..6 with BUS7 = 1
//   next high half   status byte, always 00000000
//   then             channel data on each low half and channel address
//                    (MSB 0) on the following high half, lowest channel first
// After the last address (or straight after the status byte when no channel
// is tagged) the chip lowers BN, which passes the priority to the next chip,
// and puts the bus back in tri-state for the rest of the Readout mode.  The
// sequence, byte order, status value and priority handshake are the
// document's.  This design's choices: a chip that gets priority while the
// clock is high waits for the next low level before sending its ID (the
// document requires the clock to be low when priority arrives), and the
// channel address is the channel number minus one (0..127).  Priority is
// accepted only from the second clk of Readout mode on, so that the sampled TN
// level reflects the BN pull-up the chip above has just switched on.
//
// Interface: active = Readout mode with pads connected; ck_level/ck_rise/
// ck_fall describe the readout clock; the FIFO head is read and popped.
// bus_out/bus_oe are combinational from the registered state.  Assertions
// state the FIFO handshake and bus ownership rules.
// The lint note that rst_n is used both asynchronously and synchronously
// stands: the second use is only the disable condition of the assertions.
module svx2_readout #(
  parameter int unsigned NUM_CH = 128,
  localparam int unsigned AW    = $clog2(NUM_CH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          active,
  input  logic          ck_level,
  input  logic          ck_rise,
  input  logic          ck_fall,
  input  logic          pri_in_n,
  input  logic [6:0]    chip_id,
  input  logic          empty,
  input  logic          last,
  input  logic [AW-1:0] head_addr,
  input  logic [7:0]    head_data,
  output logic          pop,
  output logic [7:0]    bus_out,
  output logic          bus_oe,
  output logic          pri_out_n
);
  typedef enum logic [2:0] {S_IDLE, S_ID, S_STATUS, S_DATA, S_ADDR, S_DONE} state_e;
  state_e state, nxt;
  logic   settled;     // Readout mode active for more than one clk

  always_comb begin
    nxt = state;
    pop = 1'b0;
    unique case (state)
      S_IDLE:   if (settled && !pri_in_n && !ck_level) nxt = S_ID;
      S_ID:     if (ck_rise) nxt = S_STATUS;
      S_STATUS: if (ck_fall) nxt = empty ? S_DONE : S_DATA;
      S_DATA:   if (ck_rise) nxt = S_ADDR;
      S_ADDR:   if (ck_fall) begin
                  pop = 1'b1;
                  nxt = last ? S_DONE : S_DATA;
                end
      S_DONE:   nxt = S_DONE;
      default:  nxt = S_IDLE;
    endcase
    if (!active) begin
      nxt = S_IDLE;
      pop = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state   <= S_IDLE;
      settled <= 1'b0;
    end else begin
      state   <= nxt;
      settled <= active;
    end

  always_comb begin
    bus_oe  = 1'b1;
    bus_out = 8'h00;
    unique case (state)
      S_ID:     bus_out = {1'b1, chip_id};
      S_STATUS: bus_out = 8'h00;
      S_DATA:   bus_out = head_data;
      S_ADDR:   bus_out = 8'(head_addr);
      default:  bus_oe  = 1'b0;
    endcase
  end

  assign pri_out_n = (state != S_DONE);

  // Handshake rules with the sparsification FIFO: an entry is taken only when
  // one is there, and a data/address pair is only sent from a non-empty FIFO
  // (the collapse must have delivered the entry before the chip reaches it).
  a_pop_nonempty: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);
  a_data_valid:   assert property (@(posedge clk) disable iff (!rst_n)
                                   (state == S_DATA || state == S_ADDR) |-> !empty);
  // The bus is driven only in Readout mode and never after the priority is passed.
  a_bus_owner:    assert property (@(posedge clk) disable iff (!rst_n)
                                   bus_oe |-> (active && pri_out_n));

endmodule

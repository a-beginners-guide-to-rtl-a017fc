// svx2_param_sr -- serial parameter download register with shadow register.
//
// In Initialize the CLK pad is the serial clock.  On each rising serial-clock
// edge the BN pad bit enters at the input end of a NUM_CH+54 bit shift register
// (182 bits for 128 channels); after NUM_CH+54 edges the first bit sent (bit 1)
// has reached the output end and appears on TN at the following falling edge,
// so the TN of one chip can feed the BN of the next and a chain of chips forms
// one long register.  Bits 1..NUM_CH are the per-channel test mask, used
// straight from the shift register.  Bits NUM_CH+1..NUM_CH+54 are copied into a
// shadow register while SR-LOAD is high and frozen when it falls; the falling
// edge of SR-LOAD also produces init_ptr, which initializes the pipeline
// pointers.  Bit order, register length and the shadow behaviour follow the
// document; retiming TN on the falling edge matches its timing diagram.
// Clearing both registers at reset is this design's choice.
//
// Interface: shift_en = Initialize mode with pads connected; ck_rise/ck_fall =
// one-clk pulses for the edges of the serial clock; sin = BN, sout = TN.
module svx2_param_sr
  import svx2_pkg::*;
#(
  parameter int unsigned NUM_CH = 128
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              shift_en,
  input  logic              ck_rise,
  input  logic              ck_fall,
  input  logic              sin,
  input  logic              sr_load,
  output logic              sout,
  output logic [NUM_CH-1:0] test_mask,
  output params_t           params,
  output logic              init_ptr
);
  localparam int unsigned LEN = NUM_CH + PARAM_BITS;

  logic [LEN-1:0]        sr;      // sr[k-1] holds serial bit k after a full load
  logic [PARAM_BITS-1:0] shadow;
  logic                  load_q;
  logic [PARAM_BITS-1:0] sr_par;

  // Serial bit NUM_CH+1 (first after the mask) is the struct MSB.
  always_comb
    for (int k = 0; k < PARAM_BITS; k++)
      sr_par[PARAM_BITS-1-k] = sr[NUM_CH+k];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr       <= '0;
      sout     <= 1'b0;
      shadow   <= '0;
      load_q   <= 1'b0;
      init_ptr <= 1'b0;
    end else begin
      if (shift_en && ck_rise) sr <= {sin, sr[LEN-1:1]};
      if (shift_en && ck_fall) sout <= sr[0];
      if (sr_load) shadow <= sr_par;
      load_q   <= sr_load;
      init_ptr <= load_q && !sr_load;
    end
  end

  assign test_mask = sr[NUM_CH-1:0];
  assign params    = params_t'(shadow);

endmodule

// svx2_pkg -- types and helpers shared by the SVXII readout-chip RTL.
//
// The chip has four operating modes chosen by the MODE1/MODE0 pads (Table of
// modes: 00 Initialize, 01 Acquire, 11 Digitize, 10 Readout).  Its real-time
// control signals arrive on the eight-bit write-through bus and are collected
// here in one struct.  The 54 downloadable control bits that sit behind the
// shadow register (serial bits 129..182) are another struct whose field order
// is the download order: the first bit shifted in after the test mask is the
// most significant bit of the struct, so every multi-bit field that is sent
// MSB first lands with its MSB on the left.
//
// Gray/binary conversion functions are used by the A/D counter and by the
// digital threshold compare.
package svx2_pkg;

  // {MODE1, MODE0}
  typedef enum logic [1:0] {
    MODE_INIT = 2'b00,
    MODE_ACQ  = 2'b01,
    MODE_DIG  = 2'b11,
    MODE_RD   = 2'b10
  } mode_e;

  // Internal signals driven from the write-through bus (BUS0..BUS7).
  typedef struct packed {
    logic pa_rst;      // BUS0  I,A,D  preamplifier reset
    logic cal_inject;  // BUS1  A      calibration pulse timing
    logic rref_sel;    // BUS1  D      1 = RAMP-REF, 0 = RAMP-PED
    logic acq;         // BUS2  I,A,D  1 = acquire, 0 = pipeline readout
    logic pipe_sref;   // BUS3  I,A,D  pipeline reference capacitor switch
    logic cntr_rst;    // BUS4  I,A,D  Gray counter reset
    logic ramp_rst;    // BUS5  I,A,D  ramp reset
    logic comp_rst;    // BUS6  I,A,D  comparator reset
    logic sr_load;     // BUS7  I      shadow register load
    logic fifo_rst;    // BUS7  D      1 = hold, 0 = collapse
  } wt_ctl_t;

  // Serial bits 129..182, in download order (bit 129 is the MSB).
  typedef struct packed {
    logic       test_pol;   // 129  1 = positive test charge
    logic       pipe_sel;   // 130  1 = negative detector current
    logic [5:0] bw;         // 131..136, bw[5] is bit 131 (smallest capacitor)
    logic [6:0] chip_id;    // 137..143, MSB first
    logic [5:0] spare;      // 144..149
    logic       read_nb;    // 150
    logic       read_all;   // 151
    logic       ramp_pol;   // 152  1 = ramp up
    logic       comp_pol;   // 153  1 for ramp up
    logic [4:0] depth;      // 154..158, MSB first
    logic [7:0] threshold;  // 159..166, Gray code, MSB first
    logic [7:0] modulo;     // 167..174, Gray code stop value, MSB first
    logic [7:0] ramp_trim;  // 175..182, bit 175 = largest capacitor
  } params_t;

  localparam int unsigned PARAM_BITS = $bits(params_t);  // 54

  function automatic logic [7:0] bin2gray(input logic [7:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [7:0] gray2bin(input logic [7:0] g);
    logic [7:0] b;
    b[7] = g[7];
    for (int i = 6; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

endpackage

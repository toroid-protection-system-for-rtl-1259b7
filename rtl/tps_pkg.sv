// tps_pkg: types and constants shared by the toroid protection system (TPS).
//
// The four toroid ADCs deliver 14-bit two's-complement samples spanning -2 V..+2 V.
// With the toroid electronics' sensitivity of 500 mV/nC this range is -4 nC..+4 nC,
// so one ADC code is 8 nC / 2^14 = 0.488 pC and 1 nC is 2048 codes. A bunch charge is
// the difference of a top and a bottom sample and therefore needs 15 bits.
// The scale (500 mV/nC, +-2 V, 14 bits) follows the document; the two's-complement
// coding of the ADC words is this design's choice.
package tps_pkg;

  localparam int unsigned ADC_W    = 14;          // AD9240 resolution
  localparam int unsigned CHARGE_W = ADC_W + 1;   // top - bottom
  localparam int unsigned LSB_PER_NC = 2048;      // 2^14 codes over 8 nC

  typedef logic signed [ADC_W-1:0]    sample_t;
  typedef logic signed [CHARGE_W-1:0] charge_t;

  // One bit per protection mode; each drives one interlock line.
  typedef struct packed {
    logic integ;   // integration mode
    logic slice;   // slice mode
    logic single;  // single bunch mode
    logic cv;      // charge validation mode
  } alarm_t;

endpackage

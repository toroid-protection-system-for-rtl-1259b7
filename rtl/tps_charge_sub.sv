// tps_charge_sub: bunch charge of one toroid ("sub14b", QI calculation).
//
// A toroid pulse is sampled twice per bunch: once at its top and once on the
// baseline later in the bunch period (differential sampling). Their difference
// removes the baseline offset and droop and is proportional to the bunch charge.
// Combinational: q = top - bottom, sign-extended to 15 bits so it cannot overflow.
// It sits after the sample latch, as the reference design places all
// combinational logic there.
module tps_charge_sub
  import tps_pkg::*;
(
  input  sample_t top,
  input  sample_t bottom,
  output charge_t q
);

  always_comb q = charge_t'(top) - charge_t'(bottom);

endmodule

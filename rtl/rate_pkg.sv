// rate_pkg: shared definitions for the two-pin pulse-rate signal.
//
// A signed quantity is carried on two pins: a sign pin and a magnitude pin
// on which single-clock pulses arrive at a rate proportional to |x|.  Sign
// '1' means negative and '0' positive, as the two-pin scheme defines it.
// Everything in this design is synchronous to one clock; a pulse is a
// one-cycle high level on the magnitude pin, and the sign pin is only
// meaningful in a cycle that carries a pulse.
package rate_pkg;

  // Polarity of a rate signal.
  typedef enum logic {
    POL_POS = 1'b0,
    POL_NEG = 1'b1
  } pol_e;

  // Signed weight (-1, 0 or +1) of one two-pin sample.
  function automatic logic signed [1:0] pulse_weight(input logic pulse, input logic pol);
    if (!pulse)   return 2'sd0;
    else if (pol) return -2'sd1;
    else          return 2'sd1;
  endfunction

endpackage

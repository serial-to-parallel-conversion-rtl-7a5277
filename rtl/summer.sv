// summer: adds two two-pin (sign + pulse) rate signals.
//
// Per clock cycle:
//  * one input pulse only: it is passed, with its own polarity on pol_out;
//  * coincident pulses of opposite sign: they cancel, no output pulse and
//    pol_out at its default '0';
//  * coincident pulses of equal sign: one pulse is passed now and an extra
//    pulse of the same sign is inserted in the following cycle.
// The inserted pulse is held in a small signed backlog.  Each cycle the
// backlog and the two inputs are netted; a nonzero net gives one output
// pulse with the net's sign and the remainder stays in the backlog.  With an
// empty backlog this is exactly the rule list above; when an inserted pulse
// meets a new input pulse, the pulse-count sum is still exact (a pending
// pulse and a new pulse of the other sign cancel; of the same sign, one
// waits another cycle).  If the backlog would exceed its range, a pulse is
// dropped and `ovf` pulses for that cycle.
//
// Interface: clk, synchronous active-high rst (empties the backlog);
// pulse_a/pol_a, pulse_b/pol_b inputs; pulse_out/pol_out output; ovf.
// Timing: pulse_out/pol_out are combinational from the inputs and the
// backlog (no latency for a passed pulse); an extra pulse comes one cycle
// after the coincidence that caused it.
//
// The four pins in, two pins out, the cancel/pass/insert rules and the
// default polarity follow the document; the netting backlog, its width and
// the overflow flag are this design's choices.
module summer
  import rate_pkg::*;
#(
  parameter int unsigned PEND_W = 2  // backlog holds up to 2^PEND_W-1 pulses
) (
  input  logic clk,
  input  logic rst,
  input  logic pulse_a,
  input  logic pol_a,
  input  logic pulse_b,
  input  logic pol_b,
  output logic pulse_out,
  output logic pol_out,
  output logic ovf
);

  localparam int PMAX = (1 << PEND_W) - 1;

  typedef logic signed [PEND_W+1:0] pend_t;

  pend_t pend, pend_n, net;

  always_comb begin
    net = pend + pend_t'(pulse_weight(pulse_a, pol_a))
               + pend_t'(pulse_weight(pulse_b, pol_b));
    ovf = 1'b0;
    if (net > 0) begin
      pulse_out = 1'b1;
      pol_out   = POL_POS;
      pend_n    = net - pend_t'(1);
    end else if (net < 0) begin
      pulse_out = 1'b1;
      pol_out   = POL_NEG;
      pend_n    = net + pend_t'(1);
    end else begin
      pulse_out = 1'b0;
      pol_out   = POL_POS;
      pend_n    = '0;
    end
    if (pend_n > pend_t'(PMAX)) begin
      pend_n = pend_t'(PMAX);
      ovf    = 1'b1;
    end else if (pend_n < -pend_t'(PMAX)) begin
      pend_n = -pend_t'(PMAX);
      ovf    = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) pend <= '0;
    else     pend <= pend_n;
  end

endmodule

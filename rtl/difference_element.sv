// difference_element: subtracts two-pin rate signal B from rate signal A.
//
// The subtractor is the summer with the polarity of input B reversed before
// the addition.  That yields the rules of the difference element:
//  * coincident pulses of the same polarity cancel (no output);
//  * coincident pulses of opposite polarity give one pulse now plus an extra
//    pulse in the next cycle, both with the polarity of input A;
//  * a lone pulse is passed; its polarity is pol_a for an A pulse and the
//    complement of pol_b for a B pulse.
//
// Interface: clk, synchronous active-high rst; pulse_a/pol_a (minuend),
// pulse_b/pol_b (subtrahend); pulse_out/pol_out; ovf (summer backlog
// overflow).  Timing: as the summer -- combinational pass, extra pulse one
// cycle later.
//
// The pin set and the rules follow the document; building it from the
// summer with one polarity inverted is the construction the document states.
module difference_element #(
  parameter int unsigned PEND_W = 2
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

  summer #(.PEND_W(PEND_W)) u_sum (
    .clk       (clk),
    .rst       (rst),
    .pulse_a   (pulse_a),
    .pol_a     (pol_a),
    .pulse_b   (pulse_b),
    .pol_b     (~pol_b),
    .pulse_out (pulse_out),
    .pol_out   (pol_out),
    .ovf       (ovf)
  );

endmodule

// integrator: sign-magnitude counter that integrates a two-pin rate signal.
//
// The integral is held as a magnitude (cnt_out) plus a separate polarity
// flag (pol_out, 1 = negative).  Each input pulse moves the integral by one
// step of the input's sign:
//  * input polarity equal to the count polarity -> count up (|x| grows);
//  * input polarity different                 -> count down.
// When the magnitude is zero, a pulse of either sign counts up to one and
// sets the polarity to the input's, so the integral crosses zero by
// changing sign rather than wrapping.  At the largest magnitude 2^WIDTH-1 a
// further pulse that would count up is ignored (the count saturates).
// `reset` loads the preset magnitude rst_cnt and polarity pol_rst; `enable`
// low freezes the count.
//
// Interface: clk; reset (synchronous, active high, loads the preset);
// enable; pulse_in/pol_in; rst_cnt[WIDTH-1:0]/pol_rst; cnt_out[WIDTH-1:0],
// pol_out.  Timing: the count changes at the clock edge ending a cycle in
// which pulse_in is high; one pulse per cycle at most.
//
// The up/down rule, the separate polarity flag, the preset inputs, enable
// and the 8-bit default follow the document; zero crossing, saturation and a
// synchronous reset are this design's choices.
module integrator #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             enable,
  input  logic             pulse_in,
  input  logic             pol_in,
  input  logic [WIDTH-1:0] rst_cnt,
  input  logic             pol_rst,
  output logic [WIDTH-1:0] cnt_out,
  output logic             pol_out
);

  logic step, up, at_zero, at_max;

  assign at_zero = (cnt_out == '0);
  assign at_max  = (cnt_out == '1);

  always_comb begin
    up   = at_zero || (pol_in == pol_out);
    step = enable && pulse_in && !(up && at_max);
  end

  updown_counter #(.WIDTH(WIDTH)) u_mag (
    .clk  (clk),
    .load (reset),
    .d    (rst_cnt),
    .en   (step),
    .up   (up),
    .q    (cnt_out)
  );

  always_ff @(posedge clk) begin
    if (reset)                  pol_out <= pol_rst;
    else if (step && at_zero)   pol_out <= pol_in;
  end

endmodule

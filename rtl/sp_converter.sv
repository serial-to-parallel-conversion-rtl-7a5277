// sp_converter: serial to parallel converter for a two-pin pulse-rate
// signal.
//
// The input rate (pulse_in, pol_in) and the converter's own output rate
// (fb_pulse, fb_pol) enter a difference element; the difference drives a
// rate_integrator (sign-magnitude counter plus BRM).  The BRM, advanced on
// every clock, turns the count m back into the output rate
// f_o = f_clk * m / 2^INT_W, which closes the loop.  The count settles where
// f_o equals the input rate, so the parallel output is
//     par_out = 2^INT_W * f_in / f_clk     with sign par_sign = pol_in.
// In z-domain terms the loop is an accumulator 1/(z-1) with feedback gain
// k = 2^-INT_W: the closed loop 1/(z - (1 - 2^-INT_W)) is a first-order low
// pass with a time constant of about 2^INT_W clock periods (1024 periods,
// about 82 us at the 12.5 MHz serializing frequency for INT_W = 10).
//
// Interface: clk (the serializing frequency f_s); reset (synchronous,
// loads the preset rst_cnt/pol_rst into the integrator); enable (freezes the
// integrator when low); pulse_in/pol_in (input rate, one-cycle pulses, at
// most one per clock); par_out/par_sign (parallel output); fb_pulse/fb_pol
// (the output rate, brought out); diff_ovf (difference element backlog
// overflow).
// Timing: a step in the input rate gives an exponential approach of par_out
// with the time constant above; par_out changes by at most one per clock.
//
// The loop, the 10-bit integrator with its separate polarity flag and the
// 12.5 MHz / 1024 numbers follow the document; the clocking of every element
// from one clock is this design's choice.
module sp_converter #(
  parameter int unsigned INT_W  = 10,
  parameter int unsigned PEND_W = 2
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             enable,
  input  logic             pulse_in,
  input  logic             pol_in,
  input  logic [INT_W-1:0] rst_cnt,
  input  logic             pol_rst,
  output logic [INT_W-1:0] par_out,
  output logic             par_sign,
  output logic             fb_pulse,
  output logic             fb_pol,
  output logic             diff_ovf
);

  logic d_pulse, d_pol;

  difference_element #(.PEND_W(PEND_W)) u_diff (
    .clk       (clk),
    .rst       (reset),
    .pulse_a   (pulse_in),
    .pol_a     (pol_in),
    .pulse_b   (fb_pulse),
    .pol_b     (fb_pol),
    .pulse_out (d_pulse),
    .pol_out   (d_pol),
    .ovf       (diff_ovf)
  );

  rate_integrator #(.WIDTH(INT_W)) u_sigma (
    .clk       (clk),
    .reset     (reset),
    .enable    (enable),
    .pulse_in  (d_pulse),
    .pol_in    (d_pol),
    .rst_cnt   (rst_cnt),
    .pol_rst   (pol_rst),
    .fs_pulse  (1'b1),
    .cnt_out   (par_out),
    .pol_out   (par_sign),
    .pulse_out (fb_pulse)
  );

  assign fb_pol = par_sign;

  // The integral moves by at most one step per clock, except when a preset
  // is loaded.
  function automatic int signed_value(input logic [INT_W-1:0] mag, input logic neg);
    return neg ? -int'(mag) : int'(mag);
  endfunction

  a_one_step: assert property (@(posedge clk) disable iff (reset)
    !$past(reset) |-> (signed_value(par_out, par_sign) - signed_value($past(par_out), $past(par_sign))) inside {-1, 0, 1});

endmodule

// rate_integrator: integrator with a binary rate multiplier on its output
// (the integrating element of the serial to parallel converter).
//
// An `integrator` accumulates the signed input rate in a sign-magnitude
// register of WIDTH bits.  The register's magnitude m is the rate input of
// a WIDTH-stage BRM whose serializing counter is advanced by fs_pulse (tie it
// high to run it from every clock, so that the clock is the serializing
// frequency f_s).  The BRM's pulses, with the register's polarity, form the
// two-pin output rate: f_o = f_s * m / 2^WIDTH.
//
// Interface: clk; reset (loads rst_cnt/pol_rst); enable; pulse_in/pol_in;
// fs_pulse; cnt_out/pol_out (parallel value); pulse_out/pol_out (output
// rate, sign shared with the parallel value).
// Timing: the output pulse is combinational from the current count and
// serializing counter; the count updates one clock after an input pulse.
//
// The integrator-plus-BRM structure, the 10-bit register and f_o/f_s =
// m/(N+1) follow the document; driving the serializing counter from a
// clock enable is this design's choice.
module rate_integrator #(
  parameter int unsigned WIDTH = 10
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             enable,
  input  logic             pulse_in,
  input  logic             pol_in,
  input  logic [WIDTH-1:0] rst_cnt,
  input  logic             pol_rst,
  input  logic             fs_pulse,
  output logic [WIDTH-1:0] cnt_out,
  output logic             pol_out,
  output logic             pulse_out
);

  integrator #(.WIDTH(WIDTH)) u_int (
    .clk      (clk),
    .reset    (reset),
    .enable   (enable),
    .pulse_in (pulse_in),
    .pol_in   (pol_in),
    .rst_cnt  (rst_cnt),
    .pol_rst  (pol_rst),
    .cnt_out  (cnt_out),
    .pol_out  (pol_out)
  );

  brm #(.N(WIDTH)) u_brm (
    .clk       (clk),
    .rst       (reset),
    .pulse_in  (fs_pulse),
    .rate      (cnt_out),
    .pulse_out (pulse_out)
  );

endmodule

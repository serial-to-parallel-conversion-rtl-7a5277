// brm: binary rate multiplier.
//
// Scales the rate of an input pulse stream by rate/2^N.  A serializing
// counter splits the input pulses into N non-overlapping trains of binary
// weighted rate (1/2, 1/4, ... 1/2^N of the input).  Each train is ANDed with
// the register bit of the same weight -- the fastest train (LSB stage B0) with
// the register's MSB A[N-1], the slowest (B[N-1]) with A[0] -- and the N
// products are ORed.  Over one cycle of 2^N input pulses the output carries
// exactly `rate` pulses, up to 2^N-1.
//
// Interface: clk, synchronous active-high rst, pulse_in (one-cycle input
// pulse), rate[N-1:0] (the register / up-down counter content), pulse_out.
// Timing: pulse_out is combinational and coincides with the input pulse it
// was taken from; no latency.
//
// The AND-OR structure, the cross-wiring of counter stages to register bits
// and the 8-stage default follow the document; the synchronous counter is
// this design's choice.
module brm #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         pulse_in,
  input  logic [N-1:0] rate,
  output logic         pulse_out
);

  logic [N-1:0] nc;
  logic [N-1:0] gated;

  serializing_counter #(.N(N)) u_ser (
    .clk      (clk),
    .rst      (rst),
    .pulse_in (pulse_in),
    .nc       (nc)
  );

  always_comb begin
    for (int i = 0; i < int'(N); i++) gated[i] = nc[i] & rate[N-1-i];
    pulse_out = |gated;
  end

endmodule

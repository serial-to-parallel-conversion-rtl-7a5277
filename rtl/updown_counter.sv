// updown_counter: synchronous binary up/down counter.
//
// All stages change together on the rising clock edge (a synchronous
// counter, not a ripple counter): when `en` is high the count goes up by
// one if `up` is high and down by one otherwise, wrapping modulo 2^WIDTH.
// `load` has priority and loads `d`.
//
// Interface: clk, load, d[WIDTH-1:0], en, up, q[WIDTH-1:0].
// Timing: q changes one clock edge after en/load are sampled high.
//
// The synchronous up/down behaviour and the 4-bit default width follow the
// document's timing diagram; the parallel load is this design's choice (the
// integrator needs it for its preset).
module updown_counter #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  input  logic             en,
  input  logic             up,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (load)    q <= d;
    else if (en) q <= up ? q + 1'b1 : q - 1'b1;
  end

endmodule

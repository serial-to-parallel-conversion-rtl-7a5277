// serializing_counter: binary serializing counter of a binary rate
// multiplier, producing one "non-carry" pulse train per stage.
//
// An N-stage binary counter advances by one on every input pulse.  On each
// input pulse exactly one stage changes from 0 to 1 without propagating a
// carry (stage i, when the stages below it are all 1 and stage i is 0); that
// stage's output nc[i] pulses in the same cycle.  Stage 0 therefore fires on
// every 2nd input pulse, stage 1 on every 4th, stage i on 1 of every
// 2^(i+1), and no two stages ever fire together.  The 2^N-th input pulse of
// a cycle is the full carry and fires no stage.
//
// Interface: clk, synchronous active-high rst (clears the counter),
// pulse_in (one-cycle input pulse), nc[N-1:0] (nc[0] = LSB stage).
// Timing: nc is combinational from pulse_in and the counter state, so an
// output pulse appears in the same cycle as the input pulse that causes it;
// the counter updates at the clock edge that ends that cycle.
//
// The stage count (8) and the non-overlapping, binary-weighted pulse trains
// follow the document; the synchronous counter, the decode of the 0->1 stage
// and the reset are this design's choices.
module serializing_counter #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         pulse_in,
  output logic [N-1:0] nc
);

  logic [N-1:0] count;

  always_ff @(posedge clk) begin
    if (rst)           count <= '0;
    else if (pulse_in) count <= count + 1'b1;
  end

  // Stage i fires when bits below i are all ones and bit i is zero.
  always_comb begin
    logic low_ones;
    low_ones = 1'b1;
    for (int i = 0; i < int'(N); i++) begin
      nc[i]    = pulse_in && low_ones && !count[i];
      low_ones = low_ones && count[i];
    end
  end

endmodule

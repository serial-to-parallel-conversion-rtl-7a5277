// tb_brm: binary rate multiplier.  With the input pulse every clock or at
// random, the number of output pulses over each full cycle of 2^N input
// pulses must equal the register value, for edge and random values.  A
// 3-stage instance is checked against the 3-stage example: register 110
// passes 6 of every 8 input pulses.
module tb_brm;
  localparam int N = 8;
  logic clk = 0, rst = 1, pin = 0;
  logic [N-1:0] rate;
  logic pout;
  logic [2:0] rate3;
  logic pout3;
  int checks = 0, failures = 0;

  brm #(.N(N)) dut (.clk, .rst, .pulse_in(pin), .rate, .pulse_out(pout));
  brm #(.N(3)) dut3 (.clk, .rst, .pulse_in(pin), .rate(rate3), .pulse_out(pout3));

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_cycle(input logic [N-1:0] r, input bit random_gaps);
    int got = 0, got3 = 0, inputs = 0;
    rate = r;
    rate3 = 3'b110;
    rst <= 1; @(posedge clk); rst <= 0;
    while (inputs < (1 << N)) begin
      pin <= random_gaps ? ($urandom_range(0, 1) == 1) : 1'b1;
      @(negedge clk);
      if (pout) got++;
      if (pout3) got3++;
      if (pout && !pin) begin checks++; failures++; $display("FAIL output without input"); end
      if (pin) inputs++;
      @(posedge clk);
    end
    pin <= 0;
    checks++;
    if (got != int'(r)) begin failures++; $display("FAIL rate=%0d got %0d pulses", r, got); end
    checks++;
    // 2^N inputs is 2^(N-3) full cycles of the 3-stage BRM
    if (got3 != 6 * (1 << (N - 3))) begin failures++; $display("FAIL 3-stage 110 got %0d", got3); end
  endtask

  initial begin
    rate = 0; rate3 = 0;
    repeat (2) @(posedge clk);
    run_cycle(8'd0, 0);
    run_cycle(8'd255, 0);
    run_cycle(8'd1, 0);
    run_cycle(8'd128, 1);
    run_cycle(8'd6, 0);
    for (int k = 0; k < 20; k++) run_cycle(N'($urandom), k[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

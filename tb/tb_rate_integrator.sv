// tb_rate_integrator: integrator + 10-stage BRM.  With the count preset to
// m and the integrator disabled, the output must carry exactly m pulses in
// each 1024 clocks (f_o/f_s = m/1024) with the preset's polarity on pol_out.
// With the integrator enabled, input pulses must move the parallel count by
// their signed number.
module tb_rate_integrator;
  localparam int W = 10;
  logic clk = 0, reset = 1, enable = 0, pin = 0, pol = 0, pol_rst = 0, fs = 1;
  logic [W-1:0] rst_cnt = '0, cnt;
  logic pol_out, pout;
  int checks = 0, failures = 0;

  rate_integrator #(.WIDTH(W)) dut (.clk, .reset, .enable, .pulse_in(pin), .pol_in(pol),
                                    .rst_cnt, .pol_rst, .fs_pulse(fs), .cnt_out(cnt),
                                    .pol_out, .pulse_out(pout));

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rate_check(input int m, input logic s);
    int got = 0;
    reset <= 1; enable <= 0; rst_cnt <= W'(m); pol_rst <= s;
    @(posedge clk);
    reset <= 0;
    repeat (1 << W) begin
      @(negedge clk);
      if (pout) got++;
      @(posedge clk);
    end
    checks++;
    if (got != m) begin failures++; $display("FAIL m=%0d: %0d pulses in 1024 clocks", m, got); end
    checks++;
    if (m != 0 && pol_out != s) begin failures++; $display("FAIL m=%0d: polarity %0b", m, pol_out); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rate_check(0, 0);
    rate_check(1, 0);
    rate_check(128, 1);
    rate_check(1023, 0);
    for (int k = 0; k < 10; k++) rate_check($urandom_range(0, 1023), $urandom_range(0, 1));
    // integration: start at +3, add 10 negative pulses -> -7
    reset <= 1; rst_cnt <= 10'd3; pol_rst <= 0;
    @(posedge clk);
    reset <= 0; enable <= 1;
    repeat (10) begin
      pin <= 1; pol <= 1;
      @(posedge clk);
      pin <= 0;
      @(posedge clk);
    end
    @(negedge clk);
    checks++;
    if (cnt != 10'd7 || pol_out != 1'b1) begin
      failures++; $display("FAIL integration: cnt=%0d pol=%0b", cnt, pol_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

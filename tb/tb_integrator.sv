// tb_integrator: sign-magnitude pulse integrator (8 bits).  A signed
// integer model adds +1 for each positive and -1 for each negative input
// pulse, clamped to +/-255; the counter's magnitude must equal |model| and
// its polarity the model's sign whenever the model is nonzero.  Checked:
// counting up when input and count polarity agree, down when they differ,
// the zero crossing, saturation at 255, the preset load on reset and the
// enable input.
module tb_integrator;
  localparam int W = 8;
  localparam int MAXV = (1 << W) - 1;
  logic clk = 0, reset = 1, enable = 1, pin = 0, pol = 0, pol_rst = 0;
  logic [W-1:0] rst_cnt = '0, cnt;
  logic pol_out;
  int checks = 0, failures = 0;
  int model = 0;
  int crossings = 0, saturations = 0;

  integrator #(.WIDTH(W)) dut (.clk, .reset, .enable, .pulse_in(pin), .pol_in(pol),
                               .rst_cnt, .pol_rst, .cnt_out(cnt), .pol_out);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    checks++;
    if (int'(cnt) != (model < 0 ? -model : model) || (model != 0 && pol_out != (model < 0))) begin
      failures++;
      if (failures < 10) $display("FAIL %s: cnt=%0d pol=%0b model=%0d", what, cnt, pol_out, model);
    end
  endtask

  // one cycle of inputs; model updated as the counter should be
  task automatic drive(input logic r, e, p, s, input logic [W-1:0] rc, input logic rs);
    int prev = model;
    reset <= r; enable <= e; pin <= p; pol <= s; rst_cnt <= rc; pol_rst <= rs;
    @(posedge clk);
    if (r) model = rs ? -int'(rc) : int'(rc);
    else if (e && p) model += s ? -1 : 1;
    if (model > MAXV) begin model = MAXV; saturations++; end
    if (model < -MAXV) begin model = -MAXV; saturations++; end
    if ((prev < 0 && model >= 0) || (prev > 0 && model <= 0)) crossings++;
    @(negedge clk);
    compare(r ? "preset" : "count");
  endtask

  initial begin
    // preset of -5 then count up through zero to +3
    drive(1, 1, 0, 0, 8'd5, 1);
    for (int k = 0; k < 8; k++) drive(0, 1, 1, 0, 0, 0);
    // enable low: pulses ignored
    for (int k = 0; k < 4; k++) drive(0, 0, 1, 1, 0, 0);
    // preset to 250 and push into saturation
    drive(1, 1, 0, 0, 8'd250, 0);
    for (int k = 0; k < 10; k++) drive(0, 1, 1, 0, 0, 0);
    // preset to -250 and saturate negative
    drive(1, 1, 0, 0, 8'd250, 1);
    for (int k = 0; k < 10; k++) drive(0, 1, 1, 1, 0, 0);
    drive(1, 1, 0, 0, 8'd0, 0);
    // random walk
    for (int n = 0; n < 20000; n++)
      drive(($urandom_range(0, 999) == 0), ($urandom_range(0, 15) != 0),
            ($urandom_range(0, 1) == 1), ($urandom_range(0, 1) == 1), W'($urandom), $urandom_range(0, 1));
    checks++;
    if (crossings == 0 || saturations == 0) begin
      failures++;
      $display("FAIL coverage: crossings=%0d saturations=%0d", crossings, saturations);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

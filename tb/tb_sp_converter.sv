// tb_sp_converter: end-to-end test of the serial to parallel converter at
// its default size (10-bit integrator, clock = serializing frequency).
//
// Input rates are periodic pulse trains at f_clk/k for k = 512 ... 4 (at the
// 12.5 MHz clock these are 24.4, 48.8, 97.7, 195.3, 390.6, 781.25, 1562.5 and
// 3125 kpulses/s).  After settling, the mean parallel output over 16384
// clocks must be within 10 % (at least 1.5 LSB) of 1024/k, for both
// polarities.  The loop is an integer system whose output rate follows the
// BRM's pulse pattern, so the steady value sits near, not exactly at, the
// ideal; the tolerance allows for that.
// Also checked:
//  * the step response: from zero, par_out must pass 63.2 % of its final
//    value after 1024 clocks (+/-15 %), the loop's time constant;
//  * a change of input polarity drives the output through zero to the
//    negative value (zero crossing of the integrator);
//  * reset loads the preset count and polarity;
//  * enable low freezes the parallel output;
//  * an input pulse on every clock saturates the integrator at 1023.
// Each mechanism is counted -- difference-element cancellations and
// inserted pulses, zero crossings, presets, freezes, saturations -- and a
// mechanism that never happened counts as a failure.
module tb_sp_converter;
  logic clk = 0, reset = 1, enable = 1, pin = 0, pol = 0, pol_rst = 0;
  logic [9:0] rst_cnt = '0, par_out;
  logic par_sign, fb_pulse, fb_pol, diff_ovf;
  int checks = 0, failures = 0;
  int period = 0;        // input pulse every `period` clocks, 0 = no input
  int phase = 0;
  int n_cancel = 0, n_insert = 0, n_cross = 0, n_preset = 0, n_freeze = 0, n_sat = 0;
  logic prev_sign = 0;
  longint cycle = 0;

  sp_converter dut (.clk, .reset, .enable, .pulse_in(pin), .pol_in(pol), .rst_cnt, .pol_rst,
                    .par_out, .par_sign, .fb_pulse, .fb_pol, .diff_ovf);

  always #40 clk = ~clk;   // 80 ns period: 12.5 MHz

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // input pulse generator
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (period == 0) begin
      pin <= 0; phase <= 0;
    end else begin
      pin   <= (phase == 0);
      phase <= (phase + 1 >= period) ? 0 : phase + 1;
    end
  end

  // mechanism monitors, sampled just before the clock edge
  always @(negedge clk) begin
    if (!reset) begin
      if (pin && fb_pulse && pol == fb_pol) n_cancel++;
      if (pin && fb_pulse && pol != fb_pol) n_insert++;
      if (par_out != 0 && par_sign != prev_sign) n_cross++;
      if (par_out != 0) prev_sign <= par_sign;
    end
  end

  function automatic int signed_out();
    return par_sign ? -int'(par_out) : int'(par_out);
  endfunction

  task automatic do_preset(input int value, input logic s);
    reset <= 1; rst_cnt <= 10'(value); pol_rst <= s;
    @(posedge clk);
    reset <= 0;
    @(negedge clk);
    checks++;
    if (int'(par_out) != value || (value != 0 && par_sign != s)) begin
      failures++; $display("FAIL preset %0d/%0b: got %0d/%0b", value, s, par_out, par_sign);
    end else n_preset++;
    prev_sign = par_sign;
  endtask

  task automatic measure(input int k, input logic s, input int settle);
    longint sum = 0;
    real mean, ideal, tol;
    period = k; pol = s;
    repeat (settle) @(posedge clk);
    repeat (16384) begin
      @(negedge clk);
      sum += longint'(signed_out());
    end
    mean  = real'(sum) / 16384.0;
    ideal = (s ? -1024.0 : 1024.0) / real'(k);
    tol   = (ideal < 0 ? -ideal : ideal) * 0.10;
    if (tol < 1.5) tol = 1.5;
    checks++;
    $display("input f_clk/%0d (%0.1f kpulses/s at 12.5 MHz), sign %0b: mean par_out %0.2f, ideal %0.2f",
             k, 12500.0 / real'(k), s, mean, ideal);
    if (mean > ideal + tol || mean < ideal - tol) begin
      failures++; $display("FAIL steady output off by more than %0.2f", tol);
    end
  endtask

  initial begin
    int t63;
    repeat (2) @(posedge clk);
    do_preset(0, 0);

    // step response and time constant
    period = 8; pol = 0;
    t63 = -1;
    for (int t = 1; t <= 4000; t++) begin
      @(negedge clk);
      if (t63 < 0 && int'(par_out) >= 81) t63 = t;
    end
    checks++;
    $display("step to f_clk/8: 63.2%% of final value reached after %0d clocks (%0.1f us)",
             t63, real'(t63) * 0.08);
    if (t63 < 870 || t63 > 1180) begin failures++; $display("FAIL time constant"); end

    // steady outputs, positive
    for (int e = 9; e >= 2; e--) measure(1 << e, 0, 12 * 1024);
    // polarity change: from +256 to the negative side
    for (int e = 2; e <= 9; e++) measure(1 << e, 1, 12 * 1024);
    checks++;
    if (!par_sign) begin failures++; $display("FAIL sign did not follow the input"); end

    // enable low: output frozen
    begin
      logic [9:0] held;
      period = 4; pol = 0;
      enable <= 0;
      @(negedge clk);
      held = par_out;
      repeat (2000) @(negedge clk);
      checks++;
      if (par_out != held) begin failures++; $display("FAIL freeze: %0d -> %0d", held, par_out); end
      else n_freeze++;
      enable <= 1;
    end

    // preset while running, then saturation with an input pulse every clock
    do_preset(300, 1);
    do_preset(0, 0);
    period = 1; pol = 0;
    repeat (40000) @(posedge clk);
    @(negedge clk);
    checks++;
    if (par_out != 10'd1023 || par_sign) begin
      failures++; $display("FAIL saturation: %0d/%0b", par_out, par_sign);
    end else n_sat++;
    period = 0;

    $display("mechanisms: cancellations=%0d inserted=%0d zero_crossings=%0d presets=%0d freezes=%0d saturations=%0d",
             n_cancel, n_insert, n_cross, n_preset, n_freeze, n_sat);
    checks++;
    if (n_cancel == 0 || n_insert == 0 || n_cross == 0 || n_preset == 0 || n_freeze == 0 || n_sat == 0) begin
      failures++; $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

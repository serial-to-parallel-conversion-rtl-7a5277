// tb_difference_element: subtractor A - B for two-pin rate signals.
// Directed cycles cover each rule: coincident pulses of equal polarity
// cancel; coincident pulses of opposite polarity give a pulse now and an
// inserted pulse next cycle, both with A's polarity; a lone A pulse keeps its
// polarity and a lone B pulse is passed with its polarity complemented.
// Random streams check that outputs sum to (sum of A) - (sum of B).
module tb_difference_element;
  logic clk = 0, rst = 1;
  logic pa = 0, sa = 0, pb = 0, sb = 0;
  logic po, so, ovf;
  int checks = 0, failures = 0;

  difference_element dut (.clk, .rst, .pulse_a(pa), .pol_a(sa), .pulse_b(pb), .pol_b(sb),
                          .pulse_out(po), .pol_out(so), .ovf);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic a, sa_i, b, sb_i, input logic ep, es, input string what);
    pa <= a; sa <= sa_i; pb <= b; sb <= sb_i;
    @(negedge clk);
    checks++;
    if (po !== ep || (ep && so !== es) || (!ep && so !== 1'b0)) begin
      failures++;
      $display("FAIL %s: out=%0b pol=%0b expected %0b/%0b", what, po, so, ep, es);
    end
    @(posedge clk);
  endtask

  int sum_in = 0, sum_out = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    step(0,0, 0,0, 0,0, "idle");
    step(1,0, 1,0, 0,0, "+A +B cancel");
    step(1,1, 1,1, 0,0, "-A -B cancel");
    step(1,0, 1,1, 1,0, "+A -B first");
    step(0,0, 0,0, 1,0, "+A -B inserted (pol A)");
    step(0,0, 0,0, 0,0, "idle");
    step(1,1, 1,0, 1,1, "-A +B first");
    step(0,0, 0,0, 1,1, "-A +B inserted (pol A)");
    step(0,0, 0,0, 0,0, "idle");
    step(1,0, 0,0, 1,0, "lone +A");
    step(1,1, 0,0, 1,1, "lone -A");
    step(0,0, 1,0, 1,1, "lone +B complemented");
    step(0,0, 1,1, 1,0, "lone -B complemented");

    for (int n = 0; n < 20000; n++) begin
      logic a, b, s1, s2;
      a = ($urandom_range(0, 3) == 0); b = ($urandom_range(0, 3) == 0);
      s1 = $urandom_range(0, 1); s2 = $urandom_range(0, 1);
      pa <= a; sa <= s1; pb <= b; sb <= s2;
      @(negedge clk);
      sum_in += (a ? (s1 ? -1 : 1) : 0) - (b ? (s2 ? -1 : 1) : 0);
      if (po) sum_out += so ? -1 : 1;
      checks++;
      if (ovf) begin failures++; $display("FAIL unexpected overflow"); end
      @(posedge clk);
    end
    pa <= 0; pb <= 0;
    repeat (8) begin
      @(negedge clk);
      if (po) sum_out += so ? -1 : 1;
      @(posedge clk);
    end
    checks++;
    if (sum_in != sum_out) begin
      failures++;
      $display("FAIL conservation: in %0d out %0d", sum_in, sum_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

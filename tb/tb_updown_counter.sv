// tb_updown_counter: 4-bit synchronous up/down counter.  First the counter
// is loaded with 1111 and counted down, expecting 1111, 1110, 1101, ... 0000
// on successive clocks (all stages changing on the same edge); then random
// load / enable / direction sequences are compared with a modulo-16 model.
module tb_updown_counter;
  localparam int W = 4;
  logic clk = 0, load = 0, en = 0, up = 0;
  logic [W-1:0] d = '0, q;
  int checks = 0, failures = 0;
  int model;

  updown_counter #(.WIDTH(W)) dut (.clk, .load, .d, .en, .up, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load <= 1; d <= 4'hF;
    @(posedge clk);
    load <= 0; en <= 1; up <= 0;
    for (int k = 15; k >= 0; k--) begin
      @(negedge clk);
      checks++;
      if (q !== W'(k)) begin failures++; $display("FAIL down count: q=%b expected %b", q, W'(k)); end
      @(posedge clk);
    end
    en <= 0;
    @(negedge clk);
    model = int'(q);
    for (int n = 0; n < 5000; n++) begin
      logic l, e, u; logic [W-1:0] dv;
      l = ($urandom_range(0, 15) == 0); e = $urandom_range(0, 1); u = $urandom_range(0, 1);
      dv = W'($urandom);
      load <= l; en <= e; up <= u; d <= dv;
      @(posedge clk);
      if (l) model = int'(dv);
      else if (e) model = (model + (u ? 1 : 15)) % 16;
      @(negedge clk);
      checks++;
      if (q !== W'(model)) begin failures++; $display("FAIL random: q=%0d model=%0d", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
